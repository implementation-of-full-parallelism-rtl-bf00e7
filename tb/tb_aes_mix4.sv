// tb_aes_mix4: MixColumns and InvMixColumns of one column against the
// shift-and-add reference on random columns, the FIPS-197 round-1 column
// (d4bf5d30 -> 046681e5), and the inverse undoing the forward mix.
module tb_aes_mix4;
  import aes_ref_pkg::*;
  logic [31:0] in, out_f, out_i, back;
  int checks = 0, failures = 0;

  aes_mix4 #(.INVERSE(1'b0)) dut_f (.in(in),    .out(out_f));
  aes_mix4 #(.INVERSE(1'b1)) dut_i (.in(in),    .out(out_i));
  aes_mix4 #(.INVERSE(1'b1)) dut_b (.in(out_f), .out(back));

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s in=%h got=%h exp=%h", what, in, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 32'hd4bf5d30;
    #1;
    check(out_f, 32'h046681e5, "fips column");
    for (int t = 0; t < 300; t++) begin
      in = $urandom;
      #1;
      check(out_f, ref_mix_col(in, 0), "fwd");
      check(out_i, ref_mix_col(in, 1), "inv");
      check(back, in, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
