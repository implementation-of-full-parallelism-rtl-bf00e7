// tb_aes_shift_rows: ShiftRows and InvShiftRows on random states against the
// reference, the FIPS-197 round-1 example (after SubBytes -> after
// ShiftRows), and the inverse undoing the forward permutation.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;
  logic [127:0] in, out_f, out_i, back;
  int checks = 0, failures = 0;

  aes_shift_rows #(.INVERSE(1'b0)) dut_f (.in(in),    .out(out_f));
  aes_shift_rows #(.INVERSE(1'b1)) dut_i (.in(in),    .out(out_i));
  aes_shift_rows #(.INVERSE(1'b1)) dut_b (.in(out_f), .out(back));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1;
    check(out_f, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "fips round 1");
    for (int t = 0; t < 100; t++) begin
      in = rand128();
      #1;
      check(out_f, ref_shift_rows(in, 0), "fwd");
      check(out_i, ref_shift_rows(in, 1), "inv");
      check(back, in, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
