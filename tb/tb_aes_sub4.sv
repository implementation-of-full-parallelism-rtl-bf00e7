// tb_aes_sub4: random 32-bit rows through forward and inverse Sub-4 units,
// each byte compared with the reference S-box; also checks that the inverse
// unit undoes the forward one.
module tb_aes_sub4;
  import aes_ref_pkg::*;
  logic [31:0] in, out_f, out_i, back;
  int checks = 0, failures = 0;

  aes_sub4 #(.INVERSE(1'b0)) dut_f (.in(in),    .out(out_f));
  aes_sub4 #(.INVERSE(1'b1)) dut_i (.in(in),    .out(out_i));
  aes_sub4 #(.INVERSE(1'b1)) dut_b (.in(out_f), .out(back));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      logic [31:0] ef, ei;
      in = $urandom;
      #1;
      for (int i = 0; i < 4; i++) begin
        ef[31 - 8*i -: 8] = ref_sbox(in[31 - 8*i -: 8]);
        ei[31 - 8*i -: 8] = ref_inv_sbox(in[31 - 8*i -: 8]);
      end
      checks += 3;
      if (out_f !== ef) begin failures++; $display("FAIL fwd %h -> %h exp %h", in, out_f, ef); end
      if (out_i !== ei) begin failures++; $display("FAIL inv %h -> %h exp %h", in, out_i, ei); end
      if (back  !== in) begin failures++; $display("FAIL round trip %h -> %h", in, back); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
