// tb_aes_sbox: exhaustive check of the composite-field S-box and inverse
// S-box against the search-based reference, over all 256 inputs, plus four
// fixed values of the standard table (00->63, 01->7c, 53->ed, ff->16).
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] in, out_f, out_i;
  int checks = 0, failures = 0;

  aes_sbox #(.INVERSE(1'b0)) dut_f (.in(in), .out(out_f));
  aes_sbox #(.INVERSE(1'b1)) dut_i (.in(in), .out(out_i));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%h got=%h exp=%h", what, in, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      in = 8'(a);
      #1;
      check(out_f, ref_sbox(in), "sbox");
      check(out_i, ref_inv_sbox(in), "inv_sbox");
    end
    in = 8'h00; #1; check(out_f, 8'h63, "sbox 00");
    in = 8'h01; #1; check(out_f, 8'h7c, "sbox 01");
    in = 8'h53; #1; check(out_f, 8'hed, "sbox 53");
    in = 8'hff; #1; check(out_f, 8'h16, "sbox ff");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
