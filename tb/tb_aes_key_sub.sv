// tb_aes_key_sub: the key-expansion function g (RotWord, SubWord, Rcon)
// against the reference on random words and constants, plus the FIPS-197
// first step: g(09cf4f3c, 01) = SubWord 8a84eb01, ^ 01000000 = 8b84eb01.
module tb_aes_key_sub;
  import aes_ref_pkg::*;
  logic [31:0] w, g;
  logic [7:0]  rc;
  int checks = 0, failures = 0;

  aes_key_sub dut (.w(w), .rc(rc), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w = 32'h09cf4f3c; rc = 8'h01;
    #1;
    checks++;
    if (g !== 32'h8b84eb01) begin failures++; $display("FAIL fips g=%h", g); end
    for (int t = 0; t < 200; t++) begin
      w = $urandom;
      rc = ref_rcon(1 + t % 10);
      #1;
      checks++;
      if (g !== ref_g(w, rc)) begin failures++; $display("FAIL w=%h rc=%h g=%h exp=%h", w, rc, g, ref_g(w, rc)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
