// tb_aes_add_round_key: XOR of state and key on random operands and on the
// FIPS-197 example (plaintext ^ cipher key = start of round 1).
module tb_aes_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] st, key, out;
  int checks = 0, failures = 0;

  aes_add_round_key dut (.state(st), .round_key(key), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st  = 128'h3243f6a8885a308d313198a2e0370734;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    checks++;
    if (out !== 128'h193de3bea0f4e22b9ac68d2ae9f84808) begin failures++; $display("FAIL fips %h", out); end
    for (int t = 0; t < 100; t++) begin
      logic [127:0] e;
      st = rand128();
      key = rand128();
      e = 128'h0;
      for (int b = 0; b < 128; b++) e[b] = (st[b] != key[b]);
      #1;
      checks++;
      if (out !== e) begin failures++; $display("FAIL %h ^ %h = %h", st, key, out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
