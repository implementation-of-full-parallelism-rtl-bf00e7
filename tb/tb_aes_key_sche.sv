// tb_aes_key_sche: one forward and one backward key-expansion step, checked
// for every step r = 1..10 of random keys and of the FIPS-197 key against the
// reference schedule (forward: key r-1 -> key r; backward: key r -> key r-1).
// The FIPS-197 round-10 key d014f9a8c9ee2589e13f0cc8b6630ca6 is checked too.
module tb_aes_key_sche;
  import aes_ref_pkg::*;
  logic [127:0] kin_f, kout_f, kin_b, kout_b;
  logic [7:0]   rc;
  logic [127:0] rk [11];
  int checks = 0, failures = 0;

  aes_key_sche #(.INVERSE(1'b0)) dut_f (.key_in(kin_f), .rc(rc), .key_out(kout_f));
  aes_key_sche #(.INVERSE(1'b1)) dut_b (.key_in(kin_b), .rc(rc), .key_out(kout_b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      logic [127:0] key;
      logic [127:0] chain;
      key = (t == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : rand128();
      ref_expand(key, rk);
      chain = key;
      for (int r = 1; r <= 10; r++) begin
        rc = ref_rcon(r);
        kin_f = chain;
        kin_b = rk[r];
        #1;
        checks += 2;
        if (kout_f !== rk[r])   begin failures++; $display("FAIL fwd r=%0d got=%h exp=%h", r, kout_f, rk[r]); end
        if (kout_b !== rk[r-1]) begin failures++; $display("FAIL bwd r=%0d got=%h exp=%h", r, kout_b, rk[r-1]); end
        chain = kout_f;
      end
      if (t == 0) begin
        checks++;
        if (chain !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin failures++; $display("FAIL fips key 10 %h", chain); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
