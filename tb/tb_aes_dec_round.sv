// tb_aes_dec_round: two instances of the decryption round, a middle round
// (ROUND = 5) and the last one (ROUND = 0), fed a new random state and
// matching round key every clock. Each output is compared one clock later with
// the reference round and the reference key schedule, which also checks the
// one-clock latency and that a round accepts a block every clock. A gap in
// in_valid and a reset check that out_valid follows in_valid exactly.
module tb_aes_dec_round;
  import aes_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic [127:0] in_state = '0, in_key_m = '0, in_key_l = '0;
  logic         ov_m, ov_l;
  logic [127:0] os_m, ok_m, os_l, ok_l;
  logic [127:0] exp_s_m, exp_k_m, exp_s_l, exp_k_l;
  logic         exp_v;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_dec_round #(.ROUND(5)) dut_m (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_state(in_state), .in_key(in_key_m),
    .out_valid(ov_m), .out_state(os_m), .out_key(ok_m));
  aes_dec_round #(.ROUND(0)) dut_l (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_state(in_state), .in_key(in_key_l),
    .out_valid(ov_l), .out_state(os_l), .out_key(ok_l));

  function automatic logic [127:0] ref_round(logic [127:0] s, logic [127:0] k, int r);
    s = ref_sub_bytes(ref_shift_rows(s, 1), 1) ^ k;
    if (r != 0) s = ref_mix_columns(s, 1);
    return s;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] rk [11];
    exp_v = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 120; t++) begin
      // drive the next input
      @(negedge clk);
      in_valid = (t % 17 != 5);
      in_state = rand128();
      ref_expand(rand128(), rk);
      in_key_m = rk[5+1];
      in_key_l = rk[0+1];
      @(posedge clk);
      exp_v   = in_valid;
      exp_s_m = ref_round(in_state, rk[5], 5);
      exp_k_m = rk[5];
      exp_s_l = ref_round(in_state, rk[0], 0);
      exp_k_l = rk[0];
      #1;
      checks += 2;
      if (ov_m !== exp_v || ov_l !== exp_v) begin failures++; $display("FAIL valid t=%0d", t); end
      if (exp_v && (os_m !== exp_s_m || ok_m !== exp_k_m)) begin
        failures++; $display("FAIL mid round t=%0d got=%h exp=%h", t, os_m, exp_s_m);
      end
      if (exp_v && (os_l !== exp_s_l || ok_l !== exp_k_l)) begin
        failures++; $display("FAIL last round t=%0d got=%h exp=%h", t, os_l, exp_s_l);
      end
    end
    // synchronous reset clears valid
    @(negedge clk);
    in_valid = 1'b1;
    rst_n = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (ov_m !== 1'b0 || ov_l !== 1'b0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
