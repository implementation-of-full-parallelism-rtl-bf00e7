// tb_aes_enc_pipeline: the unrolled encryption datapath on the two FIPS-197
// vectors (appendix B and C.1) followed by a stream of random blocks, each with
// its own random key, entered back to back with occasional idle clocks. Every
// output is compared with the reference and must appear exactly 11 clocks
// after its input; the number of outputs must equal the number of inputs.
module tb_aes_enc_pipeline;
  import aes_ref_pkg::*;
  localparam int LAT = 11;
  localparam int N   = 200;
  logic clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic [127:0] din = '0, key = '0;
  logic         out_valid;
  logic [127:0] dout;
  int checks = 0, failures = 0;
  int cycle = 0, n_in = 0, n_out = 0;
  logic [127:0] exp_q [$];
  int           due_q [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  aes_enc_pipeline dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pt(din), .key(key),
    .out_valid(out_valid), .ct(dout));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard: every output must match the oldest outstanding input and
  // arrive on the clock it is due
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output %h", dout);
      end else begin
        logic [127:0] e;
        int due;
        e = exp_q.pop_front();
        due = due_q.pop_front();
        if (dout !== e) begin failures++; $display("FAIL data got=%h exp=%h", dout, e); end
        if (cycle != due) begin failures++; $display("FAIL latency out at %0d due %0d", cycle, due); end
      end
    end
  end

  task automatic send(logic [127:0] d, logic [127:0] k, logic [127:0] e);
    @(negedge clk);
    in_valid = 1'b1;
    din = d;
    key = k;
    exp_q.push_back(e);
    due_q.push_back(cycle + LAT);
    n_in++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    send(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32);
    send(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int t = 0; t < N; t++) begin
      logic [127:0] d, k;
      d = rand128();
      k = rand128();
      if (t % 23 == 7) begin
        @(negedge clk) in_valid = 1'b0;
      end
      send(d, k, ref_encrypt(d, k));
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    #1;
    checks++;
    if (n_out != n_in || exp_q.size() != 0) begin
      failures++; $display("FAIL %0d inputs, %0d outputs", n_in, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
