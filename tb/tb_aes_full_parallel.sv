// tb_aes_full_parallel: end-to-end test of the AES-128 engine at its only
// configuration.
//
// The encryption channel gets the FIPS-197 vectors and then a stream of random
// plaintexts, each with its own random key, mostly back to back. Every
// ciphertext it produces is fed, with its key, straight into the decryption
// channel on the next clock and must come back as the original plaintext. On
// clocks with no ciphertext to return, the decryption channel gets a random
// ciphertext and key of its own, checked against the reference. Both
// channels therefore run at the same time. All outputs must arrive exactly
// 11 (encryption) or 20 (decryption) clocks after their input.
//
// Counted events, each of which must happen at least once: blocks encrypted,
// blocks decrypted, encrypt-then-decrypt round trips, clocks with both
// channels accepting a block, back-to-back inputs, key changes between
// consecutive blocks, idle clocks between blocks.
module tb_aes_full_parallel;
  import aes_ref_pkg::*;
  localparam int ENC_LAT = 11;
  localparam int DEC_LAT = 20;
  localparam int N       = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic         enc_in_valid = 1'b0, dec_in_valid = 1'b0;
  logic [127:0] enc_pt = '0, enc_key = '0, dec_ct = '0, dec_key = '0;
  logic         enc_out_valid, dec_out_valid;
  logic [127:0] enc_ct, dec_pt;

  int checks = 0, failures = 0, cycle = 0;
  int n_enc = 0, n_dec = 0, n_round_trip = 0, n_both = 0, n_back_to_back = 0;
  int n_key_change = 0, n_idle = 0;

  typedef struct {
    logic [127:0] data;
    logic [127:0] key;
    logic [127:0] orig;
    int           due;
    bit           round_trip;
  } item_t;
  item_t enc_q [$];
  item_t dec_q [$];
  item_t ret_q [$];   // ciphertexts waiting to be sent back through decryption

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  aes_full_parallel dut (
    .clk(clk), .rst_n(rst_n),
    .enc_in_valid(enc_in_valid), .enc_pt(enc_pt), .enc_key(enc_key),
    .enc_out_valid(enc_out_valid), .enc_ct(enc_ct),
    .dec_in_valid(dec_in_valid), .dec_ct(dec_ct), .dec_key(dec_key),
    .dec_out_valid(dec_out_valid), .dec_pt(dec_pt));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- output checkers ----
  always @(posedge clk) begin
    if (rst_n && enc_out_valid) begin
      item_t it;
      checks++;
      if (enc_q.size() == 0) begin
        failures++; $display("FAIL unexpected ciphertext");
      end else begin
        it = enc_q.pop_front();
        if (enc_ct !== it.data) begin failures++; $display("FAIL enc got=%h exp=%h", enc_ct, it.data); end
        if (cycle != it.due)    begin failures++; $display("FAIL enc latency %0d vs %0d", cycle, it.due); end
        n_enc++;
        it.data = enc_ct;
        ret_q.push_back(it);
      end
    end
    if (rst_n && dec_out_valid) begin
      item_t it;
      checks++;
      if (dec_q.size() == 0) begin
        failures++; $display("FAIL unexpected plaintext");
      end else begin
        it = dec_q.pop_front();
        if (dec_pt !== it.orig) begin failures++; $display("FAIL dec got=%h exp=%h", dec_pt, it.orig); end
        if (cycle != it.due)    begin failures++; $display("FAIL dec latency %0d vs %0d", cycle, it.due); end
        n_dec++;
        if (it.round_trip) n_round_trip++;
      end
    end
  end

  // ---- stimulus ----
  initial begin
    logic [127:0] fips_pt [2];
    logic [127:0] fips_key [2];
    logic [127:0] fips_ct [2];
    logic [127:0] prev_key;
    bit prev_valid;
    fips_pt[0]  = 128'h3243f6a8885a308d313198a2e0370734;
    fips_key[0] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    fips_ct[0]  = 128'h3925841d02dc09fbdc118597196a0b32;
    fips_pt[1]  = 128'h00112233445566778899aabbccddeeff;
    fips_key[1] = 128'h000102030405060708090a0b0c0d0e0f;
    fips_ct[1]  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    prev_key = '0;
    prev_valid = 1'b0;

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int t = 0; t < N + ENC_LAT + DEC_LAT + 10; t++) begin
      @(negedge clk);
      // encryption input
      enc_in_valid = 1'b0;
      if (t < N && (t % 29 != 13)) begin
        item_t it;
        logic [127:0] k;
        enc_pt = (t < 2) ? fips_pt[t] : rand128();
        // keep the key for a few blocks at a time, then change it
        k = (t < 2) ? fips_key[t] : ((t % 4 == 0) ? rand128() : prev_key);
        enc_key = k;
        enc_in_valid = 1'b1;
        it.data = (t < 2) ? fips_ct[t] : ref_encrypt(enc_pt, k);
        it.key = k;
        it.orig = enc_pt;
        it.due = cycle + ENC_LAT;
        it.round_trip = 1'b0;
        enc_q.push_back(it);
        if (prev_valid) n_back_to_back++;
        if (prev_valid && k != prev_key) n_key_change++;
        prev_key = k;
      end else if (t < N) begin
        n_idle++;
      end
      prev_valid = enc_in_valid;

      // decryption input: returned ciphertext first, otherwise a random one
      dec_in_valid = 1'b0;
      if (ret_q.size() != 0) begin
        item_t it;
        it = ret_q.pop_front();
        dec_ct = it.data;
        dec_key = it.key;
        dec_in_valid = 1'b1;
        it.due = cycle + DEC_LAT;
        it.round_trip = 1'b1;
        dec_q.push_back(it);
      end else if (t < N && (t % 3 != 0)) begin
        item_t it;
        dec_ct = rand128();
        dec_key = rand128();
        dec_in_valid = 1'b1;
        it.data = dec_ct;
        it.key = dec_key;
        it.orig = ref_decrypt(dec_ct, dec_key);
        it.due = cycle + DEC_LAT;
        it.round_trip = 1'b0;
        dec_q.push_back(it);
      end
      if (enc_in_valid && dec_in_valid) n_both++;
    end
    @(negedge clk);
    enc_in_valid = 1'b0;
    dec_in_valid = 1'b0;
    repeat (DEC_LAT + ENC_LAT + 5) @(posedge clk);
    #1;

    checks++;
    if (enc_q.size() != 0 || dec_q.size() != 0 || ret_q.size() != 0) begin
      failures++; $display("FAIL blocks still outstanding");
    end
    $display("events: encrypted=%0d decrypted=%0d round_trips=%0d both_channels=%0d back_to_back=%0d key_changes=%0d idle=%0d",
             n_enc, n_dec, n_round_trip, n_both, n_back_to_back, n_key_change, n_idle);
    checks += 7;
    if (n_enc == 0)          begin failures++; $display("FAIL no encryption"); end
    if (n_dec == 0)          begin failures++; $display("FAIL no decryption"); end
    if (n_round_trip == 0)   begin failures++; $display("FAIL no round trip"); end
    if (n_both == 0)         begin failures++; $display("FAIL channels never used together"); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back blocks"); end
    if (n_key_change == 0)   begin failures++; $display("FAIL key never changed"); end
    if (n_idle == 0)         begin failures++; $display("FAIL no idle clock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
