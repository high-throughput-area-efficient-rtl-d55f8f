// tb_hb_top: end-to-end test of the chip top at its default parameters.
//
// Plaintext words go into the encryption core; every ciphertext it produces
// is checked against the reference model and passed on to the decryption
// core, whose output must be the original plaintext. Three sessions are run,
// each with a new key and nonce and with the two cores started a few cycles
// apart. Inputs are offered with random gaps, sometimes back to back and
// sometimes while the core is still busy (so the word waits), a start is
// issued while a core is busy (and must be ignored), and the MISR compacts
// random scan-out vectors while test_mode is high, with one clear per
// session. Each of these events is counted and must occur at least once.
// Inputs are driven on the falling clock edge; handshakes are sampled just
// before the rising edge.
module tb_hb_top;
  import hb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [255:0] key;
  logic [63:0] nonce;
  logic enc_start, enc_init_done, enc_pt_valid, enc_pt_ready, enc_ct_valid;
  logic dec_start, dec_init_done, dec_ct_valid, dec_ct_ready, dec_pt_valid;
  logic [15:0] enc_pt, enc_ct, dec_ct, dec_pt;
  logic test_mode, misr_clear;
  logic [7:0] scan_out, misr_signature, misr_model, nm;
  int checks = 0, failures = 0;
  longint cycle = 0;

  // Mechanism counters.
  int n_init = 0, n_rekey = 0, n_b2b = 0, n_wait = 0, n_gap = 0, n_ignored = 0;
  int n_lfsr_step = 0, n_misr = 0, n_misr_clear = 0, n_roundtrip = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  hb_top u_dut (
    .clk, .rst_n, .key, .nonce,
    .enc_start, .enc_init_done, .enc_pt_valid, .enc_pt_ready, .enc_pt,
    .enc_ct_valid, .enc_ct,
    .dec_start, .dec_init_done, .dec_ct_valid, .dec_ct_ready, .dec_ct,
    .dec_pt_valid, .dec_pt,
    .test_mode, .misr_clear, .scan_out, .misr_signature
  );

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0d %s: got %0h expected %0h", cycle, what, got, exp);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  hb_model model;
  logic [15:0] plain_q[$];     // plaintext sent, awaiting encryption
  logic [15:0] exp_ct_q[$];    // expected ciphertext
  logic [15:0] ct_fifo[$];     // ciphertext waiting for the decryption core
  logic [15:0] round_q[$];     // plaintext expected back from decryption
  int words_left, enc_gap, dec_gap;
  longint last_enc_acc;
  bit enc_waiting, enc_acc, dec_acc;

  initial begin
    model = new();
    key = '0; nonce = '0;
    {enc_start, enc_pt_valid, dec_start, dec_ct_valid, test_mode, misr_clear} = '0;
    enc_pt = '0; dec_ct = '0; scan_out = '0; misr_model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++) begin
      longint t0;
      @(negedge clk);
      key = rand_key();
      nonce = {$urandom, $urandom};
      model.init(key, nonce);
      n_rekey++;
      enc_start = 1'b1;
      t0 = cycle;
      @(negedge clk);
      enc_start = 1'b0;
      repeat (3) @(negedge clk);
      dec_start = 1'b1;
      @(negedge clk);
      dec_start = 1'b0;
      // A second start while initialization runs must change nothing.
      repeat (5) @(negedge clk);
      enc_start = 1'b1;
      n_ignored++;
      @(negedge clk);
      enc_start = 1'b0;
      // Offer the first word early: it must wait for the end of init.
      words_left = 30;
      enc_gap = 0;
      dec_gap = 0;
      last_enc_acc = -100;
      enc_waiting = 1'b0;
      while (words_left > 0 || plain_q.size() > 0 || ct_fifo.size() > 0 ||
             round_q.size() > 0 || dec_ct_valid) begin
        // ---- drive (falling edge) ----
        if (!enc_pt_valid && words_left > 0) begin
          if (enc_gap == 0) begin
            enc_pt = 16'($urandom);
            enc_pt_valid = 1'b1;
            words_left--;
            enc_gap = ($urandom % 3 == 0) ? int'($urandom % 14) : 0;
            if (enc_gap > 0) n_gap++;
          end else enc_gap--;
        end
        if (!dec_ct_valid && ct_fifo.size() > 0) begin
          if (dec_gap == 0) begin
            dec_ct = ct_fifo.pop_front();
            dec_ct_valid = 1'b1;
            dec_gap = ($urandom % 4 == 0) ? int'($urandom % 10) : 0;
          end else dec_gap--;
        end
        test_mode = ($urandom % 2 == 0);
        scan_out = 8'($urandom);
        misr_clear = (cycle % 137 == 0);
        #4;
        // ---- sample (just before the rising edge) ----
        if (enc_pt_valid && !enc_pt_ready) enc_waiting = 1'b1;
        if (enc_pt_valid && enc_pt_ready) begin
          if (cycle - last_enc_acc == 8) n_b2b++;
          if (enc_waiting) n_wait++;
          enc_waiting = 1'b0;
          last_enc_acc = cycle;
          plain_q.push_back(enc_pt);
          exp_ct_q.push_back(model.encrypt(enc_pt));
        end
        if (enc_ct_valid) begin
          logic [15:0] p;
          chk("ct queue", exp_ct_q.size() > 0, 1);
          chk("ct", enc_ct, exp_ct_q.pop_front());
          p = plain_q.pop_front();
          round_q.push_back(p);
          ct_fifo.push_back(enc_ct);
          n_lfsr_step++;
        end
        if (dec_pt_valid) begin
          chk("roundtrip queue", round_q.size() > 0, 1);
          chk("decrypted pt", dec_pt, round_q.pop_front());
          n_roundtrip++;
        end
        if (misr_clear) begin
          misr_model = '0;
          n_misr_clear++;
        end else if (test_mode) begin
          nm[0] = scan_out[0] ^ misr_model[7] ^ misr_model[0];
          for (int i = 1; i < 8; i++) nm[i] = misr_model[i-1] ^ scan_out[i];
          misr_model = nm;
          n_misr++;
        end
        enc_acc = enc_pt_valid && enc_pt_ready;
        dec_acc = dec_ct_valid && dec_ct_ready;
        @(negedge clk);
        if (enc_acc) enc_pt_valid = 1'b0;
        if (dec_acc) dec_ct_valid = 1'b0;
        chk("misr", misr_signature, misr_model);
        if (cycle - t0 == 33) begin
          chk("enc init done after 32 cycles", enc_init_done, 1);
          n_init++;
        end
        if (cycle - t0 == 37) begin
          chk("dec init done", dec_init_done, 1);
          n_init++;
        end
      end
      test_mode = 1'b0;
    end
    chk("inits seen", n_init, 6);
    chk("rekeys", n_rekey > 0, 1);
    chk("back-to-back words", n_b2b > 0, 1);
    chk("words that waited", n_wait > 0, 1);
    chk("idle gaps", n_gap > 0, 1);
    chk("ignored starts", n_ignored > 0, 1);
    chk("lfsr steps", n_lfsr_step, 90);
    chk("roundtrips", n_roundtrip, 90);
    chk("misr compactions", n_misr > 0, 1);
    chk("misr clears", n_misr_clear > 0, 1);
    $display("events: init=%0d rekey=%0d back_to_back=%0d waited=%0d gaps=%0d ignored_start=%0d lfsr_steps=%0d roundtrips=%0d misr=%0d misr_clear=%0d",
             n_init, n_rekey, n_b2b, n_wait, n_gap, n_ignored, n_lfsr_step, n_roundtrip, n_misr, n_misr_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
