// tb_hb_example: the example operation of the design, at default
// parameters: the plaintext word 0x2345 under the 256-bit key
// 1101_2090_1010_9292_8484_1111_2222_7676_4646_7575_3456_9876_2876_0900_9000_1111
// (hex, most significant first) is encrypted and decrypted again. The nonce
// used with that example is not known, so a fixed nonce is chosen here; the
// ciphertext is checked against the reference model and the round trip must
// return 0x2345. A stream of 64 further words is then sent back to back and
// the sustained rate is measured: one 16-bit word per 8 clock cycles, i.e.
// 2 bits per cycle (about 140 Mbit/s at a 70 MHz clock).
module tb_hb_example;
  import hb_ref_pkg::*;

  localparam logic [255:0] KEY =
    256'h1101_2090_1010_9292_8484_1111_2222_7676_4646_7575_3456_9876_2876_0900_9000_1111;
  localparam logic [63:0] NONCE = 64'h0123_4567_89ab_cdef;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enc_start = 1'b0, dec_start = 1'b0, enc_pt_valid = 1'b0, dec_ct_valid = 1'b0;
  logic enc_init_done, enc_pt_ready, enc_ct_valid, dec_init_done, dec_ct_ready, dec_pt_valid;
  logic [15:0] enc_pt = '0, enc_ct, dec_ct = '0, dec_pt;
  logic [7:0] misr_signature;
  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  hb_top u_dut (
    .clk, .rst_n, .key(KEY), .nonce(NONCE),
    .enc_start, .enc_init_done, .enc_pt_valid, .enc_pt_ready, .enc_pt,
    .enc_ct_valid, .enc_ct,
    .dec_start, .dec_init_done, .dec_ct_valid, .dec_ct_ready, .dec_ct,
    .dec_pt_valid, .dec_pt,
    .test_mode(1'b0), .misr_clear(1'b0), .scan_out(8'h00), .misr_signature
  );

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // Collect ciphertexts and plaintexts as they appear.
  logic [15:0] cts[$], pts[$];
  longint first_ct, last_ct;
  always @(posedge clk) begin
    if (rst_n && enc_ct_valid) begin
      if (cts.size() == 0) first_ct = cycle;
      last_ct = cycle;
      cts.push_back(enc_ct);
    end
    if (rst_n && dec_pt_valid) pts.push_back(dec_pt);
  end

  initial begin
    hb_model m;
    logic [15:0] words[$];
    m = new();
    m.init(KEY, NONCE);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    enc_start = 1'b1;
    dec_start = 1'b1;
    @(negedge clk);
    enc_start = 1'b0;
    dec_start = 1'b0;
    while (!enc_init_done) @(negedge clk);
    words.push_back(16'h2345);
    for (int i = 0; i < 64; i++) words.push_back(16'($urandom));
    // Encrypt: hold each word until it is taken.
    foreach (words[i]) begin
      enc_pt = words[i];
      enc_pt_valid = 1'b1;
      #4;
      while (!enc_pt_ready) begin
        @(negedge clk);
        #4;
      end
      @(negedge clk);
    end
    enc_pt_valid = 1'b0;
    while (cts.size() < words.size()) @(negedge clk);
    chk("example ct (reference model)", cts[0], m.encrypt(16'h2345));
    $display("example: PT 2345 -> CT %h", cts[0]);
    for (int i = 1; i < words.size(); i++) chk("stream ct", cts[i], m.encrypt(words[i]));
    chk("cycles per word", (last_ct - first_ct) / (words.size() - 1), 8);
    // Decrypt the same stream.
    foreach (cts[i]) begin
      dec_ct = cts[i];
      dec_ct_valid = 1'b1;
      #4;
      while (!dec_ct_ready) begin
        @(negedge clk);
        #4;
      end
      @(negedge clk);
    end
    dec_ct_valid = 1'b0;
    while (pts.size() < words.size()) @(negedge clk);
    chk("example round trip", pts[0], 16'h2345);
    foreach (words[i]) chk("stream round trip", pts[i], words[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
