// tb_hb_decryption: runs the decryption core (single-S-box and four-S-box
// builds) on ciphertext produced by the reference model: start with a random
// key and nonce, check that initialization takes 32 cycles, then decrypt
// words with random gaps and back to back, checking that every plaintext is
// recovered, the 9-cycle latency from acceptance to pt_valid and the 8-cycle
// spacing of back-to-back words. Three sessions, each with a new key and
// nonce.
module tb_hb_decryption;
  import hb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [255:0] key;
  logic [63:0] nonce;
  logic start = 1'b0, pt_valid = 1'b0;
  logic [15:0] cin[2];
  logic init_done[2], pt_ready[2], ct_valid[2];
  logic [15:0] ct[2];
  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  hb_decryption #(.SINGLE_SBOX(1'b1)) u_single (
    .clk, .rst_n, .key, .nonce, .start, .init_done(init_done[0]),
    .ct_valid(pt_valid), .ct_ready(pt_ready[0]), .ct(cin[0]), .pt_valid(ct_valid[0]), .pt(ct[0])
  );
  hb_decryption #(.SINGLE_SBOX(1'b0)) u_four (
    .clk, .rst_n, .key, .nonce, .start, .init_done(init_done[1]),
    .ct_valid(pt_valid), .ct_ready(pt_ready[1]), .ct(cin[1]), .pt_valid(ct_valid[1]), .pt(ct[1])
  );

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0d %s: got %0h expected %0h", cycle, what, got, exp);
    end
  endtask

  // Result checker: expected ciphertexts and acceptance cycles in queues.
  logic [15:0] exp_q[2][$];
  longint acc_q[$];
  longint last_acc = -100;
  int back_to_back = 0;

  always @(posedge clk) begin
    if (rst_n && pt_valid && pt_ready[0]) begin
      if (cycle - last_acc == 8) back_to_back++;
      last_acc = cycle;
      acc_q.push_back(cycle);
    end
    for (int i = 0; i < 2; i++)
      if (rst_n && ct_valid[i]) begin
        if (exp_q[i].size() == 0) chk("unexpected ct", 1, 0);
        else chk($sformatf("ct[%0d]", i), ct[i], exp_q[i].pop_front());
        if (i == 0) chk("latency", cycle - acc_q.pop_front(), 9);
      end
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    hb_model ms, mf;
    longint t0;
    logic [15:0] plain;
    key = '0;
    nonce = '0;
    cin[0] = '0;
    cin[1] = '0;
    ms = new(1'b1);
    mf = new(1'b0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++) begin
      @(negedge clk);
      key = rand_key();
      nonce = {$urandom, $urandom};
      ms.init(key, nonce);
      mf.init(key, nonce);
      start = 1'b1;
      t0 = cycle;
      @(negedge clk);
      start = 1'b0;
      while (!init_done[0]) @(negedge clk);
      chk("init cycles", cycle - t0, 33);
      chk("init both", init_done[1], 1);
      for (int w = 0; w < 40; w++) begin
        // pt_valid/ct_valid name the TB's handshake; the cores take
        // ciphertext cin and return plaintext ct[].
        plain = 16'($urandom);
        cin[0] = ms.encrypt(plain);
        cin[1] = mf.encrypt(plain);
        exp_q[0].push_back(plain);
        exp_q[1].push_back(plain);
        pt_valid = 1'b1;
        @(posedge clk);
        while (!pt_ready[0]) @(posedge clk);
        @(negedge clk);
        pt_valid = 1'b0;
        // First half of a session back to back, then random gaps.
        if (w >= 20) repeat ($urandom % 12) @(negedge clk);
      end
      while (exp_q[0].size() != 0) @(negedge clk);
      repeat (3) @(negedge clk);
    end
    chk("back-to-back words seen", back_to_back > 30, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
