// tb_hb_ctrl: follows the controller cycle by cycle through initialization
// (4 iterations x 4 ciphers x 2 phases = 32 cycles) and data iterations of
// 8 cycles, for an encryption and a decryption instance, checking the
// selects, the iteration-end strobes, in_ready, back-to-back acceptance and
// that start is ignored while busy.
module tb_hb_ctrl;
  import hb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, in_valid = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  typedef struct packed {
    logic       in_ready, start_accept, in_accept, busy, init_encr, phase;
    logic [1:0] blk, rnd, key_sel, rs_sel;
    data_sel_e  data_sel;
    logic       iter_done, lfsr_seed, out_valid_comb;
  } ctrl_out_t;

  ctrl_out_t e, d;

  hb_ctrl #(.DECRYPT(1'b0)) u_enc (
    .clk, .rst_n, .start, .in_valid, .in_ready(e.in_ready), .start_accept(e.start_accept),
    .in_accept(e.in_accept), .busy(e.busy), .init_encr(e.init_encr), .phase(e.phase),
    .blk(e.blk), .rnd(e.rnd), .key_sel(e.key_sel), .rs_sel(e.rs_sel), .data_sel(e.data_sel),
    .iter_done(e.iter_done), .lfsr_seed(e.lfsr_seed), .out_valid_comb(e.out_valid_comb)
  );
  hb_ctrl #(.DECRYPT(1'b1)) u_dec (
    .clk, .rst_n, .start, .in_valid, .in_ready(d.in_ready), .start_accept(d.start_accept),
    .in_accept(d.in_accept), .busy(d.busy), .init_encr(d.init_encr), .phase(d.phase),
    .blk(d.blk), .rnd(d.rnd), .key_sel(d.key_sel), .rs_sel(d.rs_sel), .data_sel(d.data_sel),
    .iter_done(d.iter_done), .lfsr_seed(d.lfsr_seed), .out_valid_comb(d.out_valid_comb)
  );

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // Checks one busy cycle of both instances (sampled just before the edge).
  task automatic busy_cycle(bit init, int b, int p, int t);
    bit last;
    last = (p == 1) && (b == 3);
    chk("busy", e.busy, 1);             chk("busy d", d.busy, 1);
    chk("phase", e.phase, p);           chk("blk", e.blk, b);
    chk("init_encr", e.init_encr, !init);
    chk("iter_done", e.iter_done, last);
    chk("lfsr_seed", e.lfsr_seed, init && last && t == 3);
    chk("out_valid", e.out_valid_comb, !init && last);
    chk("out_valid d", d.out_valid_comb, !init && last);
    if (init) begin
      chk("key_sel", e.key_sel, b);      chk("key_sel d", d.key_sel, b);
      chk("rs_sel", e.rs_sel, b == 0 ? 2 : b);
      chk("rs_sel d", d.rs_sel, b == 0 ? 2 : b);
      chk("data_sel", int'(e.data_sel), b == 0 ? int'(DS_RS1) : int'(DS_FB));
      chk("in_ready", e.in_ready, 0);
    end else begin
      chk("key_sel", e.key_sel, b);      chk("key_sel d", d.key_sel, 3 - b);
      chk("rs_sel", e.rs_sel, b);        chk("rs_sel d", d.rs_sel, 3 - b);
      chk("data_sel", int'(e.data_sel), b == 0 ? int'(DS_IN) : int'(DS_FB));
      chk("in_ready", e.in_ready, last);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int cycles;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk("idle ready", e.in_ready, 0);
    chk("idle busy", e.busy, 0);
    start = 1'b1;
    #1 chk("start_accept", e.start_accept, 1);
    @(negedge clk);
    start = 1'b0;
    for (int t = 0; t < 4; t++)
      for (int b = 0; b < 4; b++)
        for (int p = 0; p < 2; p++) begin
          // A start while busy must be ignored.
          start = (t == 1 && b == 2 && p == 0);
          #1;
          if (start) chk("start ignored", e.start_accept, 0);
          busy_cycle(1'b1, b, p, t);
          @(negedge clk);
          start = 1'b0;
        end
    chk("init done", e.init_encr, 1);
    chk("ready", e.in_ready, 1);
    chk("not busy", e.busy, 0);
    // Wait a few idle cycles, then stream three words back to back.
    repeat (3) @(negedge clk);
    in_valid = 1'b1;
    cycles = 0;
    #1 chk("accept", e.in_accept, 1);
    @(negedge clk);
    for (int w = 0; w < 3; w++) begin
      in_valid = (w < 2);
      for (int b = 0; b < 4; b++)
        for (int p = 0; p < 2; p++) begin
          #1 busy_cycle(1'b0, b, p, 0);
          if (b == 3 && p == 1) chk("back-to-back accept", e.in_accept, w < 2);
          @(negedge clk);
          cycles++;
        end
    end
    chk("3 words in 24 cycles", cycles, 24);
    chk("idle after", e.busy, 0);
    chk("ready after", e.in_ready, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
