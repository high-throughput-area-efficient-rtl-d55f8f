// tb_hb_lfsr: checks seeding (bit 12 forced), single steps and q_next
// against the reference step, holding when idle, and that the sequence has
// the maximal period 65535.
module tb_hb_lfsr;
  import hb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, seed_load = 1'b0, step = 1'b0;
  logic [15:0] seed, q, q_next, expect_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hb_lfsr u_dut (.clk, .rst_n, .seed_load, .seed, .step, .q, .q_next);

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int period;
    seed = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      seed = 16'($urandom);
      seed_load = 1'b1;
      @(negedge clk);
      seed_load = 1'b0;
      expect_q = seed | 16'h1000;
      check("seed", q, expect_q);
      for (int s = 0; s < 10; s++) begin
        check("q_next", q_next, ref_lfsr_step(expect_q));
        step = (s % 3 != 2);
        @(negedge clk);
        if (step) expect_q = ref_lfsr_step(expect_q);
        step = 1'b0;
        check("step", q, expect_q);
      end
    end
    // Period of the sequence from a fixed seed.
    @(negedge clk);
    seed = 16'h1000;
    seed_load = 1'b1;
    @(negedge clk);
    seed_load = 1'b0;
    step = 1'b1;
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (q != 16'h1000 && period < 70000);
    step = 1'b0;
    check("period", 16'(period), 16'd65535);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
