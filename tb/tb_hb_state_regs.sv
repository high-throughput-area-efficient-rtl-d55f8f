// tb_hb_state_regs: loads random nonces and applies random initialization
// and encryption updates, comparing RS1..RS4 with the update equations.
module tb_hb_state_regs;
  logic clk = 1'b0, rst_n = 1'b0, load_nonce = 1'b0, update = 1'b0, init_encr = 1'b0;
  logic [63:0] nonce;
  logic [15:0] v12, v23, v34, tv, lfsr_next;
  logic [3:0][15:0] rs;
  logic [15:0] m[4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hb_state_regs u_dut (
    .clk, .rst_n, .load_nonce, .nonce, .update, .init_encr,
    .v12, .v23, .v34, .tv, .lfsr_next, .rs
  );

  task automatic compare(string what);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (rs[i] !== m[i]) begin
        failures++;
        $display("%s: RS%0d = %h, expected %h", what, i + 1, rs[i], m[i]);
      end
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    {v12, v23, v34, tv, lfsr_next} = '0;
    nonce = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      nonce = {$urandom, $urandom};
      load_nonce = 1'b1;
      @(negedge clk);
      load_nonce = 1'b0;
      for (int i = 0; i < 4; i++) m[i] = nonce[63 - 16*i -: 16];
      compare("nonce");
      for (int u = 0; u < 8; u++) begin
        v12 = 16'($urandom); v23 = 16'($urandom); v34 = 16'($urandom);
        tv = 16'($urandom); lfsr_next = 16'($urandom);
        init_encr = (u >= 4);
        update = (u != 5);
        @(negedge clk);
        if (update) begin
          if (!init_encr) begin
            m[0] += tv; m[1] += v12; m[2] += v23; m[3] += v34;
          end else begin
            m[0] = m[0] + v34;
            m[2] = m[2] + v23 + lfsr_next;
            m[3] = m[3] + v12 + m[0];
            m[1] = m[1] + v12 + m[3];
          end
        end
        update = 1'b0;
        compare(init_encr ? "encr update" : "init update");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
