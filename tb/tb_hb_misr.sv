// tb_hb_misr: feeds random scan-out vectors into the 8-bit MISR and
// compares the signature with a bit-level model of the shift/XOR structure;
// checks hold when en is low and clear.
module tb_hb_misr;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clear = 1'b0;
  logic [7:0] scan_out, signature, m, nm;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hb_misr #(.WIDTH(8)) u_dut (.clk, .rst_n, .en, .clear, .scan_out, .signature);

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    scan_out = '0;
    m = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      scan_out = 8'($urandom);
      en = ($urandom % 4 != 0);
      clear = (n % 97 == 50);
      @(negedge clk);
      if (clear) m = '0;
      else if (en) begin
        nm[0] = scan_out[0] ^ m[7] ^ m[0];
        for (int i = 1; i < 8; i++) nm[i] = m[i-1] ^ scan_out[i];
        m = nm;
      end
      checks++;
      if (signature !== m) begin
        failures++;
        $display("signature %h expected %h", signature, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
