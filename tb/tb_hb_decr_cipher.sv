// tb_hb_decr_cipher: encrypts random words with the reference E_K and
// checks that the inverse cipher returns the original word one cycle after
// load, for the single-S-box and the four-S-box variants.
module tb_hb_decr_cipher;
  import hb_pkg::*;
  import hb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  word_t din_s, din_f;
  logic [63:0] key;
  word_t dout_s, dout_f;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hb_decr_cipher #(.SINGLE_SBOX(1'b1)) u_single (
    .clk, .rst_n, .load, .din(din_s), .key(subkey_t'(key)), .dout(dout_s)
  );
  hb_decr_cipher #(.SINGLE_SBOX(1'b0)) u_four (
    .clk, .rst_n, .load, .din(din_f), .key(subkey_t'(key)), .dout(dout_f)
  );

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [15:0] x;
    din_s = '0;
    din_f = '0;
    key   = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      x     = 16'($urandom);
      key   = {$urandom, $urandom};
      din_s = ref_e(x, key, 1'b1);
      din_f = ref_e(x, key, 1'b0);
      load  = 1'b1;
      @(negedge clk);
      load  = 1'b0;
      din_s = 16'($urandom);
      din_f = 16'($urandom);
      #1;
      checks += 2;
      if (dout_s != x) begin
        failures++;
        $display("single: D = %h, expected %h", dout_s, x);
      end
      if (dout_f != x) begin
        failures++;
        $display("four: D = %h, expected %h", dout_f, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
