// tb_hb_encr_cipher: drives random words and sub-keys through the
// partially unrolled E_K (both the single-S-box and the four-S-box
// variants) and checks the result, one cycle after load, against the
// round-by-round reference. Also checks that dout is not yet the result in
// the load cycle, and that R1 is held while load is low.
module tb_hb_encr_cipher;
  import hb_pkg::*;
  import hb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  word_t din;
  logic [63:0] key;
  word_t dout_s, dout_f;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hb_encr_cipher #(.SINGLE_SBOX(1'b1)) u_single (
    .clk, .rst_n, .load, .din, .key(subkey_t'(key)), .dout(dout_s)
  );
  hb_encr_cipher #(.SINGLE_SBOX(1'b0)) u_four (
    .clk, .rst_n, .load, .din, .key(subkey_t'(key)), .dout(dout_f)
  );

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [15:0] es, ef;
    din = '0;
    key = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      din  = 16'($urandom);
      key  = {$urandom, $urandom};
      load = 1'b1;
      es   = ref_e(din, key, 1'b1);
      ef   = ref_e(din, key, 1'b0);
      @(negedge clk);
      load = 1'b0;
      din  = 16'($urandom);   // must not matter any more
      #1;
      checks += 2;
      if (dout_s != es) begin
        failures++;
        $display("single: E = %h, expected %h", dout_s, es);
      end
      if (dout_f != ef) begin
        failures++;
        $display("four: E = %h, expected %h", dout_f, ef);
      end
      // Hold for a cycle: the result must stay while load is low.
      if (n % 7 == 0) begin
        @(negedge clk);
        checks++;
        if (dout_s != es) begin
          failures++;
          $display("result not held");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
