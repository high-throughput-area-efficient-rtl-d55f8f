// tb_hb_sbox: exhaustive check of the four S-boxes and their inverses
// against the tables of the reference model.
module tb_hb_sbox;
  import hb_ref_pkg::*;

  logic [3:0] x;
  logic [3:0] yf[4];
  logic [3:0] yi[4];
  int checks = 0, failures = 0;

  for (genvar w = 0; w < 4; w++) begin : g_box
    hb_sbox #(.WHICH(w + 1), .INVERSE(1'b0)) u_fwd (.x(x), .y(yf[w]));
    hb_sbox #(.WHICH(w + 1), .INVERSE(1'b1)) u_inv (.x(x), .y(yi[w]));
  end

  initial begin
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      for (int w = 0; w < 4; w++) begin
        checks++;
        if (int'(yf[w]) != ref_sbox(w + 1, v)) begin
          failures++;
          $display("S%0d(%h) = %h, expected %h", w + 1, v, yf[w], ref_sbox(w + 1, v));
        end
        checks++;
        if (ref_sbox(w + 1, int'(yi[w])) != v) begin
          failures++;
          $display("S%0d inverse(%h) = %h is wrong", w + 1, v, yi[w]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
