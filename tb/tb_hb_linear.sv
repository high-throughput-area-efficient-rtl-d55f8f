// tb_hb_linear: checks L(x) = x ^ (x<<<6) ^ (x<<<10) against a bitwise
// rotation model, and that the inverse instance undoes it.
module tb_hb_linear;
  import hb_ref_pkg::*;

  logic [15:0] x, yf, yi, yfi;
  int checks = 0, failures = 0;

  hb_linear #(.INVERSE(1'b0)) u_fwd (.x(x), .y(yf));
  hb_linear #(.INVERSE(1'b1)) u_inv (.x(x), .y(yi));
  hb_linear #(.INVERSE(1'b1)) u_chain (.x(yf), .y(yfi));

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      x = (n < 16) ? 16'(1 << n) : 16'($urandom);
      #1;
      checks += 3;
      if (yf != ref_lin(x)) begin
        failures++;
        $display("L(%h) = %h, expected %h", x, yf, ref_lin(x));
      end
      if (yfi != x) begin
        failures++;
        $display("Linv(L(%h)) = %h", x, yfi);
      end
      if (ref_lin(yi) != x) begin
        failures++;
        $display("L(Linv(%h)) != x", x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
