// hb_round: one regular Hummingbird round (EE unit), combinational.
//
// Forward: y = L(S(x ^ k)): key mixing, substitution, linear transform.
// INVERSE: y = S^-1(L^-1(x)) ^ k, which undoes the forward round with the
// same round key.
module hb_round
  import hb_pkg::*;
#(
  parameter bit SINGLE_SBOX = 1'b1,
  parameter bit INVERSE     = 1'b0
) (
  input  word_t x,
  input  word_t k,
  output word_t y
);

  if (INVERSE) begin : g_inv
    word_t lin_out, sub_out;
    hb_linear #(.INVERSE(1'b1)) u_lin (.x(x), .y(lin_out));
    hb_sub_layer #(.SINGLE_SBOX(SINGLE_SBOX), .INVERSE(1'b1)) u_sub (
      .x(lin_out), .y(sub_out)
    );
    assign y = sub_out ^ k;
  end else begin : g_fwd
    word_t sub_out;
    hb_sub_layer #(.SINGLE_SBOX(SINGLE_SBOX), .INVERSE(1'b0)) u_sub (
      .x(x ^ k), .y(sub_out)
    );
    hb_linear #(.INVERSE(1'b0)) u_lin (.x(sub_out), .y(y));
  end

endmodule
