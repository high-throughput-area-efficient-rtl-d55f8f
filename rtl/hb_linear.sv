// hb_linear: the 16-bit linear transform of a Hummingbird round.
//
// Forward: y = x ^ (x <<< 6) ^ (x <<< 10) (rotations to the left), as in the
// document's equation. INVERSE gives the inverse map used in decryption,
// y = x ^ (x <<< 2) ^ (x <<< 4) ^ (x <<< 12) ^ (x <<< 14), worked out as the
// inverse of 1 + z^6 + z^10 modulo z^16 + 1. Combinational, XOR gates only.
module hb_linear
  import hb_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  word_t x,
  output word_t y
);

  assign y = INVERSE ? lin_inv(x) : lin_fwd(x);

endmodule
