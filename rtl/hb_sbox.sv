// hb_sbox: one 4-bit Hummingbird S-box, forward or inverse.
//
// WHICH selects table S1..S4 of the algorithm; INVERSE selects the inverse
// permutation, used by the decryption cipher. Purely combinational: y follows
// x in the same cycle. The tables are the document's; the inverse tables are
// computed from them at elaboration, not stored separately.
module hb_sbox
  import hb_pkg::*;
#(
  parameter int unsigned WHICH   = 3,
  parameter bit          INVERSE = 1'b0
) (
  input  logic [3:0] x,
  output logic [3:0] y
);

  always_comb begin
    if (INVERSE) y = sbox_inv(WHICH, x);
    else         y = sbox_fwd(WHICH, x);
  end

endmodule
