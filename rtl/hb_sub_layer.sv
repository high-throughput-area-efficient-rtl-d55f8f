// hb_sub_layer: substitution step on a 16-bit word, four 4-bit S-boxes.
//
// Nibble A (bits 15:12) goes through S-box 1, B through S2, C through S3 and
// D (bits 3:0) through S4. With SINGLE_SBOX set, as in the proposed
// architecture, the S3 table is used for all four nibbles because it is the
// cheapest of the four to build. INVERSE gives the inverse layer.
// Combinational.
module hb_sub_layer
  import hb_pkg::*;
#(
  parameter bit SINGLE_SBOX = 1'b1,
  parameter bit INVERSE     = 1'b0
) (
  input  word_t x,
  output word_t y
);

  for (genvar n = 0; n < 4; n++) begin : g_nib
    // n = 0 is nibble A (bits 15:12), which uses S-box 1.
    hb_sbox #(.WHICH(SINGLE_SBOX ? 3 : n + 1), .INVERSE(INVERSE)) u_sbox (
      .x(x[15 - 4*n -: 4]),
      .y(y[15 - 4*n -: 4])
    );
  end

endmodule
