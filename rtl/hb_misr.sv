// hb_misr: multiple-input signature register (response compactor).
//
// Compacts WIDTH parallel scan-chain outputs into a WIDTH-bit signature, so
// that intermediate cipher state shifted out in test mode is never seen
// directly on the pins. Each clock with en high:
//   sig[0] <= scan_out[0] ^ fb,  sig[i] <= sig[i-1] ^ scan_out[i] (i > 0),
//   fb = XOR of the signature bits selected by TAPS.
// clear zeroes the signature. The shift structure (stage i fed by stage i-1
// XOR scan out i, last stage fed back to the first) and the eight stages
// follow the document's figure; the feedback tap mask default (last and first
// stage) is this design's reading of that figure.
module hb_misr #(
  parameter int unsigned       WIDTH = 8,
  parameter logic [WIDTH-1:0]  TAPS  = {1'b1, {(WIDTH-2){1'b0}}, 1'b1}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clear,
  input  logic [WIDTH-1:0] scan_out,
  output logic [WIDTH-1:0] signature
);

  logic fb;
  assign fb = ^(signature & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     signature <= '0;
    else if (clear) signature <= '0;
    else if (en)    signature <= {signature[WIDTH-2:0], fb} ^ scan_out;
  end

endmodule
