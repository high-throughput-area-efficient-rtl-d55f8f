// hb_lfsr: 16-bit LFSR that perturbs internal state register RS3.
//
// After initialization the LFSR is seeded with the last TV value with bit 12
// forced to one (so it can never be the all-zero lock-up state); after every
// encrypted or decrypted block it steps once, and the stepped value is added
// into RS3. The register shifts right; the new bit 15 is the XOR of the
// state bits selected by LFSR_TAPS, from x^16+x^15+x^12+x^10+x^7+x^3+1.
// The document names the LFSR, its seeding from TV and its use for RS3; the
// polynomial, the shift direction and the forced bit are taken from the
// published Hummingbird definition. q_next is the stepped value,
// combinationally, so the state update can use it in the stepping cycle.
module hb_lfsr
  import hb_pkg::*;
#(
  parameter word_t TAPS    = LFSR_TAPS,
  parameter word_t SEED_OR = LFSR_SEED_OR
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  seed_load,  // load seed | SEED_OR
  input  word_t seed,
  input  logic  step,       // advance one state
  output word_t q,
  output word_t q_next      // state after one step
);

  assign q_next = {^(q & TAPS), q[15:1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         q <= SEED_OR;
    else if (seed_load) q <= seed | SEED_OR;
    else if (step)      q <= q_next;
  end

endmodule
