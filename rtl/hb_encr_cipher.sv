// hb_encr_cipher: partially unrolled 16-bit Hummingbird block cipher E_K.
//
// E_K runs four regular rounds (key XOR, S-boxes, linear transform) with the
// round keys k1..k4, then a final round: XOR with k1^k3, substitution, XOR
// with k2^k4. Instead of one round per clock (looped) or all rounds in one
// clock (unrolled), two regular rounds are built in hardware and used twice:
//   cycle 0 (load = 1): R1 <= round(round(din, k1), k2)
//   cycle 1 (load = 0): dout = final(round(round(R1, k3), k4))
// Hardware: 2 rounds (2 key XORs, 8 S-boxes, 2 linear transforms), the final
// round (4 S-boxes, 2 XORs), an input multiplexer (din or R1) and a key
// multiplexer (k1,k2 or k3,k4): 12 S-boxes and 2 linear transforms in all.
// Timing: dout is valid, combinationally from R1, in the cycle after load;
// a new word can be loaded every second cycle. The two-rounds-per-pass split
// and the one-cycle handoff are this design's reading of the document's
// partially unrolled cipher; the round function and key use follow the
// algorithm.
module hb_encr_cipher
  import hb_pkg::*;
#(
  parameter bit SINGLE_SBOX = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,   // start a new word: din is sampled this cycle
  input  word_t   din,
  input  subkey_t key,    // held for both cycles
  output word_t   dout    // result, valid the cycle after load
);

  word_t r1;
  word_t pair_in, mid, pair_out, ka, kb, fin_sub;

  // Input and key multiplexers of the shared round pair.
  always_comb begin
    pair_in = load ? din    : r1;
    ka      = load ? key.k1 : key.k3;
    kb      = load ? key.k2 : key.k4;
  end

  hb_round #(.SINGLE_SBOX(SINGLE_SBOX)) u_round_a (.x(pair_in), .k(ka), .y(mid));
  hb_round #(.SINGLE_SBOX(SINGLE_SBOX)) u_round_b (.x(mid), .k(kb), .y(pair_out));

  // Final round: key mixing, substitution, key mixing; no linear transform.
  hb_sub_layer #(.SINGLE_SBOX(SINGLE_SBOX)) u_final_sub (
    .x(pair_out ^ key.k1 ^ key.k3), .y(fin_sub)
  );
  assign dout = fin_sub ^ key.k2 ^ key.k4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    r1 <= '0;
    else if (load) r1 <= pair_out;
  end

endmodule
