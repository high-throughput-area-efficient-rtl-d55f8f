// hb_decr_cipher: partially unrolled 16-bit inverse block cipher D_K.
//
// D_K undoes E_K: it first undoes the final round (XOR k2^k4, inverse
// S-boxes, XOR k1^k3), then the four regular rounds in reverse order, each
// as y = S^-1(L^-1(x)) ^ k. As in the encryption cipher, two inverse rounds
// are built and used twice:
//   cycle 0 (load = 1): R1 <= inv_round(inv_round(inv_final(din), k4), k3)
//   cycle 1 (load = 0): dout = inv_round(inv_round(R1, k2), k1)
// Timing: dout is valid, combinationally from R1, in the cycle after load.
// The document gives only the function (decryption is the reverse of
// encryption); the inverse tables and the arrangement mirroring the
// encryption cipher are this design's.
module hb_decr_cipher
  import hb_pkg::*;
#(
  parameter bit SINGLE_SBOX = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  word_t   din,
  input  subkey_t key,
  output word_t   dout
);

  word_t r1;
  word_t fin_sub, fin_out, pair_in, mid, pair_out, ka, kb;

  hb_sub_layer #(.SINGLE_SBOX(SINGLE_SBOX), .INVERSE(1'b1)) u_final_sub (
    .x(din ^ key.k2 ^ key.k4), .y(fin_sub)
  );
  assign fin_out = fin_sub ^ key.k1 ^ key.k3;

  always_comb begin
    pair_in = load ? fin_out : r1;
    ka      = load ? key.k4  : key.k2;
    kb      = load ? key.k3  : key.k1;
  end

  hb_round #(.SINGLE_SBOX(SINGLE_SBOX), .INVERSE(1'b1)) u_round_a (.x(pair_in), .k(ka), .y(mid));
  hb_round #(.SINGLE_SBOX(SINGLE_SBOX), .INVERSE(1'b1)) u_round_b (.x(mid), .k(kb), .y(pair_out));

  assign dout = pair_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    r1 <= '0;
    else if (load) r1 <= pair_out;
  end

endmodule
