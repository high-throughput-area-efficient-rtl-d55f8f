// hb_pkg: constants and pure functions shared by the Hummingbird datapath.
//
// Hummingbird works on 16-bit words. A 256-bit key is split into four 64-bit
// sub-keys K1..K4, one per block cipher E_K1..E_K4; each sub-key is split into
// four 16-bit round keys k1..k4 (k1 in the most significant bits). The
// substitution layer applies four 4-bit S-boxes to the four nibbles of a word
// (nibble A = bits 15:12 goes to S-box 1, ... nibble D = bits 3:0 to S-box 4).
// The four S-box tables and the linear transform L follow the document; the
// inverse S-boxes and the inverse of L are derived from them. The LFSR
// feedback polynomial and the seeding of the LFSR from TV are not given by the
// document and follow the published Hummingbird definition.
package hb_pkg;

  typedef logic [15:0] word_t;

  // One 64-bit sub-key as four 16-bit round keys, k1 in bits 63:48.
  typedef struct packed {
    word_t k1;
    word_t k2;
    word_t k3;
    word_t k4;
  } subkey_t;

  // S-box tables, entry n held in bits 4n+3:4n.
  localparam logic [63:0] SBOX1 = 64'h3d07_42be_9ac1_f568;
  localparam logic [63:0] SBOX2 = 64'h94cf_6da3_28b5_1e70;
  localparam logic [63:0] SBOX3 = 64'hd370_864b_a91c_5fe2;
  localparam logic [63:0] SBOX4 = 64'h5982_b6ed_fa1c_4370;


  // LFSR: f(x) = x^16 + x^15 + x^12 + x^10 + x^7 + x^3 + 1, shifting right,
  // feedback = XOR of the state bits selected by this mask.
  localparam word_t LFSR_TAPS = 16'h9489;
  // Bit forced to one when the LFSR is seeded, so the state is never zero.
  localparam word_t LFSR_SEED_OR = 16'h1000;

  // Operand chosen as the first addend of the block-cipher input.
  typedef enum logic [1:0] {
    DS_RS1 = 2'd0,   // initialization: RS1 (added to RS3)
    DS_IN  = 2'd1,   // first block cipher of a data block: plaintext / ciphertext
    DS_FB  = 2'd2    // later block ciphers: result of the previous one
  } data_sel_e;

  function automatic logic [3:0] sbox_fwd(input int unsigned which, input logic [3:0] x);
    logic [63:0] t;
    case (which)
      1:       t = SBOX1;
      2:       t = SBOX2;
      4:       t = SBOX4;
      default: t = SBOX3;
    endcase
    return t[4*x +: 4];
  endfunction

  // Inverse table of a 4-bit permutation, evaluated at elaboration.
  function automatic logic [63:0] invert_table(input logic [63:0] t);
    logic [63:0] r;
    r = '0;
    for (int unsigned i = 0; i < 16; i++) r[4*t[4*i +: 4] +: 4] = 4'(i);
    return r;
  endfunction

  localparam logic [63:0] SBOX1_INV = invert_table(SBOX1);
  localparam logic [63:0] SBOX2_INV = invert_table(SBOX2);
  localparam logic [63:0] SBOX3_INV = invert_table(SBOX3);
  localparam logic [63:0] SBOX4_INV = invert_table(SBOX4);

  function automatic logic [3:0] sbox_inv(input int unsigned which, input logic [3:0] y);
    logic [63:0] t;
    case (which)
      1:       t = SBOX1_INV;
      2:       t = SBOX2_INV;
      4:       t = SBOX4_INV;
      default: t = SBOX3_INV;
    endcase
    return t[4*y +: 4];
  endfunction

  function automatic word_t rotl(input word_t x, input int unsigned n);
    return (x << n) | (x >> (16 - n));
  endfunction

  // Eq. (1): L(x) = x ^ (x <<< 6) ^ (x <<< 10).
  function automatic word_t lin_fwd(input word_t x);
    return x ^ rotl(x, 6) ^ rotl(x, 10);
  endfunction

  // Inverse of L over GF(2)[z]/(z^16+1): x ^ (x<<<2) ^ (x<<<4) ^ (x<<<12) ^ (x<<<14).
  function automatic word_t lin_inv(input word_t x);
    return x ^ rotl(x, 2) ^ rotl(x, 4) ^ rotl(x, 12) ^ rotl(x, 14);
  endfunction

  function automatic subkey_t subkey(input logic [255:0] key, input int unsigned i);
    return subkey_t'(key[255 - 64*i -: 64]);
  endfunction

endpackage
