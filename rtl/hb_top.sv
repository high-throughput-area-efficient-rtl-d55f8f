// hb_top: Hummingbird encryption and decryption cores with a scan-response
// compactor, side by side as on one chip.
//
// The encryption core turns a stream of 16-bit plaintext words into
// ciphertext, the decryption core turns ciphertext back into plaintext; both
// share the 256-bit key and the 64-bit nonce, so after both are started
// they hold the same internal state and a word encrypted by one is recovered
// by the other. Each core is started separately (enc_start / dec_start),
// spends 32 cycles on initialization and then takes one word every 8 cycles
// with a valid/ready handshake; its result appears 9 cycles after the word is
// taken. The MISR compacts the outputs of eight scan chains (inserted by the
// test flow, outside this RTL) while test_mode is high and presents an 8-bit
// signature instead of raw register contents.
module hb_top
  import hb_pkg::*;
#(
  parameter bit SINGLE_SBOX = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [255:0] key,
  input  logic [63:0]  nonce,
  // encryption
  input  logic         enc_start,
  output logic         enc_init_done,
  input  logic         enc_pt_valid,
  output logic         enc_pt_ready,
  input  logic [15:0]  enc_pt,
  output logic         enc_ct_valid,
  output logic [15:0]  enc_ct,
  // decryption
  input  logic         dec_start,
  output logic         dec_init_done,
  input  logic         dec_ct_valid,
  output logic         dec_ct_ready,
  input  logic [15:0]  dec_ct,
  output logic         dec_pt_valid,
  output logic [15:0]  dec_pt,
  // scan-response compaction
  input  logic         test_mode,
  input  logic         misr_clear,
  input  logic [7:0]   scan_out,
  output logic [7:0]   misr_signature
);

  hb_encryption #(.SINGLE_SBOX(SINGLE_SBOX)) u_enc (
    .clk, .rst_n, .key, .nonce, .start(enc_start), .init_done(enc_init_done),
    .pt_valid(enc_pt_valid), .pt_ready(enc_pt_ready), .pt(enc_pt),
    .ct_valid(enc_ct_valid), .ct(enc_ct)
  );

  hb_decryption #(.SINGLE_SBOX(SINGLE_SBOX)) u_dec (
    .clk, .rst_n, .key, .nonce, .start(dec_start), .init_done(dec_init_done),
    .ct_valid(dec_ct_valid), .ct_ready(dec_ct_ready), .ct(dec_ct),
    .pt_valid(dec_pt_valid), .pt(dec_pt)
  );

  hb_misr #(.WIDTH(8)) u_misr (
    .clk, .rst_n, .en(test_mode), .clear(misr_clear), .scan_out,
    .signature(misr_signature)
  );

endmodule
