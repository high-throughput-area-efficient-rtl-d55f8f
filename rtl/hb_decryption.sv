// hb_decryption: Hummingbird decryption core (16-bit block, 256-bit key).
//
// Initialization is the same as in the encryption core and uses a forward
// cipher (hb_encr_cipher); with the same key and nonce both cores reach the
// same state. Each ciphertext word CT is then decrypted with the inverse
// cipher (hb_decr_cipher) and modular subtraction, in reverse order:
//     V34 = D_K4(CT) - RS4,  V23 = D_K3(V34) - RS3,
//     V12 = D_K2(V23) - RS2, PT  = D_K1(V12) - RS1,
// followed by the same LFSR step and state update as in encryption, so the
// two cores stay in step word by word.
// Interface and timing are those of hb_encryption: ct in, pt out, a result
// 9 cycles after the word is taken and one word every 8 cycles.
module hb_decryption
  import hb_pkg::*;
#(
  parameter bit SINGLE_SBOX = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [255:0] key,
  input  logic [63:0]  nonce,
  input  logic         start,
  output logic         init_done,
  input  logic         ct_valid,
  output logic         ct_ready,
  input  word_t        ct,
  output logic         pt_valid,
  output word_t        pt
);

  logic       start_accept, in_accept, busy, init_encr, phase, iter_done;
  logic       lfsr_seed, out_valid_comb, load;
  logic [1:0] blk, key_sel, rs_sel;
  data_sel_e  data_sel;

  logic [3:0][15:0] rs;
  word_t ct_reg, v12, v23, v34, fb, operand, enc_in, enc_out, dec_in, dec_out;
  word_t result, lfsr_next;
  subkey_t sk;

  hb_ctrl #(.DECRYPT(1'b1)) u_ctrl (
    .clk, .rst_n, .start, .in_valid(ct_valid), .in_ready(ct_ready),
    .start_accept, .in_accept, .busy, .init_encr, .phase, .blk, .rnd(),
    .key_sel, .rs_sel, .data_sel, .iter_done, .lfsr_seed, .out_valid_comb
  );

  assign load = busy && !phase;
  assign sk   = subkey(key, 32'(key_sel));

  // Previous cipher result: during initialization the forward chain
  // V12, V23, V34; during decryption the reverse chain V34, V23, V12.
  always_comb begin
    if (!init_encr) fb = (blk == 2'd1) ? v12 : (blk == 2'd2) ? v23 : v34;
    else            fb = (blk == 2'd1) ? v34 : (blk == 2'd2) ? v23 : v12;
    case (data_sel)
      DS_RS1:  operand = rs[0];
      DS_IN:   operand = ct_reg;
      default: operand = fb;
    endcase
    enc_in = operand + rs[rs_sel];
    dec_in = operand;
    result = init_encr ? dec_out - rs[rs_sel] : enc_out;
  end

  hb_encr_cipher #(.SINGLE_SBOX(SINGLE_SBOX)) u_encr (
    .clk, .rst_n, .load(load && !init_encr), .din(enc_in), .key(sk), .dout(enc_out)
  );

  hb_decr_cipher #(.SINGLE_SBOX(SINGLE_SBOX)) u_decr (
    .clk, .rst_n, .load(load && init_encr), .din(dec_in), .key(sk), .dout(dec_out)
  );

  hb_lfsr u_lfsr (
    .clk, .rst_n, .seed_load(lfsr_seed), .seed(enc_out),
    .step(out_valid_comb), .q(), .q_next(lfsr_next)
  );

  hb_state_regs u_state (
    .clk, .rst_n, .load_nonce(start_accept), .nonce, .update(iter_done),
    .init_encr, .v12, .v23, .v34, .tv(enc_out), .lfsr_next, .rs
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ct_reg   <= '0;
      v12      <= '0;
      v23      <= '0;
      v34      <= '0;
      pt       <= '0;
      pt_valid <= 1'b0;
    end else begin
      pt_valid <= out_valid_comb;
      if (in_accept) ct_reg <= ct;
      if (busy && phase) begin
        if (!init_encr) begin
          case (blk)
            2'd0: v12 <= result;
            2'd1: v23 <= result;
            2'd2: v34 <= result;
            default: ;
          endcase
        end else begin
          case (blk)
            2'd0: v34 <= result;
            2'd1: v23 <= result;
            2'd2: v12 <= result;
            default: ;
          endcase
        end
      end
      if (out_valid_comb) pt <= result;
    end
  end

  assign init_done = init_encr;

endmodule
