// hb_encryption: Hummingbird encryption core (16-bit block, 256-bit key).
//
// One block-cipher engine (hb_encr_cipher) is reused for all four ciphers
// E_K1..E_K4 and for the four initialization iterations.
//   Initialization (after start): RS1..RS4 <= nonce, then four times
//     V12 = E_K1(RS1+RS3), V23 = E_K2(V12+RS2), V34 = E_K3(V23+RS3),
//     TV = E_K4(V34+RS4), followed by the state update of hb_state_regs.
//     The last TV seeds the LFSR; init_done then goes high.
//   Encryption of each plaintext word PT:
//     V12 = E_K1(PT+RS1), V23 = E_K2(V12+RS2), V34 = E_K3(V23+RS3),
//     CT  = E_K4(V34+RS4), then the LFSR steps and the state updates.
// Interface: start loads nonce and begins initialization (32 cycles);
// pt is taken when pt_valid && pt_ready; ct_valid pulses for one cycle with
// ct 9 cycles after the pt was taken. Back-to-back words are taken every 8
// cycles. key and nonce must be held while the core uses them.
// The dataflow and the control signal names follow the document; the
// handshake and exact cycle timing are this design's.
module hb_encryption
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
  input  logic         pt_valid,
  output logic         pt_ready,
  input  word_t        pt,
  output logic         ct_valid,
  output word_t        ct
);

  logic       start_accept, in_accept, busy, init_encr, phase, iter_done;
  logic       lfsr_seed, out_valid_comb;
  logic [1:0] blk, key_sel, rs_sel;
  data_sel_e  data_sel;

  logic [3:0][15:0] rs;
  word_t pt_reg, v12, v23, v34, operand, cipher_in, cipher_out;
  word_t lfsr_next;

  hb_ctrl #(.DECRYPT(1'b0)) u_ctrl (
    .clk, .rst_n, .start, .in_valid(pt_valid), .in_ready(pt_ready),
    .start_accept, .in_accept, .busy, .init_encr, .phase, .blk, .rnd(),
    .key_sel, .rs_sel, .data_sel, .iter_done, .lfsr_seed, .out_valid_comb
  );

  // DATA_SEL multiplexer and the modular adder in front of the cipher.
  always_comb begin
    case (data_sel)
      DS_RS1:  operand = rs[0];
      DS_IN:   operand = pt_reg;
      default: operand = (blk == 2'd1) ? v12 : (blk == 2'd2) ? v23 : v34;
    endcase
    cipher_in = operand + rs[rs_sel];
  end

  hb_encr_cipher #(.SINGLE_SBOX(SINGLE_SBOX)) u_cipher (
    .clk, .rst_n, .load(busy && !phase), .din(cipher_in),
    .key(subkey(key, 32'(key_sel))), .dout(cipher_out)
  );

  hb_lfsr u_lfsr (
    .clk, .rst_n, .seed_load(lfsr_seed), .seed(cipher_out),
    .step(out_valid_comb), .q(), .q_next(lfsr_next)
  );

  hb_state_regs u_state (
    .clk, .rst_n, .load_nonce(start_accept), .nonce, .update(iter_done),
    .init_encr, .v12, .v23, .v34, .tv(cipher_out), .lfsr_next, .rs
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pt_reg   <= '0;
      v12      <= '0;
      v23      <= '0;
      v34      <= '0;
      ct       <= '0;
      ct_valid <= 1'b0;
    end else begin
      ct_valid <= out_valid_comb;
      if (in_accept) pt_reg <= pt;
      if (busy && phase) begin
        case (blk)
          2'd0: v12 <= cipher_out;
          2'd1: v23 <= cipher_out;
          2'd2: v34 <= cipher_out;
          default: ;
        endcase
      end
      if (out_valid_comb) ct <= cipher_out;
    end
  end

  assign init_done = init_encr;

endmodule
