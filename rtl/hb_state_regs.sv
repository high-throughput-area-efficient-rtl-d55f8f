// hb_state_regs: internal state registers RS1..RS4 and their update adders.
//
// load_nonce copies the four 16-bit nonce words into RS1..RS4 (RS1 from bits
// 63:48). update applies one state update at the end of a four-cipher
// iteration; all additions are modulo 2^16:
//   initialization (init_encr = 0):
//     RS1 += TV, RS2 += V12, RS3 += V23, RS4 += V34
//   encryption / decryption (init_encr = 1):
//     RS1' = RS1 + V34
//     RS3' = RS3 + V23 + LFSR'          (LFSR' = stepped LFSR value)
//     RS4' = RS4 + V12 + RS1'
//     RS2' = RS2 + V12 + RS4'
// Each register has one adder whose second operand is multiplexed by
// init_encr (TV or V34 for RS1, 0 or RS4' for RS2, 0 or LFSR' for RS3,
// V34 or V12 and 0 or RS1' for RS4), as in the document's overall
// architecture figure. The init-mode assignment RS4 += V34 and the use of
// the new RS1'/RS4' values follow that figure and the published algorithm.
module hb_state_regs
  import hb_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load_nonce,
  input  logic [63:0]     nonce,
  input  logic            update,
  input  logic            init_encr,
  input  word_t           v12,
  input  word_t           v23,
  input  word_t           v34,
  input  word_t           tv,
  input  word_t           lfsr_next,
  output logic [3:0][15:0] rs       // rs[0] = RS1 ... rs[3] = RS4
);

  word_t rs1_n, rs2_n, rs3_n, rs4_n;

  always_comb begin
    rs1_n = rs[0] + (init_encr ? v34 : tv);
    rs3_n = rs[2] + v23 + (init_encr ? lfsr_next : 16'h0);
    rs4_n = rs[3] + (init_encr ? v12 : v34) + (init_encr ? rs1_n : 16'h0);
    rs2_n = rs[1] + v12 + (init_encr ? rs4_n : 16'h0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= '0;
    end else if (load_nonce) begin
      rs <= {nonce[15:0], nonce[31:16], nonce[47:32], nonce[63:48]};
    end else if (update) begin
      rs <= {rs4_n, rs3_n, rs2_n, rs1_n};
    end
  end

endmodule
