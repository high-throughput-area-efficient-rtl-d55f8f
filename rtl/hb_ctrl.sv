// hb_ctrl: sequencer of a Hummingbird encryption or decryption core.
//
// One iteration runs the four 16-bit block ciphers in turn, two clock cycles
// each (phase 0: load the cipher, phase 1: take its result), so an iteration
// is 8 cycles. A block counter (blk) counts the four ciphers of an iteration
// and a round counter (rnd) counts the four iterations of initialization;
// init_encr is 0 during initialization and becomes 1 when it has finished.
//   start      : load the nonce and run initialization (accepted unless busy)
//   in_valid   : a data word is offered; it is taken when in_ready is high
//                (in_ready is also high in the last cycle of a busy data
//                iteration, so words can follow each other every 8 cycles)
//   iter_done  : last cycle of an iteration; the state registers update
// Selects, per cipher k = blk (0..3):
//   key_sel  : sub-key K(k+1); a decryption core in data mode uses K(4-k)
//   rs_sel   : initialization k=0 uses RS3 (input RS1 + RS3), otherwise
//              RS(k+1); decryption data mode uses RS(4-k)
//   data_sel : RS1 (init, k=0), the input word (data, k=0), else feedback
// The counters and signal names follow the document; the two-phase timing,
// the start/valid/ready handshake and ignoring start while busy are this
// design's choices.
module hb_ctrl
  import hb_pkg::*;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       start_accept,   // nonce is loaded this cycle
  output logic       in_accept,      // data word is taken this cycle
  output logic       busy,
  output logic       init_encr,
  output logic       phase,          // 0: cipher load, 1: cipher result
  output logic [1:0] blk,            // block counter
  output logic [1:0] rnd,            // round counter
  output logic [1:0] key_sel,
  output logic [1:0] rs_sel,
  output data_sel_e  data_sel,
  output logic       iter_done,
  output logic       lfsr_seed,      // last initialization iteration ends
  output logic       out_valid_comb  // data iteration ends: result ready
);

  typedef enum logic [1:0] {S_IDLE, S_BUSY, S_READY} state_e;
  state_e st;

  logic data_last;

  assign busy         = (st == S_BUSY);
  assign iter_done    = busy && phase && (blk == 2'd3);
  assign data_last    = iter_done && init_encr;
  assign start_accept = start && !busy;
  assign in_ready     = !start && ((st == S_READY) || data_last);
  assign in_accept    = in_ready && in_valid;
  assign lfsr_seed    = iter_done && !init_encr && (rnd == 2'd3);
  assign out_valid_comb = data_last;

  always_comb begin
    if (!init_encr) begin
      key_sel  = blk;
      rs_sel   = (blk == 2'd0) ? 2'd2 : blk;
      data_sel = (blk == 2'd0) ? DS_RS1 : DS_FB;
    end else begin
      key_sel  = DECRYPT ? 2'd3 - blk : blk;
      rs_sel   = DECRYPT ? 2'd3 - blk : blk;
      data_sel = (blk == 2'd0) ? DS_IN : DS_FB;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      phase     <= 1'b0;
      blk       <= 2'd0;
      rnd       <= 2'd0;
      init_encr <= 1'b0;
    end else if (start_accept) begin
      st        <= S_BUSY;
      phase     <= 1'b0;
      blk       <= 2'd0;
      rnd       <= 2'd0;
      init_encr <= 1'b0;
    end else if (in_accept) begin
      st    <= S_BUSY;
      phase <= 1'b0;
      blk   <= 2'd0;
    end else if (busy) begin
      phase <= ~phase;
      if (phase) begin
        blk <= blk + 2'd1;
        if (blk == 2'd3) begin
          if (!init_encr) begin
            rnd <= rnd + 2'd1;
            if (rnd == 2'd3) begin
              init_encr <= 1'b1;
              st        <= S_READY;
            end
          end else begin
            st <= S_READY;
          end
        end
      end
    end
  end

  // Handshake rules.
  assert property (@(posedge clk) disable iff (!rst_n) in_accept |-> init_encr);
  assert property (@(posedge clk) disable iff (!rst_n) in_accept |-> !start_accept);
  assert property (@(posedge clk) disable iff (!rst_n) (st == S_IDLE) |-> !init_encr);

endmodule
