// ILP phase detector.
//
// At the end of every time block the detector divides the block's commit
// count by the block length to get the block's average commit rate, and
// divides the current phase's total commits by its length to get the
// running phase average. Both divisions share one slow sequential divider.
// A block whose rate differs from the phase average by ILP_DELTA_Q or more
// (either direction) is a deviating block. SAMPLE_INTERVAL deviating blocks
// in a row declare a new phase: new_phase pulses and new_rate carries the
// average commit rate of those SAMPLE_INTERVAL blocks, which is what the
// estimate table is looked up with. The new phase's running average then
// starts afresh with the next block. A run of deviating blocks that is
// broken is folded back into the current phase's average. restart (after
// the pipeline has been reconfigured for a new phase) also starts the
// average afresh, so that the new phase is averaged in its new
// configuration. Safety-net trials do not restart it: a one-step change of
// configuration moves the commit rate by much less than the threshold, and
// restarting would hide a phase change that happens during a trial.
//
// Rates are fixed point with RATE_FRAC fraction bits (see shs_pkg).
// The detection rule, the running average and the shared divider follow the
// text; folding broken runs back in, restarting after a phase reconfiguration and the
// number formats are this design's choices. Each block end needs at most
// three divisions of DW+1 cycles, so TIME_BLOCK must exceed 3*(DW+3).
module phase_detector
  import shs_pkg::*;
#(
  parameter int unsigned TIME_BLOCK      = 100000,
  parameter int unsigned COMMIT_W        = 4,
  parameter int unsigned SAMPLE_INTERVAL = 10,
  parameter int unsigned ILP_DELTA_Q     = 128,   // 0.5 commits/cycle
  parameter int unsigned DW              = 64,
  localparam int unsigned BW = $clog2(TIME_BLOCK * COMMIT_W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          block_done,
  input  logic [BW-1:0] block_count,
  input  logic          restart,
  output logic          new_phase,    // one-cycle pulse
  output rate_t         new_rate,     // rate of the blocks that made the new phase
  output rate_t         block_rate,   // rate of the last block
  output rate_t         phase_rate,   // running average of the current phase
  output logic          busy
);
  localparam int unsigned PTW = 48;   // phase commit total
  localparam int unsigned NBW = 32;   // blocks in the phase
  localparam int unsigned SIW = $clog2(SAMPLE_INTERVAL + 1);

  typedef enum logic [2:0] {S_IDLE, S_BLK, S_PH_START, S_PH, S_NEW_START, S_NEW} state_e;
  state_e state_q;

  logic [PTW-1:0] phase_tot_q, cand_tot_q;
  logic [NBW-1:0] phase_n_q;
  logic [SIW-1:0] streak_q;
  logic [BW-1:0]  blk_q;
  logic           restart_pend_q;

  logic          div_start, div_busy, div_done;
  logic [DW-1:0] div_a, div_b, div_q;

  seq_divider #(.DW(DW)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_a), .divisor(div_b),
    .busy(div_busy), .done(div_done), .quotient(div_q)
  );

  function automatic rate_t sat_rate(logic [DW-1:0] q);
    return (q > DW'({RATE_W{1'b1}})) ? '1 : rate_t'(q);
  endfunction

  rate_t          q_rate;
  logic [RATE_W:0] diff;
  logic           deviates;
  logic [PTW-1:0] cand_next;

  assign q_rate    = sat_rate(div_q);
  assign diff      = (q_rate >= block_rate) ? {1'b0, q_rate - block_rate}
                                            : {1'b0, block_rate - q_rate};
  assign deviates  = diff >= (RATE_W+1)'(ILP_DELTA_Q);
  assign cand_next = cand_tot_q + PTW'(blk_q);

  always_comb begin
    div_start = 1'b0;
    div_a     = '0;
    div_b     = '0;
    unique case (state_q)
      S_BLK: begin
        div_a = DW'(blk_q) << RATE_FRAC;
        div_b = DW'(TIME_BLOCK);
      end
      S_PH_START, S_PH: begin
        div_start = (state_q == S_PH_START);
        div_a     = DW'(phase_tot_q) << RATE_FRAC;
        div_b     = DW'(phase_n_q) * DW'(TIME_BLOCK);
      end
      S_NEW_START, S_NEW: begin
        div_start = (state_q == S_NEW_START);
        div_a     = DW'(cand_tot_q) << RATE_FRAC;
        div_b     = DW'(SAMPLE_INTERVAL) * DW'(TIME_BLOCK);
      end
      default: begin
        div_start = block_done && !div_busy && !(restart || restart_pend_q);
        div_a     = DW'(block_count) << RATE_FRAC;
        div_b     = DW'(TIME_BLOCK);
      end
    endcase
  end

  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q        <= S_IDLE;
      phase_tot_q    <= '0;
      cand_tot_q     <= '0;
      phase_n_q      <= '0;
      streak_q       <= '0;
      blk_q          <= '0;
      restart_pend_q <= 1'b0;
      new_phase      <= 1'b0;
      new_rate       <= '0;
      block_rate     <= '0;
      phase_rate     <= '0;
    end else begin
      new_phase <= 1'b0;
      if (restart) restart_pend_q <= 1'b1;
      unique case (state_q)
        S_IDLE: begin
          if (restart || restart_pend_q) begin
            phase_tot_q    <= '0;
            phase_n_q      <= '0;
            cand_tot_q     <= '0;
            streak_q       <= '0;
            restart_pend_q <= 1'b0;
          end else if (block_done) begin
            blk_q   <= block_count;
            state_q <= S_BLK;
          end
        end
        S_BLK: if (div_done) begin
          block_rate <= q_rate;
          if (phase_n_q == '0) begin
            // first block of a phase only sets the average
            phase_tot_q <= PTW'(blk_q);
            phase_n_q   <= NBW'(1);
            phase_rate  <= q_rate;
            state_q     <= S_IDLE;
          end else begin
            state_q <= S_PH_START;
          end
        end
        S_PH_START: state_q <= S_PH;
        S_PH: if (div_done) begin
          phase_rate <= q_rate;
          if (deviates) begin
            cand_tot_q <= cand_next;
            streak_q   <= streak_q + 1'b1;
            state_q    <= (streak_q == SIW'(SAMPLE_INTERVAL - 1)) ? S_NEW_START : S_IDLE;
          end else begin
            phase_tot_q <= phase_tot_q + cand_next;
            phase_n_q   <= phase_n_q + NBW'(streak_q) + NBW'(1);
            cand_tot_q  <= '0;
            streak_q    <= '0;
            state_q     <= S_IDLE;
          end
        end
        S_NEW_START: state_q <= S_NEW;
        S_NEW: if (div_done) begin
          new_rate    <= q_rate;
          new_phase   <= 1'b1;
          phase_tot_q <= '0;
          phase_n_q   <= '0;
          cand_tot_q  <= '0;
          streak_q    <= '0;
          state_q     <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A block may not end while the previous one is still being evaluated.
  assert property (@(posedge clk) disable iff (!rst_n) block_done |-> state_q == S_IDLE);

endmodule
