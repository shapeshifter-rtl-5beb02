// Safety net: periodic trial of a neighbouring configuration.
//
// The estimate table is an average over many programs and may pick a poor
// configuration for some phase. Every PERIOD_BLOCKS time blocks the safety
// net asks for a configuration one step narrower or one step wider than the
// current one (4-4 > 3-3 > 3-2 > 2-2), alternating between the two
// directions from one trial to the next; at either end of the order it
// takes the only neighbour there is. It then measures the trial for
// SAMPLE_INTERVAL blocks and compares its performance with that of the
// current configuration over its last SAMPLE_INTERVAL blocks. Performance
// is commits per block times the configuration's clock code, because a
// narrower configuration always commits less per cycle but runs a faster
// clock. If the trial is better it stays; otherwise the safety net asks to
// revert. Any reconfiguration not of its own making (applied while idle,
// or cancel, which the phase detector's new phase raises) cancels a trial.
//
// The window of the last SAMPLE_INTERVAL block counts is a shift register
// with a running sum, cleared whenever a new configuration is applied.
// Requests are one-cycle pulses (req, req_cfg); applied comes back from the
// sequencer. The period, the alternation and the window follow the text;
// weighting by the clock code and the boundary rule are this design's.
module safety_net
  import shs_pkg::*;
#(
  parameter int unsigned TIME_BLOCK      = 100000,
  parameter int unsigned COMMIT_W        = 4,
  parameter int unsigned SAMPLE_INTERVAL = 10,
  parameter int unsigned PERIOD_BLOCKS   = 200,
  localparam int unsigned BW = $clog2(TIME_BLOCK * COMMIT_W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic          block_done,
  input  logic [BW-1:0] block_count,
  input  cfg_e          cur_cfg,
  input  grade_t        cfg_freq [NCFG],
  input  logic          applied,
  input  logic          cancel,
  output logic          req,
  output cfg_e          req_cfg,
  output logic          trial_start,   // one-cycle pulses for observation
  output logic          trial_keep,
  output logic          trial_revert
);
  localparam int unsigned SW  = BW + $clog2(SAMPLE_INTERVAL + 1);
  localparam int unsigned PW  = $clog2(PERIOD_BLOCKS + 1);
  localparam int unsigned FW  = $clog2(SAMPLE_INTERVAL + 1);

  typedef enum logic [1:0] {N_RUN, N_WAIT_TRIAL, N_MEASURE, N_WAIT_REVERT} nstate_e;
  nstate_e state_q;

  logic [BW-1:0] win_q [SAMPLE_INTERVAL];
  logic [SW-1:0] sum_q, base_sum_q;
  logic [FW-1:0] fill_q;
  logic [PW-1:0] period_q;
  logic          dir_wider_q;
  cfg_e          base_q;

  logic [SW-1:0] sum_next;
  logic          win_full_next;
  cfg_e          trial_cfg;
  logic          wider;
  logic [SW+GRADE_W-1:0] perf_trial, perf_base;

  assign sum_next      = sum_q + SW'(block_count) - (fill_q == FW'(SAMPLE_INTERVAL) ? SW'(win_q[SAMPLE_INTERVAL-1]) : '0);
  assign win_full_next = (fill_q >= FW'(SAMPLE_INTERVAL - 1));

  // neighbour choice
  always_comb begin
    wider = dir_wider_q;
    if (cur_cfg == CFG_44) wider = 1'b0;
    if (cur_cfg == CFG_22) wider = 1'b1;
    trial_cfg = wider ? cfg_e'(cur_cfg - 2'd1) : cfg_e'(cur_cfg + 2'd1);
  end

  assign perf_trial = (SW+GRADE_W)'(sum_next)   * (SW+GRADE_W)'(cfg_freq[cur_cfg]);
  assign perf_base  = (SW+GRADE_W)'(base_sum_q) * (SW+GRADE_W)'(cfg_freq[base_q]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= N_RUN;
      for (int i = 0; i < SAMPLE_INTERVAL; i++) win_q[i] <= '0;
      sum_q        <= '0;
      base_sum_q   <= '0;
      fill_q       <= '0;
      period_q     <= '0;
      dir_wider_q  <= 1'b0;
      base_q       <= CFG_44;
      req          <= 1'b0;
      req_cfg      <= CFG_44;
      trial_start  <= 1'b0;
      trial_keep   <= 1'b0;
      trial_revert <= 1'b0;
    end else begin
      req          <= 1'b0;
      trial_start  <= 1'b0;
      trial_keep   <= 1'b0;
      trial_revert <= 1'b0;

      // window of the current configuration's recent blocks
      if (applied) begin
        sum_q  <= '0;
        fill_q <= '0;
      end else if (block_done) begin
        win_q[0] <= block_count;
        for (int i = 1; i < SAMPLE_INTERVAL; i++) win_q[i] <= win_q[i-1];
        sum_q <= sum_next;
        if (fill_q != FW'(SAMPLE_INTERVAL)) fill_q <= fill_q + 1'b1;
      end

      if (cancel) begin
        state_q  <= N_RUN;
        period_q <= '0;
      end else begin
        unique case (state_q)
          N_RUN: begin
            if (block_done && period_q != PW'(PERIOD_BLOCKS)) period_q <= period_q + 1'b1;
            if (applied) period_q <= '0;
            else if (enable && period_q == PW'(PERIOD_BLOCKS) && fill_q == FW'(SAMPLE_INTERVAL)) begin
              base_q      <= cur_cfg;
              base_sum_q  <= sum_q;
              req         <= 1'b1;
              req_cfg     <= trial_cfg;
              dir_wider_q <= ~wider;
              trial_start <= 1'b1;
              state_q     <= N_WAIT_TRIAL;
            end
          end
          N_WAIT_TRIAL: if (applied) state_q <= N_MEASURE;
          N_MEASURE: begin
            if (applied) begin
              state_q  <= N_RUN;         // someone else reconfigured
              period_q <= '0;
            end else if (block_done && win_full_next) begin
              if (perf_trial > perf_base) begin
                trial_keep <= 1'b1;
                state_q    <= N_RUN;
                period_q   <= '0;
              end else begin
                trial_revert <= 1'b1;
                req          <= 1'b1;
                req_cfg      <= base_q;
                state_q      <= N_WAIT_REVERT;
              end
            end
          end
          N_WAIT_REVERT: if (applied) begin
            state_q  <= N_RUN;
            period_q <= '0;
          end
          default: state_q <= N_RUN;
        endcase
      end
    end
  end

endmodule
