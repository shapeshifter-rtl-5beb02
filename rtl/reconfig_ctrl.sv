// Reconfiguration sequencer.
//
// Holds the active configuration and carries out a change to a new one.
// Requests come from the phase detector's table lookup (ph_req) and from
// the safety net (sn_req); a phase request wins when both arrive together,
// and a request for the configuration already active is ignored. A change
// runs: DRAIN - stop fetch (fetch_stop) and wait for the pipeline to
// empty (pipe_empty); RELOCK - put the new configuration's clock code on
// pll_freq, pulse pll_change, wait for the clock generator to drop and then
// regain pll_locked; APPLY - switch cur_cfg (and with it every way enable)
// and pulse applied (with applied_phase high if a phase request caused
// the change). A phase request that arrives while a change is under way
// (for instance a safety-net trial started on the same time block) is held
// and carried out as soon as that change is applied; a safety-net request
// arriving then is dropped, as the safety net restarts on every applied
// change. busy is high from the request to the applied pulse;
// the time-block counter is paused meanwhile. Clock codes per
// configuration are found at test time (cfg_freq). Changing the clock
// through the existing clock generator and its settling time follow the
// text; draining first, and the handshake, are this design's.
module reconfig_ctrl
  import shs_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  grade_t cfg_freq [NCFG],
  input  logic   ph_req,
  input  cfg_e   ph_cfg,
  input  logic   sn_req,
  input  cfg_e   sn_cfg,
  input  logic   pipe_empty,
  input  logic   pll_locked,
  output logic   fetch_stop,
  output grade_t pll_freq,
  output logic   pll_change,
  output cfg_e   cur_cfg,
  output logic   applied,
  output logic   applied_phase,   // with applied: the change came from ph_req
  output logic   busy
);
  typedef enum logic [2:0] {R_IDLE, R_DRAIN, R_CHANGE, R_UNLOCK, R_LOCK, R_APPLY} rstate_e;
  rstate_e state_q;
  cfg_e    tgt_q;
  logic    from_ph_q;
  cfg_e    req_cfg;
  logic    req;

  logic    ph_pend_q;       // phase request that arrived during a change
  cfg_e    ph_pend_cfg_q;
  logic    ph_v;
  cfg_e    ph_c;
  assign ph_v    = ph_req || ph_pend_q;
  assign ph_c    = ph_req ? ph_cfg : ph_pend_cfg_q;
  assign req     = (ph_v && ph_c != cur_cfg) || (sn_req && sn_cfg != cur_cfg);
  assign req_cfg = (ph_v && ph_c != cur_cfg) ? ph_c : sn_cfg;

  assign busy       = (state_q != R_IDLE);
  assign fetch_stop = busy;
  assign pll_freq   = cfg_freq[busy ? tgt_q : cur_cfg];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= R_IDLE;
      ph_pend_q  <= 1'b0;
      ph_pend_cfg_q <= CFG_44;
      tgt_q      <= CFG_44;
      from_ph_q  <= 1'b0;
      applied_phase <= 1'b0;
      cur_cfg    <= CFG_44;
      pll_change <= 1'b0;
      applied    <= 1'b0;
    end else begin
      pll_change <= 1'b0;
      applied    <= 1'b0;
      applied_phase <= 1'b0;
      if (state_q != R_IDLE && ph_req) begin
        ph_pend_q     <= 1'b1;
        ph_pend_cfg_q <= ph_cfg;
      end
      unique case (state_q)
        R_IDLE:   begin
                    ph_pend_q <= 1'b0;
                    if (req) begin
                      tgt_q     <= req_cfg;
                      from_ph_q <= ph_v && ph_c != cur_cfg;
                      state_q   <= R_DRAIN;
                    end
                  end
        R_DRAIN:  if (pipe_empty) state_q <= R_CHANGE;
        R_CHANGE: begin
                    pll_change <= 1'b1;
                    state_q    <= R_UNLOCK;
                  end
        R_UNLOCK: if (!pll_locked) state_q <= R_LOCK;
        R_LOCK:   if (pll_locked) state_q <= R_APPLY;
        R_APPLY:  begin
                    cur_cfg <= tgt_q;
                    applied       <= 1'b1;
                    applied_phase <= from_ph_q;
                    state_q       <= R_IDLE;
                  end
        default:  state_q <= R_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pll_change |-> state_q == R_UNLOCK);

endmodule
