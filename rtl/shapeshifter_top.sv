// Width/speed-reconfigurable pipeline control: top level.
//
// A chip with within-die variations has fast and slow instances of each
// pipeline component. This design runs a narrow pipeline made of only the
// fast instances at a fast clock during low-ILP program phases, and the
// full-width pipeline at the slow clock only in high-ILP phases. The top
// ties together:
//  - the control loop: time_block_counter -> phase_detector -> estimate_table
//    -> reconfig_ctrl, with safety_net proposing trial configurations and
//    reconfig_ctrl draining the pipeline and relocking the clock;
//  - the reconfigurable pipeline slices driven by the active configuration
//    through way_config: fetch PC increment, decode-to-rename muxes, rename
//    dependence check with NULL outputs, the register free list with
//    slow-register masking, and the prioritised select trees of the
//    integer (4 ways) and floating-point (2 ways, one per FP adder) queues.
// The rest of the core (caches, decoders, map table, wakeup, register file,
// functional units, reorder buffer, load/store queue) and the clock
// generator are outside: their signals are ports. Test-time results (way
// speed grades, clock code per configuration, slow registers, estimate
// table contents) come in on tt_* ports and are expected to be static.
//
// Timing: the control loop acts once per time block (TIME_BLOCK cycles);
// the pipeline slices are combinational except the fetch PC and the free
// list, which update at the clock edge. A reconfiguration holds fetch_stop
// high from the request until the new configuration is applied.
// Which blocks exist and how they connect follows the text; the handshakes,
// number formats and port lists are this design's.
module shapeshifter_top
  import shs_pkg::*;
#(
  parameter int unsigned TIME_BLOCK      = 100000,
  parameter int unsigned COMMIT_W        = 4,
  parameter int unsigned SAMPLE_INTERVAL = 10,
  parameter int unsigned ILP_DELTA_Q     = 128,
  parameter int unsigned PERIOD_BLOCKS   = 200,
  parameter int unsigned IQ_ENTRIES      = 32,
  parameter int unsigned FPIQ_ENTRIES    = 16,
  parameter int unsigned NPREG           = 256,
  parameter int unsigned NARCH           = 64,
  parameter int unsigned PC_W            = 64,
  localparam int unsigned CW  = $clog2(COMMIT_W + 1),
  localparam int unsigned BW  = $clog2(TIME_BLOCK * COMMIT_W + 1),
  localparam int unsigned IW  = $clog2(IQ_ENTRIES),
  localparam int unsigned FIW = $clog2(FPIQ_ENTRIES),
  localparam int unsigned PW  = $clog2(NPREG)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // test-time results
  input  logic                 tt_table_we,
  input  logic [2:0]           tt_table_row,
  input  cfg_e                 tt_table_cfg,
  input  grade_t               tt_cfg_freq  [NCFG],
  input  grade_t               tt_dec_grade [NWAYS],
  input  grade_t               tt_ren_grade [NWAYS],
  input  grade_t               tt_be_grade  [NWAYS],
  input  grade_t               tt_fp_grade  [NFPWAYS],
  input  logic [NPREG-1:0]     tt_slow_reg,
  input  logic                 sn_enable,
  // core status
  input  logic [CW-1:0]        commit_cnt,
  input  logic                 pipe_empty,
  // clock generator
  output grade_t               pll_freq,
  output logic                 pll_change,
  input  logic                 pll_locked,
  // fetch
  input  logic                 fetch_hold,
  input  logic                 redirect,
  input  logic [PC_W-1:0]      redirect_pc,
  output logic [PC_W-1:0]      fetch_pc,
  output logic [2:0]           fetch_width,
  output logic                 fetch_stop,
  // decode -> rename
  input  logic [NWAYS-1:0]     dec_valid,
  input  arch_uop_t            dec_uop      [NWAYS],
  output logic [NWAYS-1:0]     ren_valid,
  output arch_uop_t            ren_uop      [NWAYS],
  input  logic [PREG_W-1:0]    map_src1     [NWAYS],
  input  logic [PREG_W-1:0]    map_src2     [NWAYS],
  output logic [PREG_W-1:0]    ren_src1     [NWAYS],
  output logic [PREG_W-1:0]    ren_src2     [NWAYS],
  output logic [PW-1:0]        ren_dst      [NWAYS],
  output logic [NWAYS-1:0]     ren_dst_valid,
  output logic                 rename_stall,
  input  logic [NWAYS-1:0]     free_valid,
  input  logic [PW-1:0]        free_idx     [NWAYS],
  output logic [PW:0]          free_count,
  // issue select
  input  logic [IQ_ENTRIES-1:0] iq_ready,
  output logic [NWAYS-1:0]     iss_valid,
  output logic [IW-1:0]        iss_idx      [NWAYS],
  input  logic [FPIQ_ENTRIES-1:0] fp_iq_ready,
  output logic [NFPWAYS-1:0]   fp_iss_valid,
  output logic [FIW-1:0]       fp_iss_idx   [NFPWAYS],
  // configuration state
  output cfg_e                 cur_cfg,
  output logic [NWAYS-1:0]     dec_en,
  output logic [NWAYS-1:0]     dec_sel,
  output logic [NWAYS-1:0]     ren_en,
  output logic [NWAYS-1:0]     be_en,
  output logic [NFPWAYS-1:0]   fp_en,
  output logic                 reg_mask_en,
  output logic                 steer_ok,
  output logic                 reconfig_busy,
  // events
  output logic                 ev_block,
  output logic                 ev_new_phase,
  output rate_t                ev_new_rate,
  output rate_t                ev_block_rate,   // last block's commit rate
  output rate_t                ev_phase_rate,   // running phase average
  output logic                 ev_applied,
  output logic                 ev_sn_trial,
  output logic                 ev_sn_keep,
  output logic                 ev_sn_revert
);
  // ---------------- control loop ----------------
  logic          block_done;
  logic [BW-1:0] block_count;
  logic          new_phase, applied, applied_phase, pd_busy;
  rate_t         new_rate, block_rate, phase_rate;
  logic [2:0]    tab_row;
  cfg_e          tab_cfg;
  logic          sn_req;
  cfg_e          sn_cfg;

  time_block_counter #(.TIME_BLOCK(TIME_BLOCK), .COMMIT_W(COMMIT_W)) u_tbc (
    .clk, .rst_n, .pause(reconfig_busy), .commit_cnt, .block_done, .block_count
  );

  phase_detector #(
    .TIME_BLOCK(TIME_BLOCK), .COMMIT_W(COMMIT_W),
    .SAMPLE_INTERVAL(SAMPLE_INTERVAL), .ILP_DELTA_Q(ILP_DELTA_Q)
  ) u_pd (
    .clk, .rst_n, .block_done, .block_count, .restart(applied_phase),
    .new_phase, .new_rate, .block_rate, .phase_rate, .busy(pd_busy)
  );

  estimate_table u_tab (
    .clk, .rst_n, .tt_we(tt_table_we), .tt_row(tt_table_row), .tt_cfg(tt_table_cfg),
    .rate(new_rate), .row(tab_row), .cfg(tab_cfg)
  );

  safety_net #(
    .TIME_BLOCK(TIME_BLOCK), .COMMIT_W(COMMIT_W),
    .SAMPLE_INTERVAL(SAMPLE_INTERVAL), .PERIOD_BLOCKS(PERIOD_BLOCKS)
  ) u_sn (
    .clk, .rst_n, .enable(sn_enable), .block_done, .block_count, .cur_cfg,
    .cfg_freq(tt_cfg_freq), .applied, .cancel(new_phase),
    .req(sn_req), .req_cfg(sn_cfg),
    .trial_start(ev_sn_trial), .trial_keep(ev_sn_keep), .trial_revert(ev_sn_revert)
  );

  reconfig_ctrl u_rc (
    .clk, .rst_n, .cfg_freq(tt_cfg_freq),
    .ph_req(new_phase), .ph_cfg(tab_cfg), .sn_req, .sn_cfg,
    .pipe_empty, .pll_locked, .fetch_stop, .pll_freq, .pll_change,
    .cur_cfg, .applied, .applied_phase, .busy(reconfig_busy)
  );

  assign ev_block     = block_done;
  assign ev_new_phase = new_phase;
  assign ev_new_rate  = new_rate;
  assign ev_block_rate = block_rate;
  assign ev_phase_rate = phase_rate;
  assign ev_applied   = applied;

  // ---------------- way enables ----------------
  way_config u_wc (
    .cfg(cur_cfg), .cfg_freq(tt_cfg_freq[cur_cfg]),
    .dec_grade(tt_dec_grade), .ren_grade(tt_ren_grade),
    .be_grade(tt_be_grade), .fp_grade(tt_fp_grade),
    .dec_en, .dec_sel, .ren_en, .be_en, .fp_en, .reg_mask_en, .fetch_width, .steer_ok
  );

  // ---------------- pipeline slices ----------------
  fetch_pc_incr #(.PC_W(PC_W)) u_fetch (
    .clk, .rst_n, .width(fetch_width), .stall(fetch_hold || fetch_stop),
    .redirect, .redirect_pc, .pc(fetch_pc)
  );

  decode_rename_mux #(.N(NWAYS)) u_drm (
    .dec_en, .dec_sel, .dec_valid, .dec_uop, .ren_valid, .ren_uop
  );

  logic [NWAYS-1:0] alloc_req, alloc_gnt;
  logic [PW-1:0]    alloc_idx [NWAYS];

  always_comb begin
    for (int k = 0; k < NWAYS; k++) alloc_req[k] = ren_valid[k] && ren_en[k] && ren_uop[k].has_dst;
  end

  free_list #(.NPREG(NPREG), .NARCH(NARCH), .N(NWAYS)) u_fl (
    .clk, .rst_n, .mask_en(reg_mask_en), .slow_mask(tt_slow_reg),
    .alloc_req, .alloc_gnt, .alloc_idx, .stall(rename_stall),
    .free_valid, .free_idx, .free_count
  );

  logic [PREG_W-1:0] new_dst [NWAYS];
  always_comb begin
    for (int k = 0; k < NWAYS; k++) begin
      new_dst[k] = PREG_W'(alloc_idx[k]);
      ren_dst[k] = alloc_idx[k];
    end
  end

  rename_depcheck #(.N(NWAYS)) u_rdc (
    .en(ren_en), .valid(ren_valid & ~{NWAYS{rename_stall}}), .uop(ren_uop),
    .map_src1, .map_src2, .new_dst,
    .src1(ren_src1), .src2(ren_src2), .dst_valid(ren_dst_valid)
  );

  logic [IQ_ENTRIES-1:0] grant [NWAYS];
  select_logic #(.ENTRIES(IQ_ENTRIES), .N(NWAYS)) u_sel (
    .ready(iq_ready), .en(be_en), .grant, .grant_valid(iss_valid), .grant_idx(iss_idx)
  );

  logic [FPIQ_ENTRIES-1:0] fp_grant [NFPWAYS];
  select_logic #(.ENTRIES(FPIQ_ENTRIES), .N(NFPWAYS)) u_fpsel (
    .ready(fp_iq_ready), .en(fp_en), .grant(fp_grant), .grant_valid(fp_iss_valid), .grant_idx(fp_iss_idx)
  );

  // Allocation grants equal the requests whenever rename is not stalled.
  assert property (@(posedge clk) disable iff (!rst_n) !rename_stall |-> alloc_gnt == alloc_req);

endmodule
