// End-to-end test of shapeshifter_top at reduced sizes (400-cycle time
// blocks, sample interval 4, safety-net period 12 blocks).
//
// A behavioural core commits instructions at a rate set by the program
// phase and scaled by how much the active configuration narrows the
// pipeline; the scale factors per commit-rate range are the normalised
// commit rates of the evaluation (4-4 = 1.00 down to 0.63 for 2-2 at high
// rates). A behavioural clock generator relocks in SETTLE cycles and the
// pipeline empties DRAIN cycles after fetch stops. The program runs four
// phases: high ILP (2.5), low ILP (0.4), high ILP again, medium ILP (1.2).
// The estimate table deliberately holds 3-3 for the 1.0-1.5 range although
// 3-2 performs better on this chip, so the safety net has a mistake to fix.
//
// Checks: each detected phase leads to the configuration the table gives
// for its rate; the way enables, the issue and rename traffic, the fetch
// increment and the register allocation follow the active configuration
// at every cycle; every mechanism (phase change, drain, clock relock,
// safety-net trial, keep and revert, NULL rename way, decode steering,
// slow-register masking, free-list stall, FP adder off, each width, and a
// phase found while a change is under way) happens at least once. The
// relock time is longer than the phase detector's divisions, so the phase
// found on the block where the first safety-net trial starts arrives
// during that trial's change and must be carried out after it.
module tb_shapeshifter_top;
  import shs_pkg::*;
  localparam int TBLK = 400, SI = 4, PER = 12, SETTLE = 250, DRAIN = 9;
  localparam int NPREG = 256, IQ = 32;

  logic clk = 0, rst_n = 0;
  logic tt_table_we = 0;
  logic [2:0] tt_table_row = '0;
  cfg_e tt_table_cfg = CFG_44;
  grade_t tt_cfg_freq [NCFG], tt_dec_grade [NWAYS], tt_ren_grade [NWAYS], tt_be_grade [NWAYS], tt_fp_grade [NFPWAYS];
  logic [NPREG-1:0] tt_slow_reg;
  logic sn_enable = 1;
  logic [2:0] commit_cnt = '0;
  logic pipe_empty, pll_change, pll_locked;
  grade_t pll_freq;
  logic fetch_hold = 0, redirect = 0, fetch_stop;
  logic [63:0] redirect_pc = '0, fetch_pc;
  logic [2:0] fetch_width;
  logic [NWAYS-1:0] dec_valid = '0, ren_valid, ren_dst_valid, free_valid = '0, iss_valid;
  arch_uop_t dec_uop [NWAYS], ren_uop [NWAYS];
  logic [PREG_W-1:0] map_src1 [NWAYS], map_src2 [NWAYS], ren_src1 [NWAYS], ren_src2 [NWAYS];
  logic [7:0] ren_dst [NWAYS], free_idx [NWAYS];
  logic [8:0] free_count;
  logic rename_stall;
  logic [IQ-1:0] iq_ready = '0;
  logic [4:0] iss_idx [NWAYS];
  logic [15:0] fp_iq_ready = '0;
  logic [1:0] fp_iss_valid;
  logic [3:0] fp_iss_idx [2];
  cfg_e cur_cfg;
  logic [NWAYS-1:0] dec_en, dec_sel, ren_en, be_en;
  logic [NFPWAYS-1:0] fp_en;
  logic reg_mask_en, steer_ok, reconfig_busy;
  logic ev_block, ev_new_phase, ev_applied, ev_sn_trial, ev_sn_keep, ev_sn_revert;
  rate_t ev_new_rate, ev_block_rate, ev_phase_rate;

  shapeshifter_top #(.TIME_BLOCK(TBLK), .SAMPLE_INTERVAL(SI), .PERIOD_BLOCKS(PER)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_phase = 0, n_apply = 0, n_relock = 0, n_drain_wait = 0, n_trial = 0, n_keep = 0, n_revert = 0;
  int n_null_rename = 0, n_steer = 0, n_mask = 0, n_fl_stall = 0, n_fp_off = 0, n_blocks = 0;
  int n_w [5] = '{0, 0, 0, 0, 0};
  int n_held = 0;          // phase found while a change was under way
  logic skip_apply = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%0t: %s", $time, msg);
  endtask

  // expected configuration per table row (as programmed below)
  cfg_e table_cfg [5] = '{CFG_22, CFG_32, CFG_33, CFG_33, CFG_44};
  // normalised commit rate (x100) per rate range and configuration
  int norm [5][4] = '{'{100, 96, 93, 91}, '{100, 95, 91, 87}, '{100, 92, 85, 78},
                      '{100, 89, 79, 73}, '{100, 83, 69, 63}};

  // ---------------- clock generator and pipeline drain models ----------------
  int lock_cnt = 0, drain_cnt = 0;
  always_ff @(posedge clk) begin
    if (pll_change) begin lock_cnt <= SETTLE; n_relock++; end
    else if (lock_cnt > 0) lock_cnt <= lock_cnt - 1;
    if (!fetch_stop) drain_cnt <= DRAIN;
    else if (drain_cnt > 0) begin drain_cnt <= drain_cnt - 1; if (drain_cnt == DRAIN) n_drain_wait++; end
  end
  assign pll_locked = (lock_cnt == 0);
  assign pipe_empty = fetch_stop && (drain_cnt == 0);

  // ---------------- program phases ----------------
  int phase_rate_q [4] = '{640, 102, 640, 307};   // 2.5, 0.4, 2.5, 1.2 commits/cycle
  int phase_blocks [4] = '{8, 20, 30, 34};
  int prog_phase = 0, blocks_in_prog = 0, acc = 0;

  function automatic int eff_rate(int base, cfg_e c);
    return base * norm[rate_row(rate_t'(base))][c] / 100;
  endfunction

  // ---------------- expected phase outcome ----------------
  logic exp_pending = 0;
  cfg_e exp_cfg;

  // register scoreboard for the free list
  int outstanding [$];
  logic [63:0] last_pc;
  logic        last_stall;
  int          last_width;
  int          cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // events
    if (ev_block) n_blocks++;
    if (ev_applied) n_apply++;
    if (ev_sn_trial) n_trial++;
    if (ev_sn_keep) n_keep++;
    if (ev_sn_revert) n_revert++;
    if (ev_new_phase) begin
      n_phase++;
      exp_cfg = table_cfg[rate_row(ev_new_rate)];
      exp_pending = (exp_cfg != cur_cfg);
      if (fetch_stop) begin
        // a change (a safety-net trial) is under way: the phase change must
        // follow it rather than be lost
        n_held++;
        skip_apply = 1;
        exp_pending = 1;
      end
      $display("%0t: new phase, rate %0d/256 -> %0d (now %0d)", $time, ev_new_rate, exp_cfg, cur_cfg);
    end
    if (ev_applied) begin
      $display("%0t: configuration %0d applied", $time, cur_cfg);
      if (skip_apply) begin
        skip_apply = 0;
        if (cur_cfg == exp_cfg) exp_pending = 0;
      end else if (exp_pending) begin
        checks++;
        exp_pending = 0;
        if (cur_cfg != exp_cfg) fail($sformatf("phase change gave %0d, expected %0d", cur_cfg, exp_cfg));
      end
    end
    // way enables against the configuration
    checks++;
    if ($countones(ren_en) != fe_width(cur_cfg) || $countones(dec_en) != fe_width(cur_cfg) ||
        $countones(be_en) != be_width(cur_cfg) || fetch_width != fe_width(cur_cfg) ||
        reg_mask_en != (cur_cfg != CFG_44) || !steer_ok)
      fail($sformatf("enables %b %b %b for cfg %0d", dec_en, ren_en, be_en, cur_cfg));
    // issue only on enabled back-end ways, rename only on enabled ways
    checks++;
    if ((iss_valid & ~be_en) != '0 || (ren_valid & ~ren_en) != '0 || (fp_iss_valid & ~fp_en) != '0)
      fail("traffic on a disabled way");
    // the back end issues as many as are ready, up to its width
    checks++;
    if ($countones(iss_valid) != (($countones(iq_ready) < int'(be_width(cur_cfg))) ? $countones(iq_ready) : int'(be_width(cur_cfg))))
      fail("issue count");
    // allocation never hands out a slow register in a fast configuration
    for (int k = 0; k < NWAYS; k++) if (ren_dst_valid[k]) begin
      checks++;
      if (reg_mask_en && tt_slow_reg[ren_dst[k]]) fail($sformatf("slow register %0d allocated", ren_dst[k]));
      if (!rename_stall) outstanding.push_back(int'(ren_dst[k]));
    end
    // fetch PC
    if (cyc > 2) begin
      checks++;
      if (fetch_pc != (last_stall ? last_pc : last_pc + 64'(last_width * 4))) fail("fetch pc");
    end
    last_pc = fetch_pc; last_stall = fetch_stop; last_width = int'(fetch_width);
    // coverage
    if ((dec_valid & ~dec_en) != '0 && cur_cfg != CFG_44) n_null_rename++;
    if ((dec_sel & dec_en) != '0) n_steer++;
    if (reg_mask_en) n_mask++;
    if (rename_stall) n_fl_stall++;
    if (fp_en != 2'b11) n_fp_off++;
    n_w[fetch_width]++;
  end

  // ---------------- stimulus ----------------
  always @(negedge clk) if (rst_n) begin
    int r, c;
    // commits follow the program phase and the configuration
    if (reconfig_busy) commit_cnt = '0;
    else begin
      r = eff_rate(phase_rate_q[prog_phase], cur_cfg);
      acc += r;
      c = acc / 256;
      if (c > 4) c = 4;
      acc -= c * 256;
      commit_cnt = 3'(c);
    end
    if (ev_block) begin
      blocks_in_prog++;
      if (blocks_in_prog == phase_blocks[prog_phase] && prog_phase < 3) begin
        prog_phase++; blocks_in_prog = 0;
      end
    end
    // pipeline slice traffic
    dec_valid = fetch_stop ? '0 : NWAYS'($urandom);
    for (int k = 0; k < NWAYS; k++) begin
      dec_uop[k]  = arch_uop_t'($urandom);
      map_src1[k] = PREG_W'($urandom);
      map_src2[k] = PREG_W'($urandom);
    end
    iq_ready = IQ'($urandom) & IQ'($urandom);
    fp_iq_ready = 16'($urandom) & 16'($urandom);
    // return registers, except during periodic starvation windows
    free_valid = '0;
    if ((cyc / 1500) % 6 != 5) begin
      for (int k = 0; k < NWAYS; k++) if (outstanding.size() > 0 && $urandom_range(0, 3) != 0) begin
        free_valid[k] = 1'b1;
        free_idx[k]   = 8'(outstanding.pop_front());
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tt_cfg_freq  = '{grade_t'(100), grade_t'(115), grade_t'(130), grade_t'(135)};
    tt_dec_grade = '{grade_t'(70), grade_t'(90), grade_t'(95), grade_t'(92)};
    tt_ren_grade = '{grade_t'(96), grade_t'(94), grade_t'(93), grade_t'(72)};
    tt_be_grade  = '{grade_t'(91), grade_t'(68), grade_t'(97), grade_t'(93)};
    tt_fp_grade  = '{grade_t'(99), grade_t'(80)};
    tt_slow_reg  = '0;
    for (int i = 0; i < 40; i++) tt_slow_reg[70 + 4 * i] = 1'b1;   // 40 of 256 (< 20%)
    for (int i = 0; i < NWAYS; i++) begin free_idx[i] = '0; dec_uop[i] = '0; map_src1[i] = '0; map_src2[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // test-time programming of the estimate table
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); tt_table_we = 1; tt_table_row = 3'(i); tt_table_cfg = table_cfg[i];
    end
    @(negedge clk); tt_table_we = 0;
    wait (prog_phase == 3 && blocks_in_prog == phase_blocks[3] - 1);
    repeat (TBLK) @(negedge clk);
    $display("blocks %0d phases %0d applied %0d relocks %0d drains %0d trials %0d keeps %0d reverts %0d",
             n_blocks, n_phase, n_apply, n_relock, n_drain_wait, n_trial, n_keep, n_revert);
    $display("phase changes found during a reconfiguration %0d", n_held);
    $display("null-rename cycles %0d steering %0d masking %0d free-list stalls %0d fp-off %0d widths 2:%0d 3:%0d 4:%0d",
             n_null_rename, n_steer, n_mask, n_fl_stall, n_fp_off, n_w[2], n_w[3], n_w[4]);
    checks++; if (n_phase < 3) fail("too few phase changes");
    checks++; if (n_relock == 0 || n_relock != n_apply) fail("relocks");
    checks++; if (n_drain_wait == 0) fail("no drain");
    checks++; if (n_trial == 0) fail("no safety-net trial");
    checks++; if (n_keep == 0) fail("no safety-net keep");
    checks++; if (n_revert == 0) fail("no safety-net revert");
    checks++; if (n_null_rename == 0) fail("no NULL rename way");
    checks++; if (n_steer == 0) fail("no decode steering");
    checks++; if (n_mask == 0) fail("no register masking");
    checks++; if (n_fl_stall == 0) fail("no free-list stall");
    checks++; if (n_fp_off == 0) fail("no FP adder off");
    checks++; if (n_w[2] == 0 || n_w[3] == 0 || n_w[4] == 0) fail("not every width used");
    checks++; if (exp_pending) fail("last phase change never applied");
    checks++; if (n_held == 0) fail("no phase change during a reconfiguration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
