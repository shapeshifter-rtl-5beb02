// Full-size run of shapeshifter_top with every parameter at its default:
// 100,000-cycle time blocks, a sample interval of 10, a 0.5 threshold and
// a safety-net period of 200 blocks (20 million cycles). The clock
// generator model takes 60,000 cycles to relock (20 us at 3 GHz).
//
// The program runs 3 blocks at 2.5 commits per cycle, then drops to 0.4.
// Expected: after 10 low blocks a new phase is declared with a rate of
// 0.4, the table (0-0.5 -> 2-2) gives 2-2, the pipeline drains, the clock
// relocks and 2-2 is applied. 200 blocks later the safety net tries 3-2
// (the only neighbour of 2-2); 3-2 commits 0.372 per cycle at clock code
// 130 against 0.364 at 135 for 2-2, so it reverts to 2-2. The core model
// scales its commit rate with the configuration by the normalised rates
// of the evaluation for the 0-0.5 range.
module tb_shapeshifter_full;
  import shs_pkg::*;
  localparam int TBLK = 100000, SETTLE = 60000, DRAIN = 40;

  logic clk = 0, rst_n = 0;
  logic tt_table_we = 0;
  logic [2:0] tt_table_row = '0;
  cfg_e tt_table_cfg = CFG_44;
  grade_t tt_cfg_freq [NCFG], tt_dec_grade [NWAYS], tt_ren_grade [NWAYS], tt_be_grade [NWAYS], tt_fp_grade [NFPWAYS];
  logic [255:0] tt_slow_reg = '0;
  logic sn_enable = 1;
  logic [2:0] commit_cnt = '0;
  logic pipe_empty, pll_change, pll_locked;
  grade_t pll_freq;
  logic fetch_stop;
  logic [63:0] fetch_pc;
  logic [2:0] fetch_width;
  logic [3:0] ren_valid, ren_dst_valid, iss_valid;
  arch_uop_t dec_uop [4], ren_uop [4];
  logic [7:0] map_src [4], ren_src1 [4], ren_src2 [4], ren_dst [4], free_idx [4];
  logic [8:0] free_count;
  logic rename_stall;
  logic [4:0] iss_idx [4];
  logic [1:0] fp_iss_valid;
  logic [3:0] fp_iss_idx [2];
  cfg_e cur_cfg;
  logic [3:0] dec_en, dec_sel, ren_en, be_en;
  logic [1:0] fp_en;
  logic reg_mask_en, steer_ok, reconfig_busy;
  logic ev_block, ev_new_phase, ev_applied, ev_sn_trial, ev_sn_keep, ev_sn_revert;
  rate_t ev_new_rate, ev_block_rate, ev_phase_rate;

  shapeshifter_top dut (
    .clk, .rst_n, .tt_table_we, .tt_table_row, .tt_table_cfg, .tt_cfg_freq, .tt_dec_grade,
    .tt_ren_grade, .tt_be_grade, .tt_fp_grade, .tt_slow_reg, .sn_enable, .commit_cnt,
    .pipe_empty, .pll_freq, .pll_change, .pll_locked,
    .fetch_hold(1'b0), .redirect(1'b0), .redirect_pc(64'h0), .fetch_pc, .fetch_width, .fetch_stop,
    .dec_valid(4'b0), .dec_uop, .ren_valid, .ren_uop, .map_src1(map_src), .map_src2(map_src),
    .ren_src1, .ren_src2, .ren_dst, .ren_dst_valid, .rename_stall,
    .free_valid(4'b0), .free_idx, .free_count, .iq_ready(32'h0), .iss_valid, .iss_idx,
    .fp_iq_ready(16'h0), .fp_iss_valid, .fp_iss_idx,
    .cur_cfg, .dec_en, .dec_sel, .ren_en, .be_en, .fp_en, .reg_mask_en, .steer_ok, .reconfig_busy,
    .ev_block, .ev_new_phase, .ev_new_rate, .ev_block_rate, .ev_phase_rate, .ev_applied,
    .ev_sn_trial, .ev_sn_keep, .ev_sn_revert
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int blocks = 0, phases = 0, applies = 0, trials = 0, keeps = 0, reverts = 0;
  longint cyc = 0, phase_cyc = 0, apply_cyc = 0;
  int lock_cnt = 0, drain_cnt = 0, acc = 0;
  int rate_q;   // commits per cycle x256 of the running program
  cfg_e phase_cfg;

  always_ff @(posedge clk) begin
    if (pll_change) lock_cnt <= SETTLE;
    else if (lock_cnt > 0) lock_cnt <= lock_cnt - 1;
    if (!fetch_stop) drain_cnt <= DRAIN;
    else if (drain_cnt > 0) drain_cnt <= drain_cnt - 1;
  end
  assign pll_locked = (lock_cnt == 0);
  assign pipe_empty = fetch_stop && (drain_cnt == 0);

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ev_block) blocks++;
    if (ev_new_phase) begin
      phases++; phase_cyc = cyc;
      $display("cycle %0d: new phase, rate %0d/256", cyc, ev_new_rate);
      checks++;
      if (ev_new_rate < 100 || ev_new_rate > 106) begin failures++; $display("new phase rate %0d, expected about 102", ev_new_rate); end
    end
    if (ev_applied) begin
      applies++; apply_cyc = cyc;
      $display("cycle %0d: configuration %0d applied", cyc, cur_cfg);
    end
    if (ev_sn_trial) trials++;
    if (ev_sn_keep) keeps++;
    if (ev_sn_revert) reverts++;
  end

  always @(negedge clk) if (rst_n) begin
    int c, r;
    r = (blocks < 3) ? 640 : 102;
    r = r * ((cur_cfg == CFG_44) ? 100 : (cur_cfg == CFG_33) ? 96 : (cur_cfg == CFG_32) ? 93 : 91) / 100;
    if (reconfig_busy) commit_cnt = '0;
    else begin
      acc += r; c = acc / 256; if (c > 4) c = 4; acc -= c * 256; commit_cnt = 3'(c);
    end
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
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
    for (int i = 0; i < 4; i++) begin dec_uop[i] = '0; map_src[i] = '0; free_idx[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    begin
      cfg_e tab [5];
      tab = '{CFG_22, CFG_32, CFG_32, CFG_33, CFG_44};
      for (int i = 0; i < 5; i++) begin
        @(negedge clk); tt_table_we = 1; tt_table_row = 3'(i); tt_table_cfg = tab[i];
      end
      @(negedge clk); tt_table_we = 0;
    end
    // phase change and reconfiguration
    wait (applies == 1);
    @(negedge clk);
    checks++;
    if (phases != 1 || cur_cfg != CFG_22 || blocks != 13) begin
      failures++; $display("after phase change: phases %0d cfg %0d blocks %0d", phases, cur_cfg, blocks);
    end
    // drain, relock and apply take DRAIN + SETTLE plus a few handshake cycles
    checks++;
    if (apply_cyc - phase_cyc < longint'(DRAIN) + longint'(SETTLE) || apply_cyc - phase_cyc > longint'(DRAIN) + longint'(SETTLE) + 10) begin
      failures++; $display("reconfiguration took %0d cycles", apply_cyc - phase_cyc);
    end
    checks++;
    if ($countones(ren_en) != 2 || $countones(be_en) != 2 || fetch_width != 3'd2 || !reg_mask_en || pll_freq != 135) begin
      failures++; $display("2-2 enables wrong");
    end
    // safety-net trial of 3-2 and the revert
    wait (applies == 3);
    @(negedge clk);
    checks++;
    if (trials != 1 || reverts != 1 || keeps != 0 || cur_cfg != CFG_22 || phases != 1) begin
      failures++; $display("safety net: trials %0d keeps %0d reverts %0d cfg %0d phases %0d", trials, keeps, reverts, cur_cfg, phases);
    end
    checks++;
    if (blocks != 13 + 200 + 10) begin failures++; $display("trial ended after block %0d", blocks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
