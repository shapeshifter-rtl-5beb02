// Self-checking test of safety_net with a sample interval of 3 and a
// period of 5 blocks. The testbench plays the sequencer: it applies every
// requested configuration two cycles later. Clock codes: 4-4 100, 3-3 115,
// 3-2 130, 2-2 135. Expected decisions are worked out from commits*code:
//  1. 4-4 at 300/block; trial one step narrower (3-3) at 280: 840*115 >
//     900*100, kept.
//  2. next trial one step wider (4-4) at 290: 870*100 < 840*115, reverted.
//  3. next trial narrower (3-2) at 200: 600*130 < 840*115, reverted.
//  4. a cancel (new phase) during a trial stops it without a revert.
//  5. from 2-2 the trial is always one step wider.
// A 3000-block random run then follows a block-level model of the rules.
module tb_safety_net;
  import shs_pkg::*;
  localparam int TB = 100, SI = 3, PER = 5;
  logic clk = 0, rst_n = 0, enable = 1, block_done = 0, applied = 0, cancel = 0;
  logic [$clog2(TB*4+1)-1:0] block_count = '0;
  cfg_e cur_cfg = CFG_44, req_cfg;
  grade_t cfg_freq [NCFG];
  logic req, trial_start, trial_keep, trial_revert;
  int checks = 0, failures = 0, n_req = 0, n_keep = 0, n_revert = 0;
  cfg_e last_req;

  safety_net #(.TIME_BLOCK(TB), .SAMPLE_INTERVAL(SI), .PERIOD_BLOCKS(PER)) dut (.*);
  always #5 clk = ~clk;

  // sequencer model: applies a request two cycles after it
  int   pend = 0;
  cfg_e pend_cfg;
  always @(posedge clk) begin
    applied <= 1'b0;
    if (rst_n && req) begin n_req++; last_req = req_cfg; pend = 2; pend_cfg = req_cfg; end
    else if (pend > 1) pend--;
    else if (pend == 1) begin pend = 0; cur_cfg <= pend_cfg; applied <= 1'b1; end
    if (rst_n && trial_keep) n_keep++;
    if (rst_n && trial_revert) n_revert++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic blk(input int count);
    @(negedge clk); block_done = 1; block_count = 9'(count);
    @(negedge clk); block_done = 0;
    repeat (8) @(negedge clk);
  endtask

  task automatic expect_state(input string what, input int e_req, e_keep, e_rev, input cfg_e e_cfg);
    checks++;
    if (n_req != e_req || n_keep != e_keep || n_revert != e_rev || cur_cfg != e_cfg) begin
      failures++;
      $display("%s: req %0d keep %0d revert %0d cfg %0d, expected %0d %0d %0d %0d",
               what, n_req, n_keep, n_revert, cur_cfg, e_req, e_keep, e_rev, e_cfg);
    end
  endtask

  // Random run against a block-level model of the rules: a trial when the
  // period has run out and the window is full, alternating direction with
  // the ends forced, keep if commits*code beats the window taken before the
  // trial, otherwise revert; the window and the period restart on every
  // applied configuration, the period also on every decision.
  task automatic random_run();
    int   m_win [$];
    int   m_period = 0, m_base_sum = 0, m_req = 0, m_keep = 0, m_rev = 0;
    bit   m_meas = 0, m_wider = 0;
    cfg_e m_cfg = CFG_44, m_base = CFG_44;
    int   rate = 300, norm [NCFG];
    enable = 1;
    @(negedge clk); rst_n = 0; cur_cfg = CFG_44;
    @(negedge clk); n_req = 0; n_keep = 0; n_revert = 0; rst_n = 1;
    for (int b = 0; b < 3000; b++) begin
      int c, sum;
      bit w;
      if (b % 40 == 0) begin
        // a new program behaviour: commits per block in 4-4 and the share
        // kept by each narrower configuration
        rate    = $urandom_range(150, 390);
        norm[0] = 100;
        norm[1] = $urandom_range(80, 100);
        norm[2] = norm[1] - $urandom_range(0, 15);
        norm[3] = norm[2] - $urandom_range(0, 10);
      end
      c = rate * norm[cur_cfg] / 100 + $urandom_range(0, 6) - 3;
      blk(c);
      // model
      m_win.push_back(c);
      if (m_win.size() > SI) void'(m_win.pop_front());
      sum = 0;
      foreach (m_win[i]) sum += m_win[i];
      if (!m_meas) begin
        if (m_period < PER) m_period++;
        if (m_period == PER && m_win.size() == SI) begin
          w = m_wider;
          if (m_cfg == CFG_44) w = 0;
          if (m_cfg == CFG_22) w = 1;
          m_base = m_cfg; m_base_sum = sum;
          m_cfg = w ? cfg_e'(int'(m_cfg) - 1) : cfg_e'(int'(m_cfg) + 1);
          m_wider = !w; m_win.delete(); m_meas = 1; m_req++;
        end
      end else if (m_win.size() == SI) begin
        if (sum * int'(cfg_freq[m_cfg]) > m_base_sum * int'(cfg_freq[m_base])) m_keep++;
        else begin m_cfg = m_base; m_win.delete(); m_rev++; m_req++; end
        m_meas = 0; m_period = 0;
      end
      checks++;
      if (cur_cfg != m_cfg || n_req != m_req || n_keep != m_keep || n_revert != m_rev) begin
        failures++;
        $display("random block %0d: cfg %0d req %0d keep %0d revert %0d, model %0d %0d %0d %0d",
                 b, cur_cfg, n_req, n_keep, n_revert, m_cfg, m_req, m_keep, m_rev);
        break;
      end
    end
  endtask

  initial begin
    cfg_freq = '{grade_t'(100), grade_t'(115), grade_t'(130), grade_t'(135)};
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (4) blk(300);
    expect_state("before period", 0, 0, 0, CFG_44);
    blk(300);
    expect_state("trial 1 requested", 1, 0, 0, CFG_33);
    repeat (3) blk(280);
    expect_state("trial 1 kept", 1, 1, 0, CFG_33);
    repeat (5) blk(280);
    expect_state("trial 2 requested", 2, 1, 0, CFG_44);
    repeat (3) blk(290);
    expect_state("trial 2 reverted", 3, 1, 1, CFG_33);
    repeat (5) blk(280);
    expect_state("trial 3 requested", 4, 1, 1, CFG_32);
    repeat (3) blk(200);
    expect_state("trial 3 reverted", 5, 1, 2, CFG_33);
    // trial 4 (wider, 4-4) cancelled by a new phase after one block
    repeat (5) blk(280);
    expect_state("trial 4 requested", 6, 1, 2, CFG_44);
    blk(400);
    @(negedge clk); cancel = 1; @(negedge clk); cancel = 0;
    repeat (3) blk(100);
    expect_state("trial 4 cancelled", 6, 1, 2, CFG_44);
    // move to 2-2 by hand, as a phase change would
    @(negedge clk); cur_cfg = CFG_22; applied = 1; @(negedge clk); applied = 0;
    repeat (PER) blk(150);
    checks++;
    if (last_req != CFG_32) begin failures++; $display("from 2-2 asked for %0d", last_req); end
    // disabled: no more trials
    enable = 0;
    repeat (3) blk(150);
    repeat (3 * PER) blk(150);
    expect_state("disabled", 8, 1, 3, CFG_22);
    random_run();
    $display("random run: %0d trials, %0d kept, %0d reverted", n_req - n_revert, n_keep, n_revert);
    checks++;
    if (n_keep < 5 || n_revert < 5) begin failures++; $display("random run too one-sided"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
