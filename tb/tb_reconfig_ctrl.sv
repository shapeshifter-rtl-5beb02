// Self-checking test of reconfig_ctrl with a model clock generator that
// drops lock the cycle after a change request and regains it SETTLE cycles
// later, and a pipeline that empties DRAIN cycles after fetch stops.
// Checks: requests for the active configuration are ignored; fetch stops
// at once; the clock change waits for the empty pipeline; the requested
// clock code is the target's; the new configuration is applied only after
// lock, with the expected total latency; a phase request wins over a
// simultaneous safety-net request; a phase request that arrives while a
// change is under way is carried out right after it. A random run then
// varies the drain and settle times, the requests and late phase requests,
// and a monitor checks at every cycle that the clock changes only with an
// empty pipeline and the configuration only after a full relock.
module tb_reconfig_ctrl;
  import shs_pkg::*;
  int SETTLE = 40, DRAIN = 7;
  logic clk = 0, rst_n = 0;
  grade_t cfg_freq [NCFG];
  logic ph_req = 0, sn_req = 0, pipe_empty, pll_locked, fetch_stop, pll_change, applied, applied_phase, busy;
  cfg_e ph_cfg = CFG_44, sn_cfg = CFG_44, cur_cfg;
  grade_t pll_freq;
  int checks = 0, failures = 0;
  int lock_cnt = 0, drain_cnt = 0;
  logic early_change = 0;

  reconfig_ctrl dut (.*);
  always #5 clk = ~clk;

  // clock generator and pipeline models
  always_ff @(posedge clk) begin
    if (pll_change) lock_cnt <= SETTLE;
    else if (lock_cnt > 0) lock_cnt <= lock_cnt - 1;
    if (!fetch_stop) drain_cnt <= DRAIN;
    else if (drain_cnt > 0) drain_cnt <= drain_cnt - 1;
    if (pll_change && drain_cnt != 0) early_change <= 1'b1;
  end

  // protocol monitor
  int   n_applied = 0, n_applied_ph = 0;
  logic seen_change = 0, seen_unlock = 0, seen_relock = 0;
  cfg_e prev_cfg = CFG_44;
  always @(posedge clk) begin
    if (rst_n) begin
      if (pll_change) begin seen_change = 1; seen_unlock = 0; seen_relock = 0; end
      else if (seen_change && !pll_locked) seen_unlock = 1;
      else if (seen_unlock && pll_locked) seen_relock = 1;
      if (applied) begin
        n_applied++;
        if (applied_phase) n_applied_ph++;
        checks++;
        if (!seen_relock) begin failures++; $display("applied without a full relock"); end
        seen_change = 0; seen_unlock = 0; seen_relock = 0;
      end
      if (cur_cfg != prev_cfg && !applied) begin
        checks++; failures++; $display("configuration changed without applied");
      end
      prev_cfg = cur_cfg;
    end
  end
  assign pll_locked = (lock_cnt == 0);
  assign pipe_empty = fetch_stop && (drain_cnt == 0);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic request(input logic ph, input cfg_e pc, input logic sn, input cfg_e sc,
                         input logic expect_change, input cfg_e expect_cfg);
    int lat;
    @(negedge clk); ph_req = ph; ph_cfg = pc; sn_req = sn; sn_cfg = sc;
    @(negedge clk); ph_req = 0; sn_req = 0;
    checks++;
    if (fetch_stop != expect_change) begin failures++; $display("fetch_stop=%b", fetch_stop); end
    if (!expect_change) begin
      repeat (5) @(negedge clk);
      checks++;
      if (busy || cur_cfg != expect_cfg) begin failures++; $display("ignored request changed state"); end
      return;
    end
    lat = 1;
    while (!applied) begin
      @(negedge clk); lat++;
      if (pll_change) begin
        checks++;
        if (pll_freq != cfg_freq[expect_cfg]) begin failures++; $display("pll_freq %0d", pll_freq); end
      end
    end
    checks++;
    if (applied_phase != (ph && pc == expect_cfg)) begin failures++; $display("applied_phase=%b", applied_phase); end
    checks++;
    if (cur_cfg != expect_cfg) begin failures++; $display("cur_cfg %0d expected %0d", cur_cfg, expect_cfg); end
    // request edge, DRAIN+1 edges until the model reports empty, one edge to
    // leave DRAIN, one to pulse the change, one for the model to drop lock,
    // one to see it low, SETTLE edges to relock, one to see lock, one to apply
    checks++;
    if (lat != DRAIN + SETTLE + 6) begin failures++; $display("latency %0d expected %0d", lat, DRAIN + SETTLE + 6); end
    @(negedge clk);
    checks++;
    if (busy || fetch_stop || pll_freq != cfg_freq[expect_cfg]) begin failures++; $display("not idle after apply"); end
  endtask

  task automatic rand_txn();
    logic ph, sn, late, first_ph, changed;
    cfg_e pc, sc, lc, first, final_cfg;
    int   n0, p0, e_n, e_p, wait_late;
    ph = 1'($urandom); sn = 1'($urandom); late = ($urandom_range(0, 2) == 0);
    pc = cfg_e'($urandom_range(0, 3)); sc = cfg_e'($urandom_range(0, 3)); lc = cfg_e'($urandom_range(0, 3));
    DRAIN  = $urandom_range(0, 20);
    SETTLE = $urandom_range(1, 50);
    // expected outcome
    first_ph = ph && pc != cur_cfg;
    first    = first_ph ? pc : (sn && sc != cur_cfg) ? sc : cur_cfg;
    changed  = first != cur_cfg;
    late     = late && changed;
    e_n = int'(changed) + int'(late && lc != first);
    e_p = int'(first_ph) + int'(late && lc != first);
    final_cfg = (late && lc != first) ? lc : first;
    n0 = n_applied; p0 = n_applied_ph;
    @(negedge clk); ph_req = ph; ph_cfg = pc; sn_req = sn; sn_cfg = sc;
    @(negedge clk); ph_req = 0; sn_req = 0;
    if (late) begin
      wait_late = $urandom_range(0, DRAIN + SETTLE + 3);
      repeat (wait_late) @(negedge clk);
      ph_req = 1; ph_cfg = lc;
      @(negedge clk); ph_req = 0;
    end
    repeat (2 * (DRAIN + SETTLE + 10)) @(negedge clk);
    checks++;
    if (cur_cfg != final_cfg || n_applied - n0 != e_n || n_applied_ph - p0 != e_p || busy) begin
      failures++;
      $display("random: cfg %0d applies %0d phase %0d busy %b, expected %0d %0d %0d",
               cur_cfg, n_applied - n0, n_applied_ph - p0, busy, final_cfg, e_n, e_p);
    end
  endtask

  initial begin
    cfg_freq = '{grade_t'(100), grade_t'(115), grade_t'(130), grade_t'(135)};
    repeat (2) @(negedge clk); rst_n = 1;
    checks++;
    if (cur_cfg != CFG_44 || pll_freq != 100) begin failures++; $display("reset state"); end
    request(1, CFG_44, 0, CFG_44, 0, CFG_44);        // same configuration: ignored
    request(1, CFG_32, 0, CFG_44, 1, CFG_32);        // phase change to 3-2
    request(0, CFG_44, 1, CFG_22, 1, CFG_22);        // safety-net trial to 2-2
    request(1, CFG_33, 1, CFG_32, 1, CFG_33);        // both: phase wins
    request(0, CFG_44, 1, CFG_33, 0, CFG_33);        // safety net asks for the current one
    // a phase request during a safety-net change runs right after it
    begin
      int n0, p0;
      n0 = n_applied; p0 = n_applied_ph;
      @(negedge clk); sn_req = 1; sn_cfg = CFG_32;
      @(negedge clk); sn_req = 0;
      repeat (DRAIN + 5) @(negedge clk);
      ph_req = 1; ph_cfg = CFG_22;
      @(negedge clk); ph_req = 0;
      repeat (3 * (DRAIN + SETTLE + 10)) @(negedge clk);
      checks++;
      if (cur_cfg != CFG_22 || n_applied != n0 + 2 || n_applied_ph != p0 + 1 || busy) begin
        failures++;
        $display("late phase request: cfg %0d applies %0d phase applies %0d", cur_cfg, n_applied - n0, n_applied_ph - p0);
      end
    end
    for (int t = 0; t < 400; t++) rand_txn();
    checks++;
    if (early_change) begin failures++; $display("clock changed before the pipeline was empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
