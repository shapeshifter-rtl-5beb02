// Self-checking test of phase_detector with 400-cycle blocks, a
// sample interval of 4 and a threshold of 0.5 commits per cycle. Block
// counts are driven directly. Expected rates are count*256/400 rounded
// down. The scenario: a phase at 1.0; three blocks at 2.0 that are then
// broken by a block at 1.0 (no new phase, and the three are folded into
// the average); four blocks at 2.0 (new phase, rate 2.0); small changes
// within the new phase (no new phase); a drop to 0.25 (new phase); a
// restart followed by a new average.
module tb_phase_detector;
  import shs_pkg::*;
  localparam int TB = 400, SI = 4;
  logic clk = 0, rst_n = 0, block_done = 0, restart = 0;
  logic [$clog2(TB*4+1)-1:0] block_count = '0;
  logic new_phase, busy;
  rate_t new_rate, block_rate, phase_rate;
  int checks = 0, failures = 0, phases = 0;
  rate_t last_new_rate;

  phase_detector #(.TIME_BLOCK(TB), .SAMPLE_INTERVAL(SI), .ILP_DELTA_Q(128)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (new_phase) begin phases++; last_new_rate <= new_rate; end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one block end; waits TB cycles like a real block
  task automatic blk(input int count, input int exp_phases, input int exp_phase_rate);
    @(negedge clk); block_done = 1; block_count = 11'(count);
    @(negedge clk); block_done = 0;
    repeat (TB - 2) @(negedge clk);
    checks++;
    if (block_rate != rate_t'(count * 256 / TB)) begin failures++; $display("block_rate %0d expected %0d", block_rate, count * 256 / TB); end
    checks++;
    if (phases != exp_phases) begin failures++; $display("after block %0d: %0d phases, expected %0d", count, phases, exp_phases); end
    if (exp_phase_rate >= 0) begin
      checks++;
      if (phase_rate != rate_t'(exp_phase_rate)) begin failures++; $display("phase_rate %0d expected %0d", phase_rate, exp_phase_rate); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (6) blk(400, 0, 256);             // phase at 1.0
    blk(800, 0, 256); blk(800, 0, 256); blk(800, 0, 256);
    blk(400, 0, 256);                        // run broken: folded in
    // average is now (6*400 + 3*800 + 400) / (10*400) = 1.3 -> 332
    blk(800, 0, 332); blk(800, 0, 332); blk(800, 0, 332); blk(800, 1, 332);
    checks++;
    if (last_new_rate != rate_t'(512)) begin failures++; $display("new_rate %0d", last_new_rate); end
    blk(800, 1, 512);                        // first block of the new phase
    blk(760, 1, 512); blk(840, 1, 499); blk(700, 1, 512);
    repeat (3) blk(100, 1, -1);
    blk(100, 2, -1);
    checks++;
    if (last_new_rate != rate_t'(64)) begin failures++; $display("new_rate %0d", last_new_rate); end
    // restart: the next block only sets the average
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    blk(1200, 2, 768);
    blk(1000, 2, 768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
