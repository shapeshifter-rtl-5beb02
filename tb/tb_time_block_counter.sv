// Self-checking test of time_block_counter: random commits per cycle, a
// short block of 50 cycles, and pause windows. An independent model counts
// unpaused cycles and commits and predicts every block end and its total.
module tb_time_block_counter;
  localparam int TB = 50;
  logic clk = 0, rst_n = 0, pause = 0;
  logic [2:0] commit_cnt = '0;
  logic block_done;
  logic [$clog2(TB*4+1)-1:0] block_count;
  int checks = 0, failures = 0, blocks = 0;
  int ref_cyc = 0, ref_acc = 0, exp_count = -1;

  time_block_counter #(.TIME_BLOCK(TB), .COMMIT_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20 * TB; c++) begin
      // drive this cycle
      pause      = (c % 170) > 150;
      commit_cnt = 3'($urandom_range(0, 4));
      exp_count  = -1;
      if (!pause) begin
        ref_acc += int'(commit_cnt);
        if (ref_cyc == TB - 1) begin
          exp_count = ref_acc; ref_acc = 0; ref_cyc = 0;
        end else ref_cyc++;
      end
      @(negedge clk);
      // compare what the edge produced
      checks++;
      if (block_done !== (exp_count >= 0)) begin
        failures++; $display("cycle %0d: block_done=%0b expected %0b", c, block_done, exp_count >= 0);
      end else if (block_done && int'(block_count) != exp_count) begin
        failures++; $display("block count %0d expected %0d", block_count, exp_count);
      end
      if (block_done) blocks++;
    end
    checks++;
    if (blocks < 15) begin failures++; $display("only %0d blocks", blocks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
