// Self-checking test of estimate_table: reset contents, test-time writes,
// and the range boundaries 0.5, 1.0, 1.5 and 2.0 commits per cycle
// (128, 256, 384, 512 in 1/256 units). Table contents follow the example
// of a chip whose clock codes make 3-2 best for rates 1.0-1.5.
module tb_estimate_table;
  import shs_pkg::*;
  logic clk = 0, rst_n = 0, tt_we = 0;
  logic [2:0] tt_row = '0, row;
  cfg_e tt_cfg = CFG_44, cfg;
  rate_t rate = '0;
  int checks = 0, failures = 0;

  estimate_table dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic look(input int r, input int erow, input cfg_e ecfg);
    rate = rate_t'(r); #1;
    checks++;
    if (row != 3'(erow) || cfg != ecfg) begin
      failures++; $display("rate %0d: row %0d cfg %0d, expected %0d %0d", r, row, cfg, erow, ecfg);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    look(0, 0, CFG_44); look(600, 4, CFG_44);
    begin
      cfg_e prog [5];
      prog = '{CFG_22, CFG_32, CFG_32, CFG_33, CFG_44};
      for (int i = 0; i < 5; i++) begin
        @(negedge clk); tt_we = 1; tt_row = 3'(i); tt_cfg = prog[i];
      end
      @(negedge clk); tt_we = 1; tt_row = 3'd6; tt_cfg = CFG_22;   // out of range: ignored
      @(negedge clk); tt_we = 0;
    end
    look(0, 0, CFG_22);   look(127, 0, CFG_22); look(128, 1, CFG_32);
    look(255, 1, CFG_32); look(256, 2, CFG_32); look(383, 2, CFG_32);
    look(384, 3, CFG_33); look(511, 3, CFG_33); look(512, 4, CFG_44);
    look(1024, 4, CFG_44);
    // a second test-time write overrides a row
    @(negedge clk); tt_we = 1; tt_row = 3'd4; tt_cfg = CFG_33;
    @(negedge clk); tt_we = 0;
    look(600, 4, CFG_33); look(300, 2, CFG_32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
