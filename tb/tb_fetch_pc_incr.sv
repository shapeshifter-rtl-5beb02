// Self-checking test of fetch_pc_incr: the PC advances by width*4 bytes for
// each fetch width, holds on stall, and takes redirects.
module tb_fetch_pc_incr;
  logic clk = 0, rst_n = 0, stall = 0, redirect = 0;
  logic [2:0] width = 3'd4;
  logic [63:0] redirect_pc = '0, pc;
  logic [63:0] exp_pc;
  int checks = 0, failures = 0;

  fetch_pc_incr #(.PC_W(64), .RESET_PC(64'h1000)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_pc = 64'h1000;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      width       = 3'($urandom_range(2, 4));
      stall       = ($urandom_range(0, 5) == 0);
      redirect    = ($urandom_range(0, 9) == 0);
      redirect_pc = {$urandom, $urandom} & ~64'h3;
      @(negedge clk);
      if (redirect) exp_pc = redirect_pc;
      else if (!stall) exp_pc = exp_pc + 64'(width) * 4;
      checks++;
      if (pc != exp_pc) begin failures++; $display("pc %h expected %h", pc, exp_pc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
