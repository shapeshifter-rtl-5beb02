// Self-checking test of seq_divider: random 32-bit divisions against the
// simulator's own division, division by zero, and the latency of DW+1
// cycles from start to done.
module tb_seq_divider;
  localparam int DW = 32;
  logic clk = 0, rst_n = 0, start = 0;
  logic [DW-1:0] dividend = '0, divisor = '0, quotient;
  logic busy, done;
  int checks = 0, failures = 0;

  seq_divider #(.DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [DW-1:0] a, input logic [DW-1:0] b);
    int lat;
    logic [DW-1:0] expq;
    expq = (b == 0) ? '1 : a / b;
    @(negedge clk); dividend = a; divisor = b; start = 1;
    @(negedge clk); start = 0; dividend = '0; divisor = '0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (quotient != expq) begin failures++; $display("%0d/%0d = %0d expected %0d", a, b, quotient, expq); end
    checks++;
    if (lat != DW + 1) begin failures++; $display("latency %0d expected %0d", lat, DW + 1); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run(100, 7); run(0, 5); run(5, 0); run(32'hFFFF_FFFF, 1); run(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    run(400 << 8, 100000); run(123456 << 8, 100000);
    for (int i = 0; i < 200; i++) begin
      logic [DW-1:0] a, b;
      a = $urandom; b = $urandom >> $urandom_range(0, 31);
      run(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
