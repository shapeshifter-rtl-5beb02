// Self-checking test of free_list with 32 registers, 8 of them holding
// the architectural state at reset and 6 marked slow. A scoreboard tracks
// which registers are free. Checks: allocation returns the lowest free,
// allowed registers in way order; slow registers are never handed out
// while masking is on, and are handed out again once it is off; a request
// that cannot be met stalls the whole group; returned registers come back.
module tb_free_list;
  localparam int NP = 32, NA = 8, N = 4;
  logic clk = 0, rst_n = 0, mask_en = 0, stall;
  logic [NP-1:0] slow_mask;
  logic [N-1:0] alloc_req = '0, alloc_gnt, free_valid = '0;
  logic [4:0] alloc_idx [N], free_idx [N];
  logic [5:0] free_count;
  logic [NP-1:0] sb_free;
  int checks = 0, failures = 0, stalls = 0, slow_given = 0;

  free_list #(.NPREG(NP), .NARCH(NA), .N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    slow_mask = 32'h0104_2090;   // registers 4, 7, 13, 18 and 24 (at most 20% allowed)
    for (int i = 0; i < N; i++) free_idx[i] = '0;
    sb_free = '0;
    for (int r = NA; r < NP; r++) sb_free[r] = 1'b1;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      logic [NP-1:0] allowed, pool;
      logic [N-1:0] want;
      int expi [N];
      logic can;
      mask_en   = (t % 600) < 400;
      alloc_req = N'($urandom);
      // return some allocated registers
      free_valid = '0;
      for (int k = 0; k < N; k++) begin
        int r;
        r = $urandom_range(0, NP - 1);
        if (!sb_free[r] && $urandom_range(0, 2) != 0) begin
          logic dup;
          dup = 1'b0;
          for (int m = 0; m < k; m++) if (free_valid[m] && free_idx[m] == 5'(r)) dup = 1'b1;
          if (!dup) begin free_valid[k] = 1'b1; free_idx[k] = 5'(r); end
        end
      end
      // expectation
      allowed = sb_free & ~(mask_en ? slow_mask : '0);
      pool = allowed; can = 1'b1;
      for (int k = 0; k < N; k++) begin
        expi[k] = -1;
        if (alloc_req[k]) begin
          for (int r = 0; r < NP; r++) if (pool[r]) begin expi[k] = r; break; end
          if (expi[k] < 0) can = 1'b0; else pool[expi[k]] = 1'b0;
        end
      end
      #1;
      checks++;
      if (stall != !can) begin failures++; $display("t=%0d stall=%b expected %b", t, stall, !can); end
      checks++;
      if (free_count != 6'($countones(allowed))) begin failures++; $display("free_count %0d expected %0d", free_count, $countones(allowed)); end
      if (can) begin
        for (int k = 0; k < N; k++) if (alloc_req[k]) begin
          checks++;
          if (!alloc_gnt[k] || alloc_idx[k] != 5'(expi[k])) begin
            failures++; $display("t=%0d way %0d got %0d expected %0d", t, k, alloc_idx[k], expi[k]);
          end
          if (mask_en && slow_mask[alloc_idx[k]]) begin failures++; $display("slow register %0d allocated", alloc_idx[k]); end
          if (slow_mask[expi[k]]) slow_given++;
          sb_free[expi[k]] = 1'b0;
        end
      end else begin
        stalls++;
        checks++;
        if (alloc_gnt != '0) begin failures++; $display("grant during stall"); end
      end
      for (int k = 0; k < N; k++) if (free_valid[k]) sb_free[free_idx[k]] = 1'b1;
      @(negedge clk);
    end
    checks++;
    if (stalls == 0 || slow_given == 0) begin failures++; $display("coverage stalls=%0d slow_given=%0d", stalls, slow_given); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
