// Physical-register free list with slow-register masking.
//
// A bit per physical register marks it free. Each cycle up to N rename ways
// ask for a destination register; the k-th requesting way (in way order)
// gets the k-th lowest-numbered register that is free and allowed. If there
// are not enough, none is handed out and stall is raised. Up to N
// registers are returned per cycle when the instructions that overwrote
// them commit. Registers found too slow at test time (slow_mask) are kept
// out of the pool while mask_en is high: in the fast configurations they
// are simply never allocated, which turns them off without touching the
// register file. A masked register that is returned stays free and becomes
// usable again in the full-width configuration. At reset, registers
// 0..NARCH-1 hold the architectural state and the rest are free.
// Allocation is combinational from the current state; frees and
// allocations take effect at the clock edge. Masking through the free pool
// follows the text (at most 20% of the registers, checked by an
// assertion); the rest is this design's.
module free_list
  import shs_pkg::*;
#(
  parameter int unsigned NPREG = 256,
  parameter int unsigned NARCH = 64,
  parameter int unsigned N     = 4,
  localparam int unsigned PW = $clog2(NPREG)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mask_en,
  input  logic [NPREG-1:0] slow_mask,
  input  logic [N-1:0]     alloc_req,
  output logic [N-1:0]     alloc_gnt,
  output logic [PW-1:0]    alloc_idx [N],
  output logic             stall,
  input  logic [N-1:0]     free_valid,
  input  logic [PW-1:0]    free_idx  [N],
  output logic [PW:0]      free_count     // allocatable registers now
);
  logic [NPREG-1:0] free_q;
  logic [NPREG-1:0] allowed;
  logic [NPREG-1:0] taken;
  logic [N-1:0]     found;

  assign allowed = free_q & ~(mask_en ? slow_mask : '0);

  always_comb begin
    logic [NPREG-1:0] pool;
    pool  = allowed;
    taken = '0;
    found = '0;
    for (int k = 0; k < N; k++) begin
      alloc_idx[k] = '0;
      if (alloc_req[k]) begin
        for (int r = NPREG - 1; r >= 0; r--) begin
          if (pool[r]) begin
            alloc_idx[k] = PW'(r);
            found[k]     = 1'b1;
          end
        end
        if (found[k]) begin
          pool[alloc_idx[k]]  = 1'b0;
          taken[alloc_idx[k]] = 1'b1;
        end
      end
    end
    stall     = ((alloc_req & ~found) != '0);
    alloc_gnt = stall ? '0 : alloc_req;
  end

  always_comb begin
    free_count = '0;
    for (int r = 0; r < NPREG; r++) free_count += (PW+1)'(allowed[r]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NPREG; r++) free_q[r] <= (r >= NARCH);
    end else begin
      logic [NPREG-1:0] nxt;
      nxt = free_q;
      if (!stall) nxt = nxt & ~taken;
      for (int k = 0; k < N; k++) if (free_valid[k]) nxt[free_idx[k]] = 1'b1;
      free_q <= nxt;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $countones(slow_mask) <= NPREG / 5);
  // A register may only be returned if it is allocated.
  for (genvar k = 0; k < N; k++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) free_valid[k] |-> !free_q[free_idx[k]]);
  end

endmodule
