// Issue select with statically prioritised select trees.
//
// Each cycle, select tree k picks one ready issue-queue entry for back-end
// way k. Trees have a fixed priority: tree 0 picks the highest-priority
// ready entry (lowest index), and tree k picks the highest-priority ready
// entry not already picked by trees 0..k-1, which makes the trees
// interdependent. A tree whose way is turned off (en low) gives a NULL
// choice: it picks nothing and passes on the choices of the trees above
// it, so the remaining trees are not held up by it and no instruction goes
// to the turned-off functional unit. Combinational. Static priority and the
// NULL choice follow the text; entry order by index is this design's.
module select_logic #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned N       = 4,
  localparam int unsigned IW = $clog2(ENTRIES)
) (
  input  logic [ENTRIES-1:0] ready,
  input  logic [N-1:0]       en,
  output logic [ENTRIES-1:0] grant     [N],   // one-hot per way
  output logic [N-1:0]       grant_valid,
  output logic [IW-1:0]      grant_idx [N]
);
  always_comb begin
    logic [ENTRIES-1:0] avail;
    avail = ready;
    for (int k = 0; k < N; k++) begin
      grant[k]       = '0;
      grant_valid[k] = 1'b0;
      grant_idx[k]   = '0;
      if (en[k]) begin
        for (int e = ENTRIES - 1; e >= 0; e--) begin
          if (avail[e]) begin
            grant[k]       = '0;
            grant[k][e]    = 1'b1;
            grant_valid[k] = 1'b1;
            grant_idx[k]   = IW'(e);
          end
        end
      end
      avail = avail & ~grant[k];
    end
  end

endmodule
