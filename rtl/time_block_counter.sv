// Time-block commit counter.
//
// The phase detector works on the average commit rate of fixed-length time
// blocks rather than on the instantaneous rate. This counter adds up the
// instructions committed in each block of TIME_BLOCK cycles; at the last
// cycle of a block it raises block_done for one cycle with the block's
// total on block_count (that cycle's commits included) and starts the next
// block from zero. While pause is high (the pipeline is being reconfigured
// and the clock is relocking) neither the cycle count nor the commit count
// advances, so a reconfiguration does not show up as a block of zero
// commits. The block length follows the text; pausing is a choice of this
// design.
module time_block_counter #(
  parameter int unsigned TIME_BLOCK = 100000,
  parameter int unsigned COMMIT_W   = 4,
  localparam int unsigned CW = $clog2(COMMIT_W + 1),
  localparam int unsigned BW = $clog2(TIME_BLOCK * COMMIT_W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pause,
  input  logic [CW-1:0] commit_cnt,   // instructions committed this cycle
  output logic          block_done,   // one-cycle pulse at block end
  output logic [BW-1:0] block_count   // commits in the block just finished
);
  localparam int unsigned TW = $clog2(TIME_BLOCK);

  logic [TW-1:0] cyc_q;
  logic [BW-1:0] acc_q;
  logic [BW-1:0] acc_next;

  assign acc_next = acc_q + BW'(commit_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_q       <= '0;
      acc_q       <= '0;
      block_done  <= 1'b0;
      block_count <= '0;
    end else begin
      block_done <= 1'b0;
      if (!pause) begin
        if (cyc_q == TW'(TIME_BLOCK - 1)) begin
          cyc_q       <= '0;
          acc_q       <= '0;
          block_done  <= 1'b1;
          block_count <= acc_next;
        end else begin
          cyc_q <= cyc_q + 1'b1;
          acc_q <= acc_next;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) commit_cnt <= CW'(COMMIT_W));

endmodule
