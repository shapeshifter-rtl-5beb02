// Commit-rate estimate table, optimised form.
//
// One row per commit-rate range (<0.5, 0.5-1, 1-1.5, 1.5-2, >=2 commits
// per cycle). Each row holds the configuration that gives the best
// estimated performance (estimated commit rate times clock frequency) for
// a phase whose commit rate, measured in the current configuration, falls
// in that range. The estimates are fixed at design time and the
// frequencies are measured per chip at test time, so the comparison is
// done at test time and only the winning configuration is stored: the
// table is written through the test port (tt_we) and is read-only in use.
// A read is combinational: row_sel = rate_row(rate), cfg = table[row].
// After reset every row holds 4-4, which is the behaviour of a chip whose
// table has not been written. The table's organisation follows the text;
// the write port and reset value are this design's choice.
module estimate_table
  import shs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // test-time write port
  input  logic       tt_we,
  input  logic [2:0] tt_row,
  input  cfg_e       tt_cfg,
  // lookup
  input  rate_t      rate,
  output logic [2:0] row,
  output cfg_e       cfg
);
  cfg_e tab_q [NROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NROWS; i++) tab_q[i] <= CFG_44;
    end else if (tt_we && tt_row < 3'(NROWS)) begin
      tab_q[tt_row] <= tt_cfg;
    end
  end

  assign row = rate_row(rate);
  assign cfg = tab_q[row];

endmodule
