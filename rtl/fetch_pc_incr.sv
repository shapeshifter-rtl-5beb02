// Fetch PC incrementor with a configurable increment.
//
// In a narrower configuration the front end fetches fewer instructions per
// cycle, so the sequential next PC advances by width * INST_BYTES instead
// of the full pipeline width. A taken redirect (branch target, exception)
// overrides the increment; stall holds the PC. One register, next PC ready
// the cycle after. That the increment follows the width is the text's; the
// fixed instruction size, redirect and stall inputs are this design's.
module fetch_pc_incr #(
  parameter int unsigned PC_W       = 64,
  parameter int unsigned INST_BYTES = 4,
  parameter logic [63:0] RESET_PC   = 64'h0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [2:0]      width,       // instructions fetched per cycle
  input  logic            stall,
  input  logic            redirect,
  input  logic [PC_W-1:0] redirect_pc,
  output logic [PC_W-1:0] pc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pc <= RESET_PC[PC_W-1:0];
    else if (redirect) pc <= redirect_pc;
    else if (!stall)   pc <= pc + PC_W'(width) * PC_W'(INST_BYTES);
  end

endmodule
