// Shared sequential divider.
//
// Averages are only needed once per time block (tens of thousands of
// cycles or more), so the divider is built for area, not speed: a
// restoring divider that produces one quotient bit per cycle. A division
// takes DW+1 cycles from the cycle start is seen to the done pulse.
// start is taken only while busy is low. Division by zero returns an
// all-ones quotient. The use of one slow shared divider follows the text;
// the restoring algorithm and its timing are this design's choice.
module seq_divider #(
  parameter int unsigned DW = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,      // one-cycle pulse, quotient valid from then on
  output logic [DW-1:0] quotient
);
  localparam int unsigned CNTW = $clog2(DW + 1);

  logic [DW-1:0]   rem_q, dvs_q, quo_q;
  logic [CNTW-1:0] cnt_q;
  logic [DW:0]     trial;
  logic [DW:0]     shifted;

  assign shifted = {rem_q, quo_q[DW-1]};
  assign trial   = shifted - {1'b0, dvs_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q    <= '0;
      dvs_q    <= '0;
      quo_q    <= '0;
      cnt_q    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem_q <= '0;
          dvs_q <= divisor;
          quo_q <= dividend;
          cnt_q <= CNTW'(DW);
          busy  <= 1'b1;
        end
      end else begin
        // shift the next dividend bit into the remainder; the freed low bit
        // of quo_q takes the new quotient bit
        if (!trial[DW]) begin
          rem_q <= trial[DW-1:0];
          quo_q <= {quo_q[DW-2:0], 1'b1};
        end else begin
          rem_q <= shifted[DW-1:0];
          quo_q <= {quo_q[DW-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CNTW'(1)) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          quotient <= (dvs_q == '0) ? '1 : ((!trial[DW]) ? {quo_q[DW-2:0], 1'b1}
                                                          : {quo_q[DW-2:0], 1'b0});
        end
      end
    end
  end

endmodule
