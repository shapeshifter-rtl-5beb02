// Rename dependence check across the ways of one rename group.
//
// The map table gives each way the physical registers its sources were
// last mapped to; an earlier instruction of the same group that writes the
// same architectural register overrides that, so way n looks at the
// destinations of ways 0..n-1 and takes the physical destination of the
// nearest one that matches. This makes the ways interdependent. A way that
// is turned off (en low) or carries no instruction drives a NULL
// destination, which matches nothing, so the ways after it neither wait for
// nor depend on it. Combinational, one group per cycle. The NULL output
// follows the text; the operand format is this design's.
module rename_depcheck
  import shs_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]      en,
  input  logic [N-1:0]      valid,
  input  arch_uop_t         uop      [N],
  input  logic [PREG_W-1:0] map_src1 [N],   // map-table lookups
  input  logic [PREG_W-1:0] map_src2 [N],
  input  logic [PREG_W-1:0] new_dst  [N],   // freshly allocated registers
  output logic [PREG_W-1:0] src1     [N],
  output logic [PREG_W-1:0] src2     [N],
  output logic [N-1:0]      dst_valid       // NULL destination when low
);
  always_comb begin
    for (int n = 0; n < N; n++) begin
      dst_valid[n] = en[n] && valid[n] && uop[n].has_dst;
    end
    for (int n = 0; n < N; n++) begin
      src1[n] = map_src1[n];
      src2[n] = map_src2[n];
      for (int m = 0; m < n; m++) begin   // later m wins: nearest producer
        if (dst_valid[m] && uop[m].dst == uop[n].src1) src1[n] = new_dst[m];
        if (dst_valid[m] && uop[m].dst == uop[n].src2) src2[n] = new_dst[m];
      end
    end
  end

endmodule
