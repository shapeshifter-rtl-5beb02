// Decode-to-rename multiplexers.
//
// One 2-to-1 multiplexer in front of each rename way: rename way j takes
// the instruction of decode way j when that way is enabled and not steered
// down (dec_sel[j] = 0), or that of decode way j+1 when it is enabled and
// steered down (dec_sel[j+1] = 1). A rename way fed by neither gets an
// invalid slot. Purely combinational; selects come from frontend_steer and
// change only while the pipeline is drained. The multiplexer is the text's;
// the slot format is this design's.
module decode_rename_mux
  import shs_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] dec_en,
  input  logic [N-1:0] dec_sel,
  input  logic [N-1:0] dec_valid,
  input  arch_uop_t    dec_uop [N],
  output logic [N-1:0] ren_valid,
  output arch_uop_t    ren_uop [N]
);
  always_comb begin
    for (int j = 0; j < N; j++) begin
      ren_valid[j] = 1'b0;
      ren_uop[j]   = dec_uop[j];
      if (dec_en[j] && !dec_sel[j]) begin
        ren_valid[j] = dec_valid[j];
        ren_uop[j]   = dec_uop[j];
      end else if (j + 1 < N && dec_en[(j + 1) % N] && dec_sel[(j + 1) % N]) begin
        ren_valid[j] = dec_valid[(j + 1) % N];
        ren_uop[j]   = dec_uop[(j + 1) % N];
      end
    end
  end

endmodule
