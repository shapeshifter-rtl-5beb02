// Fastest-K way selector.
//
// Each of N ways has a speed grade measured at test time (larger means it
// works at a faster clock). For a requested width K the selector enables
// the K ways with the highest grades; ties go to the lower way number.
// A way is enabled when fewer than K other ways beat it, where way j beats
// way i if its grade is higher, or equal with j < i. The result is
// combinational. The text says only that a narrower configuration turns
// off the slowest ways; the ranking rule and tie-break are this design's.
module way_select
  import shs_pkg::*;
#(
  parameter int unsigned N = 4,
  localparam int unsigned KW = $clog2(N + 1)
) (
  input  grade_t        grade [N],
  input  logic [KW-1:0] k,
  output logic [N-1:0]  en
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      int unsigned beaten_by;
      beaten_by = 0;
      for (int j = 0; j < N; j++) begin
        if (j != i && (grade[j] > grade[i] || (grade[j] == grade[i] && j < i)))
          beaten_by++;
      end
      en[i] = (beaten_by < int'(k));
    end
  end

endmodule
