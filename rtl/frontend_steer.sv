// Decode-to-rename steering.
//
// To avoid a crossbar between decode and rename, decode way n may feed only
// rename way n or rename way n-1, through one 2-to-1 multiplexer per
// rename way. Given the rename ways a configuration uses (ren_en) and the
// test-time speed grades of the decode ways, this block chooses which
// decode way feeds each enabled rename way and produces the decode-way
// enables and mux selects. dec_sel[n] = 1 means decode way n feeds rename
// way n-1; dec_sel[0] is always 0.
//
// The front end's clock is limited by the slowest decode way in use, so the
// block picks the assignment whose slowest decode way is fastest. Every
// decode way's grade is tried as a threshold T. For each T, one pass over
// the enabled rename ways, from way 0 upwards, gives each the lowest decode
// way that is allowed (n or n+1), still free and graded at least T. Taking
// the lowest such way never blocks a later rename way, so the pass finds an
// assignment whenever one exists. The highest T that feeds every enabled
// rename way wins; ties go to the earlier decode way. Steering is
// monotonic, so instructions placed in program order into the enabled
// decode ways reach rename in program order. ok is low only if no
// assignment exists, which cannot happen while the decode and rename
// widths are equal. The n / n-1 rule follows the text; the search is this
// design's.
module frontend_steer
  import shs_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] ren_en,
  input  grade_t       dec_grade [N],
  output logic [N-1:0] dec_en,
  output logic [N-1:0] dec_sel,
  output logic         ok
);
  // one pass at threshold thr: the assignment, and whether it is complete
  function automatic logic [2*N:0] assign_at(logic [N-1:0] ren, grade_t g [N], grade_t thr);
    logic [N-1:0] en, sel;
    logic         full;
    int           last;
    en   = '0;
    sel  = '0;
    full = 1'b1;
    last = -1;
    for (int j = 0; j < N; j++) begin
      if (ren[j]) begin
        if (j > last && g[j] >= thr) begin
          en[j] = 1'b1;
          last  = j;
        end else if (j + 1 < N && g[(j + 1) % N] >= thr) begin
          en[(j + 1) % N]  = 1'b1;
          sel[(j + 1) % N] = 1'b1;
          last = j + 1;
        end else begin
          full = 1'b0;
        end
      end
    end
    return {full, sel, en};
  endfunction

  always_comb begin
    logic [2*N:0] res, best;
    grade_t       best_thr;
    logic         found;
    best     = assign_at(ren_en, dec_grade, '0);
    best_thr = '0;
    found    = 1'b0;
    for (int t = 0; t < N; t++) begin
      res = assign_at(ren_en, dec_grade, dec_grade[t]);
      if (res[2*N] && (!found || dec_grade[t] > best_thr)) begin
        best     = res;
        best_thr = dec_grade[t];
        found    = 1'b1;
      end
    end
    dec_en  = best[N-1:0];
    dec_sel = best[2*N-1:N];
    ok      = best[2*N];
  end
endmodule
