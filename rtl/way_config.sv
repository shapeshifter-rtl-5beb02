// Configuration-to-way mapping.
//
// Turns the active configuration (4-4, 3-3, 3-2 or 2-2) into the enables of
// every reconfigurable part of the pipeline, using the speed grades found
// for each way at test time:
//  - rename ways: the fastest front-end-width rename ways (way_select);
//  - decode ways and the decode-to-rename mux selects (frontend_steer);
//  - back-end ways: the fastest back-end-width ways, where a back-end way
//    is a select tree and the functional unit it is wired to, enabled and
//    disabled together, graded by the slower of the two (be_grade);
//  - floating-point adders: both in 4-4; in the other configurations the
//    slower adder is turned off if its grade is below the configuration's
//    clock code;
//  - slow-register masking: on in every configuration but 4-4;
//  - fetch width: the front-end width.
// Purely combinational. The mapping rules are the text's; ranking ways by
// a single grade, and choosing rename ways before decode ways, are this
// design's.
module way_config
  import shs_pkg::*;
(
  input  cfg_e                cfg,
  input  grade_t              cfg_freq,              // clock code of cfg
  input  grade_t              dec_grade [NWAYS],
  input  grade_t              ren_grade [NWAYS],
  input  grade_t              be_grade  [NWAYS],
  input  grade_t              fp_grade  [NFPWAYS],
  output logic [NWAYS-1:0]    dec_en,
  output logic [NWAYS-1:0]    dec_sel,
  output logic [NWAYS-1:0]    ren_en,
  output logic [NWAYS-1:0]    be_en,
  output logic [NFPWAYS-1:0]  fp_en,
  output logic                reg_mask_en,
  output logic [2:0]          fetch_width,
  output logic                steer_ok
);
  logic [2:0] few, bew;

  assign few = fe_width(cfg);
  assign bew = be_width(cfg);

  way_select #(.N(NWAYS)) u_ren (.grade(ren_grade), .k(few), .en(ren_en));
  way_select #(.N(NWAYS)) u_be  (.grade(be_grade),  .k(bew), .en(be_en));

  frontend_steer #(.N(NWAYS)) u_steer (
    .ren_en, .dec_grade, .dec_en, .dec_sel, .ok(steer_ok)
  );

  always_comb begin
    fp_en = '1;
    if (cfg != CFG_44) begin
      if (fp_grade[0] < cfg_freq && fp_grade[0] <= fp_grade[1]) fp_en[0] = 1'b0;
      else if (fp_grade[1] < cfg_freq && fp_grade[1] < fp_grade[0]) fp_en[1] = 1'b0;
    end
  end

  assign reg_mask_en = (cfg != CFG_44);
  assign fetch_width = few;

endmodule
