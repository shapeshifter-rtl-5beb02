// Shared types and constants of the width/speed reconfiguration design.
//
// A configuration is named "front-back": the number of front-end ways
// (fetch..rename) and back-end ways (issue..write-back) in use. The four
// configurations are ordered from widest (slowest clock) to narrowest
// (fastest clock); the safety net moves one step along this order.
// Commit rates are unsigned fixed point with RATE_FRAC fraction bits
// (rate 1.0 = 256). Speed grades and frequency codes are 8-bit numbers
// where a larger value means a faster clock; what a code means in MHz is
// up to the clock generator.
package shs_pkg;

  localparam int unsigned NWAYS     = 4;   // front-end and integer back-end ways
  localparam int unsigned NFPWAYS   = 2;   // floating-point adders
  localparam int unsigned RATE_FRAC = 8;   // fraction bits of a commit rate
  localparam int unsigned RATE_W    = 16;  // commit-rate width (max 255.99)
  localparam int unsigned GRADE_W   = 8;   // speed grade / frequency code width
  localparam int unsigned NCFG      = 4;
  localparam int unsigned NROWS     = 5;   // commit-rate ranges of the estimate table

  typedef enum logic [1:0] {
    CFG_44 = 2'd0,
    CFG_33 = 2'd1,
    CFG_32 = 2'd2,
    CFG_22 = 2'd3
  } cfg_e;

  localparam int unsigned AREG_W = 6;   // architectural register number
  localparam int unsigned PREG_W = 8;   // physical register number (256)

  // Decoded instruction as it enters rename: architectural operands only.
  typedef struct packed {
    logic [AREG_W-1:0] src1;
    logic [AREG_W-1:0] src2;
    logic [AREG_W-1:0] dst;
    logic              has_dst;
  } arch_uop_t;

  typedef logic [RATE_W-1:0]  rate_t;
  typedef logic [GRADE_W-1:0] grade_t;

  // Front-end and back-end width of a configuration.
  function automatic logic [2:0] fe_width(cfg_e c);
    unique case (c)
      CFG_44:  return 3'd4;
      CFG_33:  return 3'd3;
      CFG_32:  return 3'd3;
      default: return 3'd2;
    endcase
  endfunction

  function automatic logic [2:0] be_width(cfg_e c);
    unique case (c)
      CFG_44:  return 3'd4;
      CFG_33:  return 3'd3;
      default: return 3'd2;
    endcase
  endfunction

  // Row of the estimate table for a commit rate: <0.5, 0.5-1, 1-1.5, 1.5-2, >=2.
  function automatic logic [2:0] rate_row(rate_t r);
    if (r < rate_t'(128))      return 3'd0;
    else if (r < rate_t'(256)) return 3'd1;
    else if (r < rate_t'(384)) return 3'd2;
    else if (r < rate_t'(512)) return 3'd3;
    else                       return 3'd4;
  endfunction

endpackage
