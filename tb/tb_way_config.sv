// Self-checking test of way_config on one example chip: decode way 0,
// rename way 3, back-end way 1 and FP adder 1 are its slow instances.
// For each configuration it checks the number of ways in use, that the
// slow instances are the ones turned off, the multiplexer settings, the
// FP adder rule, slow-register masking and the fetch width. Then 3000
// random chips (with some equal grades), in every configuration, are
// checked against the rules: the enabled rename and back-end ways are the
// fastest, each enabled decode way feeds rename way n or n-1 one to one,
// no legal choice of decode ways has a faster slowest way (found by trying
// every subset), and only the slower FP adder goes off, and only when it is
// below the configuration's clock code.
module tb_way_config;
  import shs_pkg::*;
  cfg_e cfg;
  grade_t cfg_freq;
  grade_t dec_grade [NWAYS], ren_grade [NWAYS], be_grade [NWAYS], fp_grade [NFPWAYS];
  logic [NWAYS-1:0] dec_en, dec_sel, ren_en, be_en;
  logic [NFPWAYS-1:0] fp_en;
  logic reg_mask_en, steer_ok;
  logic [2:0] fetch_width;
  int checks = 0, failures = 0;

  way_config dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input cfg_e c, input int freq, input logic [3:0] e_dec, e_sel, e_ren, e_be,
                     input logic [1:0] e_fp, input int e_w);
    cfg = c; cfg_freq = grade_t'(freq);
    #1;
    checks++;
    if (dec_en != e_dec || (dec_sel & dec_en) != e_sel || ren_en != e_ren || be_en != e_be ||
        fp_en != e_fp || fetch_width != 3'(e_w) || reg_mask_en != (c != CFG_44) || !steer_ok) begin
      failures++;
      $display("cfg %0d: dec %b sel %b ren %b be %b fp %b w %0d mask %b", c, dec_en, dec_sel, ren_en, be_en, fp_en, fetch_width, reg_mask_en);
    end
  endtask

  initial begin
    dec_grade = '{grade_t'(70), grade_t'(90), grade_t'(95), grade_t'(92)};
    ren_grade = '{grade_t'(96), grade_t'(94), grade_t'(93), grade_t'(72)};
    be_grade  = '{grade_t'(91), grade_t'(68), grade_t'(97), grade_t'(93)};
    fp_grade  = '{grade_t'(99), grade_t'(80)};
    //   cfg     freq  dec      sel      ren      be       fp     width
    chk(CFG_44,  65, 4'b1111, 4'b0000, 4'b1111, 4'b1111, 2'b11, 4);
    chk(CFG_33,  88, 4'b1110, 4'b1110, 4'b0111, 4'b1101, 2'b01, 3);
    chk(CFG_32,  90, 4'b1110, 4'b1110, 4'b0111, 4'b1100, 2'b01, 3);
    chk(CFG_22,  91, 4'b0110, 4'b0110, 4'b0011, 4'b1100, 2'b01, 2);
    // FP adder 1 fast enough for the narrow clock: both stay on
    fp_grade  = '{grade_t'(99), grade_t'(95)};
    chk(CFG_22,  91, 4'b0110, 4'b0110, 4'b0011, 4'b1100, 2'b11, 2);
    // random chips, every configuration, checked against the rules
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < NWAYS; i++) begin
        dec_grade[i] = grade_t'($urandom_range(60, 140));
        ren_grade[i] = grade_t'($urandom_range(60, 140));
        be_grade[i]  = grade_t'($urandom_range(60, 140));
      end
      // some chips with equal grades, to exercise ties
      if (t % 5 == 0) begin
        dec_grade[1] = dec_grade[2];
        ren_grade[0] = ren_grade[3];
        be_grade[2]  = be_grade[3];
      end
      for (int i = 0; i < NFPWAYS; i++) fp_grade[i] = grade_t'($urandom_range(60, 140));
      for (int c = 0; c < NCFG; c++) rand_chk(cfg_e'(c), $urandom_range(60, 140));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int popc(logic [NWAYS-1:0] v);
    int n = 0;
    for (int i = 0; i < NWAYS; i++) n += int'(v[i]);
    return n;
  endfunction

  // every enabled way is at least as fast as every disabled one
  function automatic bit fastest(logic [NWAYS-1:0] en, grade_t g [NWAYS]);
    for (int i = 0; i < NWAYS; i++)
      for (int j = 0; j < NWAYS; j++)
        if (en[i] && !en[j] && g[i] < g[j]) return 0;
    return 1;
  endfunction

  // can the decode ways in d feed the rename ways in r, way n only to n or n-1?
  // (a monotonic matching: pair them in order)
  function automatic bit feasible(logic [NWAYS-1:0] d, logic [NWAYS-1:0] r);
    int dl [$], rl [$];
    for (int i = 0; i < NWAYS; i++) begin
      if (d[i]) dl.push_back(i);
      if (r[i]) rl.push_back(i);
    end
    if (dl.size() != rl.size()) return 0;
    foreach (dl[i]) if (!(dl[i] == rl[i] || dl[i] == rl[i] + 1)) return 0;
    return 1;
  endfunction

  function automatic int min_grade(logic [NWAYS-1:0] en, grade_t g [NWAYS]);
    int m = 1000;
    for (int i = 0; i < NWAYS; i++) if (en[i] && int'(g[i]) < m) m = int'(g[i]);
    return m;
  endfunction

  task automatic rand_chk(input cfg_e c, input int freq);
    int k, best, slow;
    logic [NWAYS-1:0] fed;
    bit ok;
    cfg = c; cfg_freq = grade_t'(freq);
    #1;
    k = int'(fe_width(c));
    // widths, fastest-way choice, fixed outputs
    checks++;
    ok = popc(ren_en) == k && popc(dec_en) == k && popc(be_en) == int'(be_width(c)) &&
         fastest(ren_en, ren_grade) && fastest(be_en, be_grade) &&
         fetch_width == 3'(k) && reg_mask_en == (c != CFG_44) && steer_ok;
    if (!ok) begin
      failures++;
      $display("cfg %0d: widths/choice wrong: dec %b ren %b be %b w %0d", c, dec_en, ren_en, be_en, fetch_width);
    end
    // steering: each enabled decode way feeds an enabled rename way n or n-1, one to one
    checks++;
    fed = '0;
    ok = !dec_sel[0];
    for (int n = 0; n < NWAYS; n++) begin
      if (dec_en[n]) begin
        int r = n - int'(dec_sel[n]);
        if (!ren_en[r] || fed[r]) ok = 0;
        fed[r] = 1'b1;
      end
    end
    if (!ok || fed != ren_en) begin
      failures++;
      $display("cfg %0d: illegal steering dec %b sel %b ren %b", c, dec_en, dec_sel, ren_en);
    end
    // steering: no legal set of decode ways has a faster slowest way
    checks++;
    best = 0;
    for (int d = 0; d < (1 << NWAYS); d++)
      if (feasible(NWAYS'(d), ren_en) && min_grade(NWAYS'(d), dec_grade) > best)
        best = min_grade(NWAYS'(d), dec_grade);
    if (min_grade(dec_en, dec_grade) != best) begin
      failures++;
      $display("cfg %0d: decode ways %b reach grade %0d, best is %0d", c, dec_en, min_grade(dec_en, dec_grade), best);
    end
    // FP adders
    checks++;
    slow = (fp_grade[0] <= fp_grade[1]) ? 0 : 1;
    if (c == CFG_44 || int'(fp_grade[slow]) >= freq) ok = (fp_en == 2'b11);
    else ok = (fp_en == ~(2'(1) << slow));
    if (!ok) begin
      failures++;
      $display("cfg %0d freq %0d: fp %b for grades %0d %0d", c, freq, fp_en, fp_grade[0], fp_grade[1]);
    end
  endtask
endmodule
