// Self-checking test of frontend_steer. For every set of enabled rename
// ways and random decode grades it checks the steering rules: each enabled
// rename way is fed by exactly one enabled decode way, decode way n feeds
// only rename way n or n-1, no decode way is enabled without feeding a
// rename way, and dec_sel[0] stays 0; and that no legal assignment has a
// faster slowest decode way, found by trying every subset of decode ways.
// It also checks chosen cases where a slow decode way must be bypassed
// through the multiplexers.
module tb_frontend_steer;
  import shs_pkg::*;
  localparam int N = 4;
  logic [N-1:0] ren_en, dec_en, dec_sel;
  grade_t dec_grade [N];
  logic ok;
  int checks = 0, failures = 0;

  frontend_steer #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rules;
    int feeds [N];
    for (int j = 0; j < N; j++) feeds[j] = 0;
    for (int n = 0; n < N; n++) if (dec_en[n]) begin
      int r;
      r = dec_sel[n] ? n - 1 : n;
      if (r < 0 || !ren_en[r]) begin failures++; $display("decode %0d feeds unused rename %0d", n, r); end
      else feeds[r]++;
    end
    checks++;
    for (int j = 0; j < N; j++) if (ren_en[j] && feeds[j] != 1) begin
      failures++; $display("ren_en=%b: rename %0d fed %0d times", ren_en, j, feeds[j]); break;
    end
    checks++;
    if (dec_sel[0] || !ok) begin failures++; $display("dec_sel[0]=%b ok=%b", dec_sel[0], ok); end
    // no legal choice of decode ways has a faster slowest way (every subset tried)
    checks++;
    begin
      int best = -1;
      for (int d = 0; d < (1 << N); d++)
        if (legal(N'(d), ren_en) && slowest(N'(d)) > best) best = slowest(N'(d));
      if (ren_en != '0 && slowest(dec_en) != best) begin
        failures++; $display("ren_en=%b: decode ways %b reach grade %0d, best is %0d", ren_en, dec_en, slowest(dec_en), best);
      end
    end
  endtask

  // decode ways d can feed rename ways r in order, way n only to n or n-1
  function automatic bit legal(logic [N-1:0] d, logic [N-1:0] r);
    int dl [$], rl [$];
    for (int i = 0; i < N; i++) begin
      if (d[i]) dl.push_back(i);
      if (r[i]) rl.push_back(i);
    end
    if (dl.size() != rl.size()) return 0;
    foreach (dl[i]) if (!(dl[i] == rl[i] || dl[i] == rl[i] + 1)) return 0;
    return 1;
  endfunction

  function automatic int slowest(logic [N-1:0] d);
    int m = 256;
    for (int i = 0; i < N; i++) if (d[i] && int'(dec_grade[i]) < m) m = int'(dec_grade[i]);
    return m;
  endfunction

  task automatic expect_case(input logic [N-1:0] r, input int g0, g1, g2, g3,
                             input logic [N-1:0] e_en, input logic [N-1:0] e_sel);
    ren_en = r; dec_grade = '{grade_t'(g0), grade_t'(g1), grade_t'(g2), grade_t'(g3)};
    #1;
    rules();
    checks++;
    if (dec_en != e_en || (dec_sel & dec_en) != e_sel) begin
      failures++; $display("case ren_en=%b: dec_en=%b sel=%b expected %b %b", r, dec_en, dec_sel, e_en, e_sel);
    end
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      ren_en = N'($urandom);
      for (int i = 0; i < N; i++) dec_grade[i] = grade_t'($urandom_range(0, 255));
      #1;
      rules();
    end
    // rename 0,1,2 in use, decode way 0 slow: decode 1,2,3 feed rename 0,1,2
    expect_case(4'b0111, 10, 50, 50, 50, 4'b1110, 4'b1110);
    // all four in use: the multiplexers cannot help
    expect_case(4'b1111, 10, 50, 50, 50, 4'b1111, 4'b0000);
    // rename 1,2,3 in use: decode 0 cannot reach them
    expect_case(4'b1110, 90, 10, 50, 50, 4'b1110, 4'b0000);
    // rename 0,1 in use, decode 1 slow: decode 0 feeds 0, decode 2 feeds 1
    expect_case(4'b0011, 50, 10, 60, 50, 4'b0101, 4'b0100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
