// Self-checking test of rename_depcheck. Random groups of four instructions
// over a small register set (so that intra-group dependences are common),
// random way enables and valids. The expected sources are worked out by
// scanning the group backwards from each instruction for the nearest
// earlier enabled, valid writer; a turned-off way must give a NULL
// destination and must never be depended upon.
module tb_rename_depcheck;
  import shs_pkg::*;
  localparam int N = 4;
  logic [N-1:0] en, valid, dst_valid;
  arch_uop_t uop [N];
  logic [PREG_W-1:0] map_src1 [N], map_src2 [N], new_dst [N], src1 [N], src2 [N];
  int checks = 0, failures = 0, nulls = 0, bypasses = 0;

  rename_depcheck #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PREG_W-1:0] expect_src(int n, logic [AREG_W-1:0] a, logic [PREG_W-1:0] mapped);
    for (int m = n - 1; m >= 0; m--)
      if (en[m] && valid[m] && uop[m].has_dst && uop[m].dst == a) return new_dst[m];
    return mapped;
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      en    = (t % 3 == 0) ? 4'b1111 : N'($urandom);
      valid = N'($urandom) | 4'b1001;
      for (int i = 0; i < N; i++) begin
        uop[i].src1    = AREG_W'($urandom_range(0, 5));
        uop[i].src2    = AREG_W'($urandom_range(0, 5));
        uop[i].dst     = AREG_W'($urandom_range(0, 5));
        uop[i].has_dst = ($urandom_range(0, 3) != 0);
        map_src1[i]    = PREG_W'($urandom);
        map_src2[i]    = PREG_W'($urandom);
        new_dst[i]     = PREG_W'(64 + 4 * t + i);
      end
      #1;
      for (int n = 0; n < N; n++) begin
        logic [PREG_W-1:0] e1, e2;
        e1 = expect_src(n, uop[n].src1, map_src1[n]);
        e2 = expect_src(n, uop[n].src2, map_src2[n]);
        if (e1 != map_src1[n]) bypasses++;
        checks++;
        if (src1[n] != e1 || src2[n] != e2) begin
          failures++; $display("t=%0d way %0d: src %0d %0d expected %0d %0d", t, n, src1[n], src2[n], e1, e2);
        end
        checks++;
        if (dst_valid[n] != (en[n] && valid[n] && uop[n].has_dst)) begin
          failures++; $display("way %0d dst_valid %b", n, dst_valid[n]);
        end
        if (!en[n] && valid[n] && uop[n].has_dst) nulls++;
      end
    end
    checks++;
    if (nulls == 0 || bypasses == 0) begin failures++; $display("coverage: nulls=%0d bypasses=%0d", nulls, bypasses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
