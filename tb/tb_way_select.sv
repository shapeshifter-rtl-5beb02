// Self-checking test of way_select: for random grades (many ties) and every
// width K, the enabled ways must be the K picked by repeatedly taking the
// highest remaining grade, lowest way number first on ties.
module tb_way_select;
  import shs_pkg::*;
  localparam int N = 4;
  grade_t grade [N];
  logic [2:0] k;
  logic [N-1:0] en, exp_en;
  int checks = 0, failures = 0;

  way_select #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) grade[i] = grade_t'($urandom_range(0, 5) * 20);
      for (int kk = 0; kk <= N; kk++) begin
        k = 3'(kk);
        exp_en = '0;
        for (int p = 0; p < kk; p++) begin
          int best;
          best = -1;
          for (int i = 0; i < N; i++)
            if (!exp_en[i] && (best < 0 || grade[i] > grade[best])) best = i;
          exp_en[best] = 1'b1;
        end
        #1;
        checks++;
        if (en != exp_en) begin
          failures++;
          $display("grades %0d %0d %0d %0d k=%0d: en=%b expected %b", grade[0], grade[1], grade[2], grade[3], kk, en, exp_en);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
