// Sensitivity of phase detection to its two thresholds, as in the study of
// ILP_delta 0.3 / 0.5 / 0.7 (sample interval 10) and sample interval
// 10 / 30 / 100 (ILP_delta 0.5). Five phase_detector instances see the same
// stream of per-block commit counts; the time block is shortened to 400
// cycles.
//
// The program has six ILP phases (commits per cycle, blocks):
//   A 1.0 x20, B 1.4 x40, C 1.0 x40, D 2.5 x40, E 1.9 x40, F 1.0 x110
// Expected detections, worked out by hand from the detection rule (phase
// letter @ block within the phase where the new phase is declared):
//   delta 0.3, SI 10 : B@10 C@10 D@10 E@10 F@10   (0.4 steps pass the filter)
//   delta 0.5, SI 10 : D@10 E@10 F@10             (0.4 steps are filtered)
//   delta 0.7, SI 10 : D@10 F@10                  (0.6 step D->E filtered)
//   delta 0.5, SI 30 : D@30 E@30 F@30
//   delta 0.5, SI 100: F@101  (D and E form one 80-block deviating run that
//                              F's first block breaks; it is folded into the
//                              average and F deviates from block 2 on)
// Each detection must report the average rate of its SAMPLE_INTERVAL blocks
// (1/256 units, truncated) and arrive before the next block ends. Each
// block's rate is checked in every instance.
module tb_phase_sensitivity;
  import shs_pkg::*;
  localparam int TB = 400, NI = 5, NPH = 6, MAXEV = 5;
  localparam int BW = $clog2(TB * 4 + 1);
  localparam int unsigned DELTA [NI] = '{77, 128, 179, 128, 128};
  localparam int unsigned SIV   [NI] = '{10, 10, 10, 30, 100};

  // program: commits per block and length of each phase
  localparam int CNT [NPH] = '{400, 560, 400, 1000, 760, 400};
  localparam int LEN [NPH] = '{20, 40, 40, 40, 40, 110};

  // expected events per instance: phase index, block in phase (1-based), rate
  localparam int NEV   [NI]        = '{5, 3, 2, 3, 1};
  localparam int EV_PH [NI][MAXEV] = '{'{1, 2, 3, 4, 5}, '{3, 4, 5, 0, 0}, '{3, 5, 0, 0, 0},
                                       '{3, 4, 5, 0, 0}, '{5, 0, 0, 0, 0}};
  localparam int EV_BK [NI][MAXEV] = '{'{10, 10, 10, 10, 10}, '{10, 10, 10, 0, 0}, '{10, 10, 0, 0, 0},
                                       '{30, 30, 30, 0, 0}, '{101, 0, 0, 0, 0}};
  localparam int EV_RT [NI][MAXEV] = '{'{358, 256, 640, 486, 256}, '{640, 486, 256, 0, 0},
                                       '{640, 256, 0, 0, 0}, '{640, 486, 256, 0, 0}, '{256, 0, 0, 0, 0}};

  logic clk = 0, rst_n = 0;
  logic block_done = 0;
  logic [BW-1:0] block_count = '0;
  logic [NI-1:0] new_phase;
  rate_t new_rate [NI], block_rate [NI], phase_rate [NI];
  logic [NI-1:0] busy;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NI; i++) begin : g_det
    phase_detector #(
      .TIME_BLOCK(TB), .COMMIT_W(4), .SAMPLE_INTERVAL(SIV[i]), .ILP_DELTA_Q(DELTA[i])
    ) u_det (
      .clk, .rst_n, .block_done, .block_count, .restart(1'b0),
      .new_phase(new_phase[i]), .new_rate(new_rate[i]), .block_rate(block_rate[i]),
      .phase_rate(phase_rate[i]), .busy(busy[i])
    );
  end

  int checks = 0, failures = 0;
  int cur_ph = 0, cur_bk = 0;       // phase and block (1-based) of the last block that ended
  int seen [NI];
  longint cyc = 0, done_cyc = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cyc, msg);
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int i = 0; i < NI; i++) begin
        if (new_phase[i]) begin
          checks++;
          if (seen[i] >= NEV[i]) begin
            fail($sformatf("instance %0d: unexpected phase in %0d@%0d", i, cur_ph, cur_bk));
          end else begin
            if (EV_PH[i][seen[i]] != cur_ph || EV_BK[i][seen[i]] != cur_bk)
              fail($sformatf("instance %0d: phase at %0d@%0d, expected %0d@%0d",
                             i, cur_ph, cur_bk, EV_PH[i][seen[i]], EV_BK[i][seen[i]]));
            checks++;
            if (int'(new_rate[i]) != EV_RT[i][seen[i]])
              fail($sformatf("instance %0d: new rate %0d, expected %0d", i, new_rate[i], EV_RT[i][seen[i]]));
          end
          checks++;
          if (cyc - done_cyc >= longint'(TB)) fail($sformatf("instance %0d: detection took %0d cycles", i, cyc - done_cyc));
          seen[i]++;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < NI; i++) seen[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPH; p++) begin
      for (int b = 1; b <= LEN[p]; b++) begin
        block_count = BW'(CNT[p]);
        block_done  = 1;
        @(negedge clk);
        block_done = 0;
        cur_ph   = p;
        cur_bk   = b;
        done_cyc = cyc;
        // all instances have the block's rate well before the next block ends
        repeat (TB / 2) @(negedge clk);
        for (int i = 0; i < NI; i++) begin
          checks++;
          if (int'(block_rate[i]) != CNT[p] * 256 / TB)
            fail($sformatf("instance %0d: block rate %0d, expected %0d", i, block_rate[i], CNT[p] * 256 / TB));
        end
        repeat (TB / 2 - 1) @(negedge clk);
      end
    end
    repeat (TB) @(negedge clk);
    for (int i = 0; i < NI; i++) begin
      checks++;
      if (seen[i] != NEV[i]) fail($sformatf("instance %0d: %0d phases detected, expected %0d", i, seen[i], NEV[i]));
    end
    $display("detections per instance: %0d %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3], seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(40 * TB * 400);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
