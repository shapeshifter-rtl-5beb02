// Self-checking test of select_logic: random ready vectors and way enables.
// Expected grants: going through the ways in priority order, an enabled
// way takes the lowest-numbered ready entry not yet taken; a turned-off way
// takes nothing and the ways after it still get the next entries.
module tb_select_logic;
  localparam int E = 32, N = 4;
  logic [E-1:0] ready;
  logic [N-1:0] en, grant_valid;
  logic [E-1:0] grant [N];
  logic [4:0] grant_idx [N];
  int checks = 0, failures = 0;

  select_logic #(.ENTRIES(E), .N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [E-1:0] left;
      ready = (t % 4 == 0) ? E'($urandom) & E'($urandom) & E'($urandom) : E'($urandom);
      en    = N'($urandom);
      left  = ready;
      #1;
      for (int k = 0; k < N; k++) begin
        int pick;
        pick = -1;
        if (en[k]) for (int e = 0; e < E; e++) if (left[e]) begin pick = e; break; end
        checks++;
        if (pick < 0) begin
          if (grant_valid[k] || grant[k] != '0) begin failures++; $display("way %0d granted, expected NULL", k); end
        end else begin
          if (!grant_valid[k] || grant_idx[k] != 5'(pick) || grant[k] != (E'(1) << pick)) begin
            failures++; $display("t=%0d way %0d: idx %0d expected %0d", t, k, grant_idx[k], pick);
          end
          left[pick] = 1'b0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
