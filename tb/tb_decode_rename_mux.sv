// Self-checking test of decode_rename_mux: random instructions, valids and
// legal steering patterns; each rename slot must carry the instruction of
// the decode way steered into it, or be invalid.
module tb_decode_rename_mux;
  import shs_pkg::*;
  localparam int N = 4;
  logic [N-1:0] dec_en, dec_sel, dec_valid, ren_valid;
  arch_uop_t dec_uop [N], ren_uop [N];
  int checks = 0, failures = 0;

  decode_rename_mux #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // legal patterns (dec_en, dec_sel) from the steering rules
    logic [7:0] pats [6];
    pats = '{8'b1111_0000, 8'b1110_1110, 8'b0111_0000, 8'b0101_0100, 8'b1011_1000, 8'b0011_0000};
    for (int t = 0; t < 600; t++) begin
      {dec_en, dec_sel} = pats[$urandom_range(0, 5)];
      dec_valid = N'($urandom);
      for (int i = 0; i < N; i++) dec_uop[i] = arch_uop_t'($urandom);
      #1;
      for (int j = 0; j < N; j++) begin
        int src;
        src = -1;
        if (dec_en[j] && !dec_sel[j]) src = j;
        else if (j + 1 < N && dec_en[j+1] && dec_sel[j+1]) src = j + 1;
        checks++;
        if (src < 0) begin
          if (ren_valid[j]) begin failures++; $display("rename %0d valid with no source", j); end
        end else if (ren_valid[j] != dec_valid[src] || (dec_valid[src] && ren_uop[j] != dec_uop[src])) begin
          failures++; $display("rename %0d: got %h/%b expected decode %0d %h/%b", j, ren_uop[j], ren_valid[j], src, dec_uop[src], dec_valid[src]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
