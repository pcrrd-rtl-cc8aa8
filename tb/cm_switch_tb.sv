// cm_switch_tb: bufferless central module routing.
//
// n = 2, k = 4.  Random sets of cells whose destination OMs (tag mod k)
// are distinct must each appear on the output link of their OM with tag
// and data intact, other links idle, conflict low.  A forced collision
// must raise conflict.
module cm_switch_tb;
  localparam int N = 2, K = 4, NK = N * K, CW = 24;
  int checks = 0, failures = 0;
  logic [K-1:0]  in_valid, out_valid;
  logic [2:0]    in_dst  [K];
  logic [CW-1:0] in_cell [K];
  logic [2:0]    out_dst [K];
  logic [CW-1:0] out_cell [K];
  logic          conflict;

  cm_switch #(.N(N), .K(K), .CELL_W(CW)) dut (
    .in_valid, .in_dst, .in_cell, .out_valid, .out_dst, .out_cell, .conflict);

  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int perm [K];
    for (int t = 0; t < 2000; t++) begin
      // random permutation of OMs
      for (int i = 0; i < K; i++) perm[i] = i;
      for (int i = K - 1; i > 0; i--) begin
        int j, x;
        j = $urandom_range(0, i); x = perm[i]; perm[i] = perm[j]; perm[j] = x;
      end
      for (int i = 0; i < K; i++) begin
        in_valid[i] = $urandom_range(0, 3) != 0;
        in_dst[i]   = 3'(perm[i] + K * $urandom_range(0, N - 1));
        in_cell[i]  = CW'($urandom);
      end
      #1;
      checks++;
      if (conflict) begin failures++; $display("FAIL t=%0d false conflict", t); end
      for (int j = 0; j < K; j++) begin
        int src;
        src = -1;
        for (int i = 0; i < K; i++) if (in_valid[i] && perm[i] == j) src = i;
        checks++;
        if ((src < 0 && out_valid[j]) ||
            (src >= 0 && (!out_valid[j] || out_dst[j] != in_dst[src] || out_cell[j] != in_cell[src]))) begin
          failures++; $display("FAIL t=%0d OM link %0d", t, j);
        end
      end
    end
    // collision
    in_valid = 4'b0011; in_dst[0] = 3'd1; in_dst[1] = 3'd5; #1;
    checks++;
    if (!conflict) begin failures++; $display("FAIL collision not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
