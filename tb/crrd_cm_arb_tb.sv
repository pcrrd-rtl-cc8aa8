// crrd_cm_arb_tb: phase-2 CM arbitration against a model.
//
// k = 4 IMs send random requests for random OMs.  A model keeps the
// pointers P_C(r,j) and computes, per OM j, the first requesting IM at or
// after the pointer.  Pointers move only on commit and only when the
// granted request was a first-round match.
module crrd_cm_arb_tb;
  localparam int K = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [K-1:0] req_valid, req_first, gnt;
  logic [1:0]   req_om [K];
  logic         commit;
  int mpc [K];

  crrd_cm_arb #(.K(K)) dut (.clk, .rst_n, .req_valid, .req_om, .req_first, .commit, .gnt);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int winner [K];
    logic [K-1:0] eg;
    for (int j = 0; j < K; j++) mpc[j] = 0;
    req_valid = '0; req_first = '0; commit = 0;
    for (int i = 0; i < K; i++) req_om[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // Directed: all four IMs request OM 2 from reset -> IM 0 wins, then IM 1.
    @(negedge clk);
    req_valid = '1; req_first = '1; commit = 1;
    for (int i = 0; i < K; i++) req_om[i] = 2'd2;
    #1; checks++;
    if (gnt != 4'b0001) begin failures++; $display("FAIL directed 1: %b", gnt); end
    @(negedge clk); #1; checks++;
    if (gnt != 4'b0010) begin failures++; $display("FAIL directed 2: %b", gnt); end
    mpc[2] = 2;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req_valid = K'($urandom);
      req_first = K'($urandom);
      commit    = $urandom_range(0, 1);
      for (int i = 0; i < K; i++) req_om[i] = 2'($urandom);
      #1;
      eg = '0;
      for (int j = 0; j < K; j++) begin
        winner[j] = -1;
        for (int s = 0; s < K; s++) begin
          int i;
          i = (mpc[j] + s) % K;
          if (winner[j] < 0 && req_valid[i] && int'(req_om[i]) == j) winner[j] = i;
        end
        if (winner[j] >= 0) eg[winner[j]] = 1'b1;
      end
      checks++;
      if (gnt != eg) begin failures++; $display("FAIL t=%0d gnt=%b expected %b", t, gnt, eg); end
      @(posedge clk);
      if (commit)
        for (int j = 0; j < K; j++)
          if (winner[j] >= 0 && req_first[winner[j]]) mpc[j] = (winner[j] + 1) % K;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
