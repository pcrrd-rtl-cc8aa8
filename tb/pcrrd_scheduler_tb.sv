// pcrrd_scheduler_tb: the pipelined scheduler with P = 3 subschedulers.
//
// The testbench keeps its own count L(i,v) of the cells in every VOQ and
// plays the input modules: it reports arrivals and removes one cell per
// dispatch.  n = m = k = 2, P = 3, two phase-1 rounds.  Checks:
//   * window timing: subscheduler p finishes at the end of the slots t
//     with (t+1) mod P = p, i.e. computes during slots Pl+p .. Pl+p+P-1;
//     and phase = t mod P;
//   * a lone cell arriving in slot t into an idle scheduler is dispatched
//     in slot t+P+1, not earlier;
//   * no dispatch from an empty VOQ, at most one per VOQ and slot;
//   * bookkeeping: L(i,v) - C(i,v), not counting a cell leaving in this
//     slot, equals the number of flags set for VOQ(i,v) across the
//     subschedulers, and never exceeds P;
//   * with every VOQ kept full the scheduler delivers n*k cells per slot
//     after a short warm-up (100% throughput under uniform load);
//   * random Bernoulli arrivals: every cell is eventually dispatched.
module pcrrd_scheduler_tb;
  localparam int N = 2, M = 2, K = 2, P = 3, ITER = 2, LMAX = 8, NK = N * K;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] arr_cnt    [K][NK];
  logic [M-1:0] disp_valid [K];
  logic [1:0] disp_voq   [K][M];
  logic [1:0] phase;

  pcrrd_scheduler #(.N(N), .M(M), .K(K), .P(P), .ITER(ITER), .LMAX(LMAX)) dut (
    .clk, .rst_n, .arr_cnt, .disp_valid, .disp_voq, .phase);

  int occ [K][NK];
  int slot;         // slot index since reset
  int sent_in_slot;

  task automatic fail(input string msg);
    failures++; $display("FAIL slot %0d: %s", slot, msg);
  endtask

  // Checks done in the middle of every slot.
  task automatic slot_checks();
    int used [K][NK];
    checks++;
    if (int'(phase) != slot % P) fail($sformatf("phase %0d", phase));
    for (int p = 0; p < P; p++) begin
      checks++;
      if (dut.commit[p] != ((slot + 1) % P == p)) fail($sformatf("commit[%0d]", p));
    end
    for (int i = 0; i < K; i++) for (int v = 0; v < NK; v++) used[i][v] = 0;
    sent_in_slot = 0;
    for (int i = 0; i < K; i++) begin
      for (int r = 0; r < M; r++) begin
        if (disp_valid[i][r]) begin
          int v;
          v = int'(disp_voq[i][r]);
          checks++;
          if (occ[i][v] - used[i][v] <= 0) fail($sformatf("dispatch from empty VOQ(%0d,%0d)", i, v));
          used[i][v]++;
          sent_in_slot++;
        end
      end
    end
    for (int i = 0; i < K; i++) begin
      for (int v = 0; v < NK; v++) begin
        int f;
        f = 0;
        if (used[i][v] > 1) fail("VOQ dispatched twice");
        for (int p = 0; p < P; p++) f += int'(dut.s_flag[p][i][v]);
        checks++;
        if (occ[i][v] - used[i][v] - int'(dut.rc_count[i][v]) != f || f > P)
          fail($sformatf("VOQ(%0d,%0d): L=%0d C=%0d flags=%0d", i, v, occ[i][v], dut.rc_count[i][v], f));
      end
    end
  endtask

  // Apply this slot's arrivals and dispatches to the VOQ model at the edge.
  // Inputs are only changed just after an edge, never at it.
  task automatic end_slot();
    for (int i = 0; i < K; i++) begin
      for (int r = 0; r < M; r++) if (disp_valid[i][r]) occ[i][disp_voq[i][r]]--;
      for (int v = 0; v < NK; v++) occ[i][v] += int'(arr_cnt[i][v]);
    end
    @(posedge clk);
    #1;
    slot++;
  endtask

  task automatic clear_arrivals();
    for (int i = 0; i < K; i++) for (int v = 0; v < NK; v++) arr_cnt[i][v] = '0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, total_sent, saturated_sent, outstanding;
    clear_arrivals();
    for (int i = 0; i < K; i++) for (int v = 0; v < NK; v++) occ[i][v] = 0;
    slot = -1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // reset leaves phase at P-1: the first slot is "slot -1"
    slot = -1;
    end_slot();

    // --- lone-cell latency, for each possible phase ---
    for (int k = 0; k < P; k++) begin
      @(negedge clk);
      slot_checks();
      arr_cnt[1][3] = 2'd1;
      t0 = slot;
      end_slot();
      clear_arrivals();
      for (int w = 0; w < P + 4; w++) begin
        @(negedge clk);
        slot_checks();
        checks++;
        if ((sent_in_slot != 0) != (slot == t0 + P + 1))
          fail($sformatf("lone cell of slot %0d: %0d sent in slot %0d", t0, sent_in_slot, slot));
        end_slot();
      end
    end

    // --- saturation: keep every VOQ at LMAX-N or more ---
    saturated_sent = 0;
    for (int w = 0; w < 200; w++) begin
      @(negedge clk);
      for (int i = 0; i < K; i++)
        for (int v = 0; v < NK; v++)
          arr_cnt[i][v] = (occ[i][v] + N <= LMAX) ? 2'(N) : 2'd0;
      #1;
      slot_checks();
      if (w >= 40) saturated_sent += sent_in_slot;
      end_slot();
    end
    clear_arrivals();
    checks++;
    if (saturated_sent != 160 * K * M)
      fail($sformatf("saturated throughput %0d of %0d cells", saturated_sent, 160 * K * M));
    $display("saturated: %0d of %0d possible cells in 160 slots", saturated_sent, 160 * K * M);

    // --- random Bernoulli arrivals, then drain ---
    for (int w = 0; w < 1500; w++) begin
      @(negedge clk);
      for (int i = 0; i < K; i++) begin
        for (int v = 0; v < NK; v++) arr_cnt[i][v] = '0;
        for (int h = 0; h < N; h++) begin
          int v;
          v = $urandom_range(0, NK - 1);
          if (w < 1200 && $urandom_range(0, 99) < 85 && occ[i][v] + int'(arr_cnt[i][v]) < LMAX)
            arr_cnt[i][v] = arr_cnt[i][v] + 2'd1;
        end
      end
      #1;
      slot_checks();
      end_slot();
    end
    clear_arrivals();
    outstanding = 0;
    for (int i = 0; i < K; i++) for (int v = 0; v < NK; v++) outstanding += occ[i][v];
    checks++;
    if (outstanding != 0) fail($sformatf("%0d cells never dispatched", outstanding));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
