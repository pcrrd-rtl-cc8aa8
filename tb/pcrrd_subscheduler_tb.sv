// pcrrd_subscheduler_tb: one CRRD engine, checked on the desynchronization
// example and on random traffic.
//
// Part 1, n = m = k = 2, one phase-1 round, a matching every slot (P = 1)
// and every VOQ always holding cells.  From all-zero pointers the number
// of cells dispatched in slots 0, 1, 2, ... must be 1, 3, 4, 4, ... (the
// pointers desynchronize and reach 100% throughput from slot 2), and the
// pointers must step through the values of the worked example:
//   P_L(0,0): 0 1 2 3 0 1 2 3     P_L(0,1): 0 0 1 2 3 0 1 2
//   P_L(1,1): 0 0 0 1 2 3 0 1
//   P_C(0,0): 0 1 0 1 0 1 0 1     P_C(0,1): 0 0 1 0 1 0 1 0
//   P_C(1,0): 0 0 1 0 1 0 1 0     P_C(1,1): 0 0 0 1 0 1 0 1
// Part 2, n = 2, m = k = 3, two rounds, random request flags: each result
// must be a legal dispatch (only flagged VOQs, one link per VOQ, one cell
// per CM output link, every OM requested at a CM gets a grant), and the
// flags must follow F <- (F and not granted) or load.
module pcrrd_subscheduler_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- part 1 ----------------
  logic          c1;
  logic [3:0]    ld1 [2];
  logic [3:0]    fl1 [2];
  logic [3:0]    gr1 [2];
  logic [1:0]    dv1 [2];
  logic [1:0]    dq1 [2][2];

  pcrrd_subscheduler #(.N(2), .M(2), .K(2), .ITER(1)) dut1 (
    .clk, .rst_n, .commit(c1), .load(ld1), .flag(fl1), .grant(gr1),
    .disp_valid(dv1), .disp_voq(dq1));

  always_comb for (int i = 0; i < 2; i++) ld1[i] = ~(fl1[i] & ~gr1[i]);

  localparam int EXP_PL00 [8] = '{0,1,2,3,0,1,2,3};
  localparam int EXP_PL01 [8] = '{0,0,1,2,3,0,1,2};
  localparam int EXP_PL11 [8] = '{0,0,0,1,2,3,0,1};
  localparam int EXP_PC00 [8] = '{0,1,0,1,0,1,0,1};
  localparam int EXP_PC01 [8] = '{0,0,1,0,1,0,1,0};
  localparam int EXP_PC10 [8] = '{0,0,1,0,1,0,1,0};
  localparam int EXP_PC11 [8] = '{0,0,0,1,0,1,0,1};
  localparam int EXP_CNT  [8] = '{1,3,4,4,4,4,4,4};

  task automatic chk(input string what, input int t, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL T=%0d %s = %0d, expected %0d", t, what, got, exp);
    end
  endtask

  // ---------------- part 2 ----------------
  localparam int N2 = 2, M2 = 3, K2 = 3, NK2 = N2 * K2;
  logic          c2;
  logic [NK2-1:0] ld2 [K2];
  logic [NK2-1:0] fl2 [K2];
  logic [NK2-1:0] gr2 [K2];
  logic [M2-1:0]  dv2 [K2];
  logic [2:0]     dq2 [K2][M2];

  pcrrd_subscheduler #(.N(N2), .M(M2), .K(K2), .ITER(2)) dut2 (
    .clk, .rst_n, .commit(c2), .load(ld2), .flag(fl2), .grant(gr2),
    .disp_valid(dv2), .disp_voq(dq2));

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [NK2-1:0] mflag [K2];
    c1 = 0; c2 = 0;
    for (int i = 0; i < K2; i++) ld2[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // Part 1: first commit only loads the flags (nothing is flagged yet).
    @(negedge clk); c1 = 1;
    @(posedge clk);
    for (int t = 0; t < 8; t++) begin
      int n;
      @(negedge clk);
      n = 0;
      for (int i = 0; i < 2; i++) for (int r = 0; r < 2; r++) n += int'(dv1[i][r]);
      chk("cells dispatched", t, n, EXP_CNT[t]);
      chk("P_L(0,0)", t, int'(dut1.g_im[0].u_im.ptr_l[0]), EXP_PL00[t]);
      chk("P_L(0,1)", t, int'(dut1.g_im[0].u_im.ptr_l[1]), EXP_PL01[t]);
      chk("P_L(1,1)", t, int'(dut1.g_im[1].u_im.ptr_l[1]), EXP_PL11[t]);
      chk("P_C(0,0)", t, int'(dut1.g_cm[0].u_cm.ptr_c[0]), EXP_PC00[t]);
      chk("P_C(0,1)", t, int'(dut1.g_cm[0].u_cm.ptr_c[1]), EXP_PC01[t]);
      chk("P_C(1,0)", t, int'(dut1.g_cm[1].u_cm.ptr_c[0]), EXP_PC10[t]);
      chk("P_C(1,1)", t, int'(dut1.g_cm[1].u_cm.ptr_c[1]), EXP_PC11[t]);
    end
    c1 = 0;

    // Part 2: random flags.
    for (int i = 0; i < K2; i++) mflag[i] = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      c2 = ($urandom_range(0, 2) != 0);
      for (int i = 0; i < K2; i++) ld2[i] = NK2'($urandom) & ~(fl2[i] & ~gr2[i]);
      #1;
      for (int i = 0; i < K2; i++) begin
        logic [NK2-1:0] used;
        checks++;
        if (fl2[i] != mflag[i]) begin failures++; $display("FAIL flags IM %0d", i); end
        used = '0;
        for (int r = 0; r < M2; r++) begin
          if (dv2[i][r]) begin
            checks++;
            if (!fl2[i][dq2[i][r]] || used[dq2[i][r]]) begin
              failures++; $display("FAIL illegal dispatch IM %0d link %0d VOQ %0d", i, r, dq2[i][r]);
            end
            used[dq2[i][r]] = 1'b1;
          end
        end
        checks++;
        if (used != gr2[i]) begin failures++; $display("FAIL grant vector IM %0d", i); end
      end
      // each CM output link carries at most one cell; a requested OM gets one
      for (int r = 0; r < M2; r++) begin
        for (int j = 0; j < K2; j++) begin
          int cnt;
          cnt = 0;
          for (int i = 0; i < K2; i++)
            if (dv2[i][r] && int'(dq2[i][r]) % K2 == j) cnt++;
          checks++;
          if (cnt > 1) begin failures++; $display("FAIL CM %0d link %0d carries %0d cells", r, j, cnt); end
          if (cnt == 0)
            for (int i = 0; i < K2; i++)
              if (dut2.im_link_valid[i][r] && int'(dut2.im_link_voq[i][r]) % K2 == j) begin
                failures++; $display("FAIL CM %0d left OM %0d ungranted", r, j);
              end
        end
      end
      @(posedge clk);
      if (c2) for (int i = 0; i < K2; i++) mflag[i] = (mflag[i] & ~gr2[i]) | ld2[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
