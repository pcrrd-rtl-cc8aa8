// pcrrd_clos_switch_tb: end-to-end run of the switch at a reduced size.
//
// n = m = k = 3 (a 9-port switch), P = 3 subschedulers, two phase-1
// rounds, VOQ depth 8, output buffers of 16, 64-bit cells.  clos_bench
// drives light, full and hot-spot traffic and checks every cell.  In
// addition this testbench counts how often each mechanism of the
// scheduler occurs and fails if one never does:
//   cm_reject     a phase-1 match refused by the CM arbiter
//   later_round   a link matched in a phase-1 round after the first
//   req_waiting   a pending request not handed over because the flag of
//                 the ending subscheduler is still set
//   counter_ge2   a request counter holding two or more requests
//   multi_arrival two or more cells entering one VOQ in one slot
//   voq_drop      a cell refused by a full VOQ
//   ob_drop       a cell refused by a full output buffer
//   full_slot     all k*m IM output links busy in one slot
//   sub_result[p] subscheduler p delivering a non-empty result
module pcrrd_clos_switch_tb;
  localparam int N = 3, M = 3, K = 3, P = 3, ITER = 2, VD = 8, OD = 16, CW = 64;
  localparam int NK = N * K, VW = $clog2(NK);

  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst_n;
  logic [N-1:0]  in_valid [K];
  logic [VW-1:0] in_dst [K][N];
  logic [CW-1:0] in_cell [K][N];
  logic [N-1:0]  out_valid [K];
  logic [CW-1:0] out_cell [K][N];
  logic [N-1:0]  voq_drop [K];
  logic [M-1:0]  ob_drop [K];
  logic [M-1:0]  cm_conflict;
  logic          done;
  int            checks, failures;

  pcrrd_clos_switch #(
    .N(N), .M(M), .K(K), .P(P), .ITER(ITER), .VOQ_DEPTH(VD), .OB_DEPTH(OD), .CELL_W(CW)
  ) dut (
    .clk, .rst_n, .in_valid, .in_dst, .in_cell, .out_valid, .out_cell,
    .voq_drop, .ob_drop, .cm_conflict);

  clos_bench #(
    .N(N), .M(M), .K(K), .P(P), .CELL_W(CW),
    .LIGHT_SLOTS(400), .LIGHT_PCT(20), .FULL_SLOTS(800), .HOT_SLOTS(60), .DRAIN_SLOTS(3000)
  ) bench (
    .clk, .rst_n, .in_valid, .in_dst, .in_cell, .out_valid, .out_cell,
    .voq_drop, .ob_drop, .ob_in_cell(dut.om_ic), .disp_valid(dut.disp_valid),
    .done, .checks, .failures);

  // ---------------- mechanism counters ----------------
  int cm_reject = 0, later_round = 0, req_waiting = 0, counter_ge2 = 0;
  int multi_arrival = 0, voq_drops = 0, ob_drops = 0, full_slot = 0, conflicts = 0;
  int sub_result [P];

  for (genvar p = 0; p < P; p++) begin : g_mon
    initial sub_result[p] = 0;
    always @(negedge clk) begin
      if (rst_n && dut.u_sched.commit[p]) begin
        for (int i = 0; i < K; i++) begin
          cm_reject   += $countones(dut.u_sched.g_sub[p].u_sub.im_link_valid[i] &
                                    ~dut.u_sched.g_sub[p].u_sub.im_cm_gnt[i]);
          later_round += $countones(dut.u_sched.g_sub[p].u_sub.im_link_valid[i] &
                                    ~dut.u_sched.g_sub[p].u_sub.im_link_first[i]);
          if (dut.u_sched.g_sub[p].u_sub.disp_valid[i] != '0) sub_result[p]++;
        end
      end
    end
  end

  always @(negedge clk) begin
    #2;
    if (rst_n) begin
      int busy;
      busy = 0;
      for (int i = 0; i < K; i++) begin
        req_waiting += $countones(dut.u_sched.rc_pending[i] & dut.u_sched.end_left[i]);
        for (int v = 0; v < NK; v++) begin
          if (dut.u_sched.rc_count[i][v] >= 2) counter_ge2++;
          if (dut.arr_cnt[i][v] >= 2) multi_arrival++;
        end
        voq_drops += $countones(voq_drop[i]);
        ob_drops  += $countones(ob_drop[i]);
        busy      += $countones(dut.disp_valid[i]);
      end
      if (busy == K * M) full_slot++;
      if (cm_conflict != '0) conflicts++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  task automatic need(input string name, input int count, inout int c, inout int f);
    c++;
    $display("mechanism %-14s %0d", name, count);
    if (count == 0) begin f++; $display("FAIL mechanism %s never happened", name); end
  endtask

  initial begin
    int c, f;
    repeat (2) @(posedge clk);
    wait (done);
    c = checks; f = failures;
    need("cm_reject", cm_reject, c, f);
    need("later_round", later_round, c, f);
    need("req_waiting", req_waiting, c, f);
    need("counter_ge2", counter_ge2, c, f);
    need("multi_arrival", multi_arrival, c, f);
    need("voq_drop", voq_drops, c, f);
    need("ob_drop", ob_drops, c, f);
    need("full_slot", full_slot, c, f);
    for (int p = 0; p < P; p++) need($sformatf("sub_result[%0d]", p), sub_result[p], c, f);
    c++;
    if (conflicts != 0) begin f++; $display("FAIL %0d CM conflicts", conflicts); end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
