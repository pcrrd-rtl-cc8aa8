// im_voq_tb: input module VOQ storage against a queue model.
//
// n = 3 ports, k = 2 (six VOQs), m = 2 links, depth 4, 16-bit cells.
// Every slot random cells arrive (often several for one VOQ) and the
// testbench dispatches the heads of up to two distinct non-empty VOQs.
// Checked each slot: the cell on every link is the model's head of that
// VOQ, the accepted counts per VOQ, which arrivals were dropped (a full
// VOQ at the start of the slot refuses cells, in port order), and the
// occupancy.
module im_voq_tb;
  localparam int N = 3, M = 2, K = 2, NK = N * K, DEPTH = 4, CW = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0]  in_valid, drop;
  logic [2:0]    in_dst  [N];
  logic [CW-1:0] in_cell [N];
  logic [1:0]    arr_cnt [NK];
  logic [2:0]    occ     [NK];
  logic [M-1:0]  disp_valid, link_valid;
  logic [2:0]    disp_voq [M];
  logic [2:0]    link_dst [M];
  logic [CW-1:0] link_cell [M];

  im_voq #(.N(N), .M(M), .K(K), .DEPTH(DEPTH), .CELL_W(CW)) dut (
    .clk, .rst_n, .in_valid, .in_dst, .in_cell, .drop, .arr_cnt, .occ,
    .disp_valid, .disp_voq, .link_valid, .link_dst, .link_cell);

  logic [CW-1:0] q [NK][$];
  logic [N-1:0] dropv;
  int drops_seen = 0, multi_seen = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int size0 [NK];
    int acc [NK];
    logic [CW-1:0] seq;
    seq = '0;
    in_valid = '0; disp_valid = '0;
    for (int h = 0; h < N; h++) begin in_dst[h] = '0; in_cell[h] = '0; end
    for (int r = 0; r < M; r++) disp_voq[r] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // arrivals: bias towards two VOQs so that queues fill up
      for (int h = 0; h < N; h++) begin
        in_valid[h] = ($urandom_range(0, 3) != 0) && (t < 2800);
        in_dst[h]   = ($urandom_range(0, 1) == 0) ? 3'($urandom_range(0, 1)) : 3'($urandom_range(0, NK - 1));
        in_cell[h]  = seq;
        seq++;
      end
      // dispatch: up to M distinct non-empty VOQs
      disp_valid = '0;
      for (int r = 0; r < M; r++) begin
        int v;
        v = $urandom_range(0, NK - 1);
        disp_voq[r] = 3'(v);
        if (q[v].size() > 0 && $urandom_range(0, 2) != 0 && !(r == 1 && disp_valid[0] && disp_voq[0] == 3'(v)))
          disp_valid[r] = 1'b1;
      end
      #1;
      for (int v = 0; v < NK; v++) begin
        size0[v] = q[v].size();
        acc[v] = 0;
        checks++;
        if (int'(occ[v]) != size0[v]) begin failures++; $display("FAIL t=%0d occ[%0d]=%0d vs %0d", t, v, occ[v], size0[v]); end
      end
      for (int r = 0; r < M; r++) begin
        checks++;
        if (link_valid[r] != disp_valid[r] ||
            (disp_valid[r] && (link_cell[r] != q[disp_voq[r]][0] || link_dst[r] != disp_voq[r]))) begin
          failures++; $display("FAIL t=%0d link %0d cell %h expected %h", t, r, link_cell[r], q[disp_voq[r]][0]);
        end
      end
      for (int h = 0; h < N; h++) begin
        if (in_valid[h]) begin
          bit ok;
          ok = (size0[in_dst[h]] + acc[in_dst[h]]) < DEPTH;
          checks++;
          if (drop[h] == ok) begin failures++; $display("FAIL t=%0d drop[%0d]", t, h); end
          if (ok) begin acc[in_dst[h]]++; end else drops_seen++;
        end
      end
      for (int v = 0; v < NK; v++) begin
        checks++;
        if (int'(arr_cnt[v]) != acc[v]) begin failures++; $display("FAIL t=%0d arr_cnt[%0d]", t, v); end
        if (acc[v] > 1) multi_seen++;
      end
      dropv = drop;
      @(posedge clk);
      for (int r = 0; r < M; r++) if (disp_valid[r]) void'(q[disp_voq[r]].pop_front());
      for (int h = 0; h < N; h++) if (in_valid[h] && !dropv[h]) q[in_dst[h]].push_back(in_cell[h]);
    end
    checks++;
    if (drops_seen == 0 || multi_seen == 0) begin
      failures++; $display("FAIL coverage drops=%0d multi=%0d", drops_seen, multi_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
