// om_outbuf_tb: output module buffers against a queue model.
//
// n = 3 output ports, m = 3 input links, k = 2, depth 4.  Random cells
// arrive on the links (several for one port in a slot); every port must
// send its buffered cells one per slot in arrival order (link order
// within a slot), and a cell arriving at a full buffer must be dropped.
module om_outbuf_tb;
  localparam int N = 3, M = 3, K = 2, NK = N * K, DEPTH = 4, CW = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [M-1:0]  in_valid, drop;
  logic [2:0]    in_dst  [M];
  logic [CW-1:0] in_cell [M];
  logic [N-1:0]  op_valid;
  logic [CW-1:0] op_cell [N];
  logic [2:0]    occ [N];

  om_outbuf #(.N(N), .M(M), .K(K), .DEPTH(DEPTH), .CELL_W(CW)) dut (
    .clk, .rst_n, .in_valid, .in_dst, .in_cell, .op_valid, .op_cell, .drop, .occ);

  logic [CW-1:0] q [N][$];
  logic [M-1:0] dropv;
  int drops_seen = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int size0 [N];
    int acc [N];
    logic [CW-1:0] seq;
    seq = '0;
    in_valid = '0;
    for (int r = 0; r < M; r++) begin in_dst[r] = '0; in_cell[r] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int r = 0; r < M; r++) begin
        in_valid[r] = ($urandom_range(0, 2) != 0) && (t < 2900);
        in_dst[r]   = 3'($urandom_range(0, NK - 1));
        in_cell[r]  = seq; seq++;
      end
      #1;
      for (int h = 0; h < N; h++) begin
        size0[h] = q[h].size(); acc[h] = 0;
        checks++;
        if (op_valid[h] != (size0[h] > 0) || (size0[h] > 0 && op_cell[h] != q[h][0]) || int'(occ[h]) != size0[h]) begin
          failures++; $display("FAIL t=%0d port %0d valid=%0b cell=%h", t, h, op_valid[h], op_cell[h]);
        end
      end
      for (int r = 0; r < M; r++) begin
        if (in_valid[r]) begin
          int h;
          bit ok;
          h = int'(in_dst[r]) / K;
          ok = size0[h] + acc[h] < DEPTH;
          checks++;
          if (drop[r] == ok) begin failures++; $display("FAIL t=%0d drop[%0d]", t, r); end
          if (ok) acc[h]++; else drops_seen++;
        end else begin
          checks++;
          if (drop[r]) begin failures++; $display("FAIL t=%0d spurious drop", t); end
        end
      end
      dropv = drop;
      @(posedge clk);
      for (int h = 0; h < N; h++) if (q[h].size() > 0) void'(q[h].pop_front());
      for (int r = 0; r < M; r++) if (in_valid[r] && !dropv[r]) q[int'(in_dst[r]) / K].push_back(in_cell[r]);
    end
    checks++;
    if (drops_seen == 0) begin failures++; $display("FAIL no overflow exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
