// pcrrd_clos_switch_full_tb: the switch at its default size.
//
// 64 ports (n = m = k = 8), P = 4 subschedulers, four phase-1 rounds,
// 512-bit cells, VOQs of 16 and output buffers of 32 cells: the top is
// instantiated without parameter overrides.  clos_bench runs 150 slots of
// light uniform traffic, 2000 slots of 100 % load (permutation traffic)
// and a short hot spot on output port 0, then drains.  Every cell is
// checked for destination, content, order and latency (at least P+2
// slots).  From an idle start the round-robin pointers need a few hundred
// slots of full load to desynchronize; over the second half of the
// full-load phase all 64 IM output links must be busy in 95 % of the
// link-slots or more (the run measures 100 %).
module pcrrd_clos_switch_full_tb;
  import pcrrd_pkg::*;
  localparam int N = N_DEF, M = M_DEF, K = K_DEF, P = P_DEF, CW = CELL_W_DEF;
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

  pcrrd_clos_switch dut (
    .clk, .rst_n, .in_valid, .in_dst, .in_cell, .out_valid, .out_cell,
    .voq_drop, .ob_drop, .cm_conflict);

  clos_bench #(
    .N(N), .M(M), .K(K), .P(P), .CELL_W(CW),
    .LIGHT_SLOTS(150), .LIGHT_PCT(10), .FULL_SLOTS(2000), .HOT_SLOTS(20), .DRAIN_SLOTS(2000)
  ) bench (
    .clk, .rst_n, .in_valid, .in_dst, .in_cell, .out_valid, .out_cell,
    .voq_drop, .ob_drop, .ob_in_cell(dut.om_ic), .disp_valid(dut.disp_valid),
    .done, .checks, .failures);

  int conflicts = 0;
  always @(negedge clk) if (rst_n && cm_conflict != '0) conflicts++;

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    wait (done);
    if (conflicts != 0) $display("FAIL %0d CM conflicts", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + int'(conflicts != 0));
    $finish;
  end
endmodule
