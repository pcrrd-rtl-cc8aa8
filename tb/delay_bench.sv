// delay_bench: one 64-port switch under a sequence of offered loads,
// measuring cell delay and throughput.
//
// The switch is instantiated with the given P and ITER and 64-bit cells
// (the payload does not affect scheduling).  For each of NLOADS load
// points, every input port generates cells for WARM + MEAS slots:
//   * BURSTY = 0: Bernoulli arrivals, each cell to a uniformly chosen
//     output port;
//   * BURSTY = 1: on/off bursts; a port in a burst sends one cell per
//     slot to one output port, burst lengths are geometric with mean
//     BURST_LEN, and idle periods are geometric with the mean that gives
//     the offered load.
// Delay is counted from the arrival slot to the slot the cell leaves its
// output port, so it includes the P+2 slots of the pipeline.  Only cells
// that arrive during the MEAS slots are measured.  Each cell's sequence
// number is checked against its input/output pair, so order is checked
// too.  Results are left in mean_delay[] and out_rate[]; 'done' rises at
// the end.
module delay_bench #(
  parameter int unsigned P         = 4,
  parameter int unsigned ITER      = 4,
  parameter bit          BURSTY    = 0,
  parameter int unsigned BURST_LEN = 10,
  parameter int unsigned NLOADS    = 4,
  parameter int unsigned LOAD_PCT [NLOADS] = '{10, 40, 70, 90},
  parameter int unsigned WARM      = 300,
  parameter int unsigned MEAS      = 1500
) (
  input  logic clk,
  output logic done,
  output real  mean_delay [NLOADS],
  output real  out_rate   [NLOADS],
  output int   checks,
  output int   failures
);
  import pcrrd_pkg::*;
  localparam int N = N_DEF, M = M_DEF, K = K_DEF, CW = 64;
  localparam int NK = N * K, VW = $clog2(NK), NPORT = N * K;

  logic          rst_n;
  logic [N-1:0]  in_valid [K];
  logic [VW-1:0] in_dst [K][N];
  logic [CW-1:0] in_cell [K][N];
  logic [N-1:0]  out_valid [K];
  logic [CW-1:0] out_cell [K][N];
  logic [N-1:0]  voq_drop [K];
  logic [M-1:0]  ob_drop [K];
  logic [M-1:0]  cm_conflict;

  pcrrd_clos_switch #(.P(P), .ITER(ITER), .CELL_W(CW)) dut (
    .clk, .rst_n, .in_valid, .in_dst, .in_cell, .out_valid, .out_cell,
    .voq_drop, .ob_drop, .cm_conflict);

  // per input port: cells still to send in the current burst, and its target
  int burst_left [NPORT];
  int burst_dst  [NPORT];
  int unsigned last_seq [NPORT * NK];   // last sequence seen per flow, +1
  int unsigned nseq     [NPORT];

  // arrival slot of a cell is carried in the cell itself:
  // [15:0] arrival slot, [31:16] sequence within its flow, [47:32] input port, [63:48] tag
  function automatic logic [CW-1:0] mk(int slot, int unsigned sq, int src, int v);
    return {16'(v), 16'(src), 16'(sq), 16'(slot)};
  endfunction

  initial begin
    int slot, meas_cells, lost;
    longint dsum;
    checks = 0; failures = 0; done = 0;
    rst_n = 0;
    for (int i = 0; i < K; i++) begin
      in_valid[i] = '0;
      for (int h = 0; h < N; h++) begin in_dst[i][h] = '0; in_cell[i][h] = '0; end
    end
    for (int g = 0; g < NPORT; g++) begin burst_left[g] = 0; burst_dst[g] = 0; nseq[g] = 0; end
    for (int f = 0; f < NPORT * NK; f++) last_seq[f] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    slot = 0;
    for (int l = 0; l < NLOADS; l++) begin
      int unsigned sent;
      dsum = 0; meas_cells = 0; lost = 0; sent = 0;
      for (int t = 0; t < int'(WARM + MEAS) + 600; t++) begin
        bit gen;
        @(negedge clk);
        slot++;
        gen = t < int'(WARM + MEAS);
        for (int i = 0; i < K; i++) begin
          for (int h = 0; h < N; h++) begin
            int g, v;
            bit go;
            g = i * N + h;
            go = 0; v = 0;
            if (gen) begin
              if (!BURSTY) begin
                go = $urandom_range(0, 9999) < LOAD_PCT[l] * 100;
                v  = $urandom_range(0, NK - 1);
              end else begin
                if (burst_left[g] == 0) begin
                  // start a burst with probability q = load / (load + B (1 - load))
                  real q;
                  q = real'(LOAD_PCT[l]) / (real'(LOAD_PCT[l]) + real'(BURST_LEN) * real'(100 - LOAD_PCT[l]));
                  if (real'($urandom_range(0, 999999)) < q * 1.0e6) begin
                    burst_left[g] = 1;
                    while ($urandom_range(0, BURST_LEN * 1000 - 1) >= 1000) burst_left[g]++;
                    burst_dst[g] = $urandom_range(0, NK - 1);
                  end
                end
                if (burst_left[g] > 0) begin
                  go = 1; v = burst_dst[g]; burst_left[g]--;
                end
              end
            end
            in_valid[i][h] = go;
            in_dst[i][h]   = VW'(v);
            in_cell[i][h]  = mk(slot, nseq[g], g, v);
          end
        end
        #1;
        for (int i = 0; i < K; i++)
          for (int h = 0; h < N; h++)
            if (in_valid[i][h]) begin
              if (voq_drop[i][h]) lost++;
              nseq[i * N + h]++;
              if (t >= int'(WARM)) sent++;
            end
        for (int j = 0; j < K; j++) begin
          for (int h = 0; h < N; h++) begin
            if (out_valid[j][h]) begin
              int arr, src, v, f, d, a;
              int unsigned sq;
              arr = int'(out_cell[j][h][15:0]);
              sq  = out_cell[j][h][31:16];
              src = int'(out_cell[j][h][47:32]);
              v   = int'(out_cell[j][h][63:48]);
              f   = src * NK + v;
              checks++;
              if (v != h * K + j || 16'(sq) < 16'(last_seq[f])) begin
                failures++;
                if (failures < 10) $display("FAIL P=%0d ITER=%0d: cell misrouted or out of order", P, ITER);
              end
              last_seq[f] = sq + 1;
              // arrival slot rebuilt from the 16-bit delay
              d = int'(16'(slot - arr));
              if (d < int'(P + 2)) begin
                failures++;
                if (failures < 10) $display("FAIL P=%0d: latency below P+2", P);
              end
              a = slot - d;
              if (a >= slot - t + int'(WARM) && a < slot - t + int'(WARM + MEAS)) begin
                dsum += longint'(d);
                meas_cells++;
              end
            end
          end
          for (int r = 0; r < M; r++) lost += int'(ob_drop[j][r]);
        end
      end
      mean_delay[l] = (meas_cells > 0) ? real'(dsum) / real'(meas_cells) : 0.0;
      out_rate[l]   = real'(meas_cells) / real'(MEAS * NPORT);
      checks++;
      if (meas_cells + lost < int'(sent) * 99 / 100) begin
        failures++;
        $display("FAIL P=%0d ITER=%0d load %0d%%: %0d of %0d measured cells delivered", P, ITER, LOAD_PCT[l], meas_cells, sent);
      end
      $display("P=%0d ITER=%0d %s load %0d%%: mean delay %0.2f slots, carried %0.3f, lost %0d",
               P, ITER, BURSTY ? "bursty" : "Bernoulli", LOAD_PCT[l], mean_delay[l], out_rate[l], lost);
    end
    done = 1;
  end
endmodule
