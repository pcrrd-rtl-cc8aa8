// clos_bench: traffic source and scoreboard for the whole Clos switch.
//
// Drives every input port with cells and checks every cell that leaves.
// A cell carries, in its low 64 bits, a global sequence number [31:0],
// its input port i*n+h [47:32] and its destination tag v [63:48]; the
// rest of the cell is filled with a pattern derived from the sequence
// number and checked too.  Traffic runs in phases:
//   1. LIGHT_SLOTS slots of uniform Bernoulli traffic at LIGHT_PCT % load;
//   2. FULL_SLOTS slots at 100 % load, uniform over the outputs: in slot
//      t input port g = i*n+h sends to tag (g + t) mod n*k, so every slot
//      is a permutation; the rate at which IM output links carry cells is
//      measured over the second half and must reach MIN_THRU;
//   3. HOT_SLOTS slots where every input sends to output port 0, which
//      overflows VOQs and the output buffer (drops are expected there);
//   4. no input until everything accepted has left, or DRAIN_SLOTS.
// Scoreboard: every accepted cell must leave at the output port its tag
// names, unchanged, exactly once, and in order with the other cells of
// the same input/output pair, unless an output buffer reported dropping
// it.  Latency from arrival slot to departure slot must be at least P+2,
// and exactly P+2 must be seen (a cell that finds the switch idle).
// Inputs change just after the falling clock edge; outputs are sampled
// just after it as well.
module clos_bench #(
  parameter int unsigned N           = 2,
  parameter int unsigned M           = 2,
  parameter int unsigned K           = 2,
  parameter int unsigned P           = 3,
  parameter int unsigned CELL_W      = 64,
  parameter int unsigned LIGHT_SLOTS = 300,
  parameter int unsigned LIGHT_PCT   = 20,
  parameter int unsigned FULL_SLOTS  = 600,
  parameter int unsigned HOT_SLOTS   = 100,
  parameter int unsigned DRAIN_SLOTS = 3000,
  parameter real         MIN_THRU    = 0.95,
  parameter int unsigned NK          = N * K,
  parameter int unsigned VW          = (NK > 1) ? $clog2(NK) : 1
) (
  input  logic              clk,
  output logic              rst_n,
  output logic [N-1:0]      in_valid    [K],
  output logic [VW-1:0]     in_dst      [K][N],
  output logic [CELL_W-1:0] in_cell     [K][N],
  input  logic [N-1:0]      out_valid   [K],
  input  logic [CELL_W-1:0] out_cell    [K][N],
  input  logic [N-1:0]      voq_drop    [K],
  input  logic [M-1:0]      ob_drop     [K],
  input  logic [CELL_W-1:0] ob_in_cell  [K][M],   // cell offered to OM(j) on link r
  input  logic [M-1:0]      disp_valid  [K],      // dispatch of this slot
  output logic              done,
  output int                checks,
  output int                failures
);

  localparam int NPORT = N * K;
  localparam int TOTAL = LIGHT_SLOTS + FULL_SLOTS + HOT_SLOTS;
  localparam int MAXC  = TOTAL * NPORT + 1;

  int unsigned   q [NPORT * NK][$];     // outstanding seqs per (input, output) flow
  int            arr_slot [];           // arrival slot per seq
  int            slot;
  int            accepted, delivered, vdrops, odrops, outstanding;
  int            min_lat, max_lat;
  longint        lat_sum;
  int            thru_cells, thru_slots;

  function automatic logic [CELL_W-1:0] make_cell(int unsigned seq, int src, int v);
    logic [CELL_W-1:0] c;
    for (int b = 0; b < CELL_W; b += 32) c[b +: 32] = seq * 32'h9E3779B1 + 32'(b);
    c[31:0]  = seq;
    c[47:32] = 16'(src);
    c[63:48] = 16'(v);
    return c;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL slot %0d: %s", slot, msg);
  endtask

  task automatic remove_seq(int flow, int unsigned seq);
    for (int x = 0; x < q[flow].size(); x++)
      if (q[flow][x] == seq) begin q[flow].delete(x); return; end
    fail($sformatf("dropped cell %0d not outstanding", seq));
  endtask

  initial begin
    int unsigned seq;
    checks = 0; failures = 0; done = 0;
    accepted = 0; delivered = 0; vdrops = 0; odrops = 0;
    min_lat = 1 << 30; max_lat = 0; lat_sum = 0;
    thru_cells = 0; thru_slots = 0;
    arr_slot = new[MAXC];
    seq = 0;
    rst_n = 0;
    for (int i = 0; i < K; i++) begin
      in_valid[i] = '0;
      for (int h = 0; h < N; h++) begin in_dst[i][h] = '0; in_cell[i][h] = '0; end
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    slot = -1;
    for (int t = 0; t < TOTAL + DRAIN_SLOTS; t++) begin
      @(negedge clk);
      slot = t;
      // ---- drive this slot's arrivals
      for (int i = 0; i < K; i++) begin
        for (int h = 0; h < N; h++) begin
          int v;
          bit go;
          v = $urandom_range(0, NK - 1);
          if (t < LIGHT_SLOTS)                    go = $urandom_range(0, 99) < LIGHT_PCT;
          else if (t < LIGHT_SLOTS + FULL_SLOTS) begin
            go = 1;
            v  = (i * N + h + t) % NK;
          end
          else if (t < TOTAL)                     begin go = 1; v = 0; end
          else                                    go = 0;
          in_valid[i][h] = go;
          in_dst[i][h]   = VW'(v);
          in_cell[i][h]  = make_cell(seq, i * N + h, v);
          if (go) seq++;
        end
      end
      #1;
      // ---- outputs of this slot
      for (int j = 0; j < K; j++) begin
        for (int h = 0; h < N; h++) begin
          if (out_valid[j][h]) begin
            int unsigned s;
            int src, v, flow, lat;
            s    = out_cell[j][h][31:0];
            src  = int'(out_cell[j][h][47:32]);
            v    = int'(out_cell[j][h][63:48]);
            checks++;
            if (v % K != j || v / K != h || src >= NPORT || s >= seq) begin
              fail($sformatf("cell %0d for tag %0d left at OP(%0d,%0d)", s, v, j, h));
            end else begin
              flow = src * NK + v;
              checks++;
              if (out_cell[j][h] != make_cell(s, src, v)) fail($sformatf("cell %0d corrupted", s));
              checks++;
              if (q[flow].size() == 0 || q[flow][0] != s)
                fail($sformatf("cell %0d of flow %0d out of order or duplicated", s, flow));
              else void'(q[flow].pop_front());
              lat = slot - arr_slot[s];
              checks++;
              if (lat < int'(P) + 2) fail($sformatf("cell %0d latency %0d < P+2", s, lat));
              if (lat < min_lat) min_lat = lat;
              if (lat > max_lat) max_lat = lat;
              lat_sum += lat;
              delivered++;
            end
          end
        end
      end
      // ---- cells dropped at an output buffer in this slot
      for (int j = 0; j < K; j++)
        for (int r = 0; r < M; r++)
          if (ob_drop[j][r]) begin
            int unsigned s;
            s = ob_in_cell[j][r][31:0];
            remove_seq(int'(ob_in_cell[j][r][47:32]) * NK + int'(ob_in_cell[j][r][63:48]), s);
            odrops++;
          end
      // ---- accepted arrivals
      for (int i = 0; i < K; i++)
        for (int h = 0; h < N; h++)
          if (in_valid[i][h]) begin
            int unsigned s;
            s = in_cell[i][h][31:0];
            if (voq_drop[i][h]) vdrops++;
            else begin
              q[(i * N + h) * NK + int'(in_dst[i][h])].push_back(s);
              arr_slot[s] = slot;
              accepted++;
            end
          end
      // ---- dispatcher throughput at full load, second half of the phase
      if (t >= LIGHT_SLOTS + FULL_SLOTS / 2 && t < LIGHT_SLOTS + FULL_SLOTS) begin
        for (int i = 0; i < K; i++) thru_cells += $countones(disp_valid[i]);
        thru_slots++;
      end
      if (t >= TOTAL) begin
        outstanding = 0;
        for (int f = 0; f < NPORT * NK; f++) outstanding += q[f].size();
        if (outstanding == 0) break;
      end
    end
    outstanding = 0;
    for (int f = 0; f < NPORT * NK; f++) outstanding += q[f].size();
    checks++;
    if (outstanding != 0) fail($sformatf("%0d accepted cells never left", outstanding));
    checks++;
    if (accepted != delivered + odrops)
      fail($sformatf("accepted %0d != delivered %0d + dropped at output %0d", accepted, delivered, odrops));
    checks++;
    if (min_lat != int'(P) + 2) fail($sformatf("minimum latency %0d, expected %0d", min_lat, P + 2));
    checks++;
    if (thru_slots > 0 && real'(thru_cells) / real'(thru_slots * K * M) < MIN_THRU)
      fail($sformatf("full-load dispatch rate %0.3f below %0.2f", real'(thru_cells) / real'(thru_slots * K * M), MIN_THRU));
    $display("bench: injected %0d accepted %0d delivered %0d voq_drops %0d ob_drops %0d",
             seq, accepted, delivered, vdrops, odrops);
    $display("bench: latency min %0d avg %0.1f max %0d slots; full-load dispatch rate %0.4f",
             min_lat, (delivered > 0) ? real'(lat_sum) / real'(delivered) : 0.0, max_lat,
             (thru_slots > 0) ? real'(thru_cells) / real'(thru_slots * K * M) : 0.0);
    done = 1;
  end

endmodule
