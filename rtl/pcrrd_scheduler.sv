// pcrrd_scheduler: centralized PCRRD dispatcher for a k-IM Clos switch.
//
// PCRRD spreads the CRRD matching over P subschedulers so that each may
// take P cell slots to compute a matching, while one of them still
// delivers a dispatch result every slot.  This block holds the request
// counters RC(i,v) of every IM (pcrrd_rc) and P subschedulers
// (pcrrd_subscheduler), whose windows are staggered by one slot:
// subscheduler p computes during slots Pl+p .. Pl+p+P-1.
//
// One clock cycle is one cell time slot.  'phase' holds t mod P for the
// current slot t; it resets to P-1, so the first slot after reset is t=0.
// At the clock edge ending slot t, subscheduler e = (t+1) mod P:
//   stage 4  finishes its matching: granted flags are cleared and the
//            result is registered as the dispatch for slot t+1;
//   stage 1  adds the cells that entered each VOQ during slot t to RC;
//   stage 2  (the start of slot t+1) for each VOQ with a pending request
//            whose flag in e is (now) zero, moves one request from
//            RC(i,v) into RF(i,v,e), which opens e's next window.
// A lone cell arriving in slot t is thus flagged for the window
// t+1 .. t+P and sent from its VOQ in slot t+P+1.
// Since a VOQ is granted at most once per slot and its flags never
// exceed the cells it holds, the head-of-line cell sent for a grant is
// always the VOQ's oldest, which keeps each VOQ's cells in order.
// A subscheduler's flags and pointers change only at the edge where it
// commits, once every P clocks, so paths from them through its matching
// logic are P-cycle multicycle paths; 'phase', the counters and the
// dispatch registers are ordinary single-cycle logic.
//
// Interface: arr_cnt[i][v] cells accepted into VOQ(i,v) this slot;
// disp_valid[i][r]/disp_voq[i][r] registered dispatch for the current
// slot: IM(i) sends the head cell of that VOQ on its link to CM(r).
module pcrrd_scheduler #(
  parameter int unsigned N    = pcrrd_pkg::N_DEF,
  parameter int unsigned M    = pcrrd_pkg::M_DEF,
  parameter int unsigned K    = pcrrd_pkg::K_DEF,
  parameter int unsigned P    = pcrrd_pkg::P_DEF,
  parameter int unsigned ITER = pcrrd_pkg::ITER_DEF,
  parameter int unsigned LMAX = pcrrd_pkg::VOQ_DEPTH_DEF,
  parameter int unsigned NK   = N * K,
  parameter int unsigned VW   = (NK > 1) ? $clog2(NK) : 1,
  parameter int unsigned PW   = (P > 1) ? $clog2(P) : 1,
  parameter int unsigned AW   = $clog2(N + 1),
  parameter int unsigned CW   = $clog2(LMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] arr_cnt    [K][NK],
  output logic [M-1:0]  disp_valid [K],
  output logic [VW-1:0] disp_voq   [K][M],
  output logic [PW-1:0] phase
);

  logic [PW-1:0] nxt;
  logic [P-1:0]  commit;

  logic [NK-1:0] s_load  [P][K];
  logic [NK-1:0] s_flag  [P][K];
  logic [NK-1:0] s_grant [P][K];
  logic [M-1:0]  s_dval  [P][K];
  logic [VW-1:0] s_dvoq  [P][K][M];

  logic [NK-1:0] rc_take    [K];
  logic [NK-1:0] rc_pending [K];
  logic [CW-1:0] rc_count   [K][NK];
  logic [NK-1:0] end_left   [K];     // flags of the ending subscheduler after stage 4

  assign nxt = (int'(phase) == int'(P) - 1) ? '0 : PW'(int'(phase) + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= PW'(P - 1);
    else        phase <= nxt;
  end

  for (genvar i = 0; i < K; i++) begin : g_rc
    pcrrd_rc #(.NK(NK), .N(N), .LMAX(LMAX)) u_rc (
      .clk     (clk),
      .rst_n   (rst_n),
      .arr_cnt (arr_cnt[i]),
      .take    (rc_take[i]),
      .count   (rc_count[i]),
      .pending (rc_pending[i])
    );
  end

  for (genvar p = 0; p < P; p++) begin : g_sub
    assign commit[p] = (int'(nxt) == p);
    pcrrd_subscheduler #(.N(N), .M(M), .K(K), .ITER(ITER)) u_sub (
      .clk        (clk),
      .rst_n      (rst_n),
      .commit     (commit[p]),
      .load       (s_load[p]),
      .flag       (s_flag[p]),
      .grant      (s_grant[p]),
      .disp_valid (s_dval[p]),
      .disp_voq   (s_dvoq[p])
    );
  end

  // Stage 2 for the subscheduler whose window ends now.
  always_comb begin
    for (int i = 0; i < K; i++) begin
      end_left[i] = '0;
      for (int p = 0; p < P; p++)
        if (commit[p]) end_left[i] = s_flag[p][i] & ~s_grant[p][i];
      rc_take[i] = rc_pending[i] & ~end_left[i];
      for (int p = 0; p < P; p++)
        s_load[p][i] = commit[p] ? rc_take[i] : '0;
    end
  end

  // Stage 4 result becomes the dispatch of the next slot.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) begin
        disp_valid[i] <= '0;
        for (int r = 0; r < M; r++) disp_voq[i][r] <= '0;
      end
    end else begin
      for (int p = 0; p < P; p++) begin
        if (commit[p]) begin
          for (int i = 0; i < K; i++) begin
            disp_valid[i] <= s_dval[p][i];
            for (int r = 0; r < M; r++) disp_voq[i][r] <= s_dvoq[p][i][r];
          end
        end
      end
    end
  end

endmodule
