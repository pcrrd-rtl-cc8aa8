// pcrrd_subscheduler: one PCRRD subscheduler p, a complete CRRD engine.
//
// It holds the request flags RF(i,v,p) of all k IMs (n*k per IM) and runs
// the CRRD algorithm on them: k IM parts (crrd_im_match, the A_V and A_L
// arbiters of each IM) and m CM parts (crrd_cm_arb, the A_C arbiters of
// each CM).  Its pointers are its own and independent of the other
// subschedulers.  This is the centralized arrangement, where one block
// holds the IM and CM parts of a subscheduler; the same parts could be
// placed in the IMs and CMs instead.
//
// Operation: the flags change only at 'commit', the edge that ends this
// subscheduler's P-slot matching window.  During the window the matching
// settles combinationally from the flags and pointers (a P-cycle path).
// At commit:
//   * stage 4: every granted flag is cleared (F <- F - 1) and the
//     pointers move by the CRRD rule;
//   * stage 2: flags named in load[] are set (the scheduler only loads a
//     flag that is zero after the clear), starting the next window.
// Outputs valid during the last slot of the window: per IM and output link
// the matched VOQ (disp_valid/disp_voq, only CM-granted matches) and per
// VOQ the granted flag (grant).
module pcrrd_subscheduler #(
  parameter int unsigned N    = pcrrd_pkg::N_DEF,
  parameter int unsigned M    = pcrrd_pkg::M_DEF,
  parameter int unsigned K    = pcrrd_pkg::K_DEF,
  parameter int unsigned ITER = pcrrd_pkg::ITER_DEF,
  parameter int unsigned NK   = N * K,
  parameter int unsigned VW   = (NK > 1) ? $clog2(NK) : 1,
  parameter int unsigned JW   = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          commit,
  input  logic [NK-1:0] load       [K],
  output logic [NK-1:0] flag       [K],   // F(i,v,p)
  output logic [NK-1:0] grant      [K],   // flag granted in this window
  output logic [M-1:0]  disp_valid [K],   // IM i sends on link r
  output logic [VW-1:0] disp_voq   [K][M]
);

  logic [M-1:0]  im_link_valid [K];
  logic [VW-1:0] im_link_voq   [K][M];
  logic [M-1:0]  im_link_first [K];
  logic [NK-1:0] im_voq_match  [K];
  logic [M-1:0]  im_cm_gnt     [K];     // grant seen by IM i on link r

  logic [K-1:0]  cm_req_valid [M];
  logic [JW-1:0] cm_req_om    [M][K];
  logic [K-1:0]  cm_req_first [M];
  logic [K-1:0]  cm_gnt       [M];

  // Phase 1 in each IM.
  for (genvar i = 0; i < K; i++) begin : g_im
    crrd_im_match #(.NK(NK), .M(M), .ITER(ITER)) u_im (
      .clk         (clk),
      .rst_n       (rst_n),
      .req         (flag[i]),
      .commit      (commit),
      .cm_gnt      (im_cm_gnt[i]),
      .link_valid  (im_link_valid[i]),
      .link_voq    (im_link_voq[i]),
      .link_first  (im_link_first[i]),
      .voq_matched (im_voq_match[i])
    );
  end

  // Requests from IM(i) over L_I(i,r) to CM(r): OM index j = v mod k.
  always_comb begin
    for (int r = 0; r < M; r++) begin
      for (int i = 0; i < K; i++) begin
        cm_req_valid[r][i] = im_link_valid[i][r];
        cm_req_first[r][i] = im_link_first[i][r];
        cm_req_om[r][i]    = JW'(int'(im_link_voq[i][r]) % K);
      end
    end
  end

  // Phase 2 in each CM.
  for (genvar r = 0; r < M; r++) begin : g_cm
    crrd_cm_arb #(.K(K)) u_cm (
      .clk       (clk),
      .rst_n     (rst_n),
      .req_valid (cm_req_valid[r]),
      .req_om    (cm_req_om[r]),
      .req_first (cm_req_first[r]),
      .commit    (commit),
      .gnt       (cm_gnt[r])
    );
  end

  always_comb begin
    for (int i = 0; i < K; i++) begin
      grant[i]      = '0;
      disp_valid[i] = '0;
      for (int r = 0; r < M; r++) begin
        im_cm_gnt[i][r]  = cm_gnt[r][i];
        disp_valid[i][r] = im_link_valid[i][r] && cm_gnt[r][i];
        disp_voq[i][r]   = im_link_voq[i][r];
        if (disp_valid[i][r]) grant[i][im_link_voq[i][r]] = 1'b1;
      end
    end
  end

  // Stage 4 (clear granted flags) and stage 2 (load new requests).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) flag[i] <= '0;
    end else if (commit) begin
      for (int i = 0; i < K; i++) flag[i] <= (flag[i] & ~grant[i]) | load[i];
    end
  end

  // Internal consistency: only flagged VOQs are matched.
  always_ff @(posedge clk) begin
    if (rst_n && commit) begin
      for (int i = 0; i < K; i++)
        assert ((im_voq_match[i] & ~flag[i]) == '0)
          else $error("pcrrd_subscheduler: unflagged VOQ matched in IM %0d", i);
    end
  end

endmodule
