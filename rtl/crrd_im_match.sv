// crrd_im_match: phase 1 of CRRD inside one input module, IM(i).
//
// Every requesting VOQ asks all m output-link arbiters A_L(i,r).  Each free
// link arbiter grants one requesting VOQ, searching from its pointer
// P_L(i,r); each VOQ arbiter A_V(i,v) accepts one of the grants it got,
// searching from its pointer P_V(i,v).  ITER such request/grant/accept
// rounds are unrolled combinationally; later rounds only involve VOQs and
// links left unmatched by the earlier ones.  The result, per output link,
// is the matched VOQ and whether the match was made in the first round.
//
// Pointer rule (as for iSLIP): on 'commit', and only for a link that was
// matched in the first round and whose request the CM granted (cm_gnt),
// P_L(i,r) moves to one past the accepted VOQ and P_V(i,v) to one past
// the accepting link.  All pointers reset to 0.
//
// Timing: the matching is a combinational function of req and of the
// pointer registers.  In PCRRD, req (the subscheduler's request flags) and
// the pointers change only at the commit edge that closes a matching
// window, so this logic may take up to P clock slots to settle (a P-cycle
// multicycle path).  That is the scheduling-time relaxation of PCRRD.
//
// The source gives the algorithm; unrolling the rounds in logic and the
// interface are this design's choices.
module crrd_im_match #(
  parameter int unsigned NK   = pcrrd_pkg::N_DEF * pcrrd_pkg::K_DEF, // VOQs per IM (n*k)
  parameter int unsigned M    = pcrrd_pkg::M_DEF,     // output links = central modules
  parameter int unsigned ITER = pcrrd_pkg::ITER_DEF,  // request/grant/accept rounds
  parameter int unsigned VW   = (NK > 1) ? $clog2(NK) : 1,
  parameter int unsigned RW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NK-1:0] req,                 // VOQ request flags
  input  logic          commit,              // end of the matching window
  input  logic [M-1:0]  cm_gnt,              // phase-2 grant per output link
  output logic [M-1:0]  link_valid,          // link r matched with a VOQ
  output logic [VW-1:0] link_voq   [M],      // VOQ matched to link r
  output logic [M-1:0]  link_first,          // matched in the first round
  output logic [NK-1:0] voq_matched          // VOQ matched to some link
);

  logic [VW-1:0] ptr_l [M];    // P_L(i,r)
  logic [RW-1:0] ptr_v [NK];   // P_V(i,v)

  // Each round lives in its own generate scope and hands the still-free
  // VOQs and links, and the matching found so far, to the next round.
  for (genvar it = 0; it < ITER; it++) begin : g_iter
    logic [NK-1:0] vf_in, vf_out;            // VOQs still free (and requesting)
    logic [M-1:0]  lf_in, lf_out;            // links still free
    logic [M-1:0]  lv_in, lv_out;            // links matched so far
    logic [VW-1:0] lvoq_in [M];
    logic [VW-1:0] lvoq_out [M];
    logic [NK-1:0] lgnt    [M];              // grant of A_L(r)
    logic [M-1:0]  vgrants [NK];             // grants received by VOQ v
    logic [M-1:0]  vacc    [NK];             // link accepted by A_V(v)
    logic [NK-1:0] vacc_any;
    logic [M-1:0]  link_acc;

    if (it == 0) begin : g_first
      assign vf_in = req;
      assign lf_in = '1;
      assign lv_in = '0;
      for (genvar r = 0; r < M; r++) begin : g_z
        assign lvoq_in[r] = '0;
      end
    end else begin : g_next
      assign vf_in   = g_iter[it-1].vf_out;
      assign lf_in   = g_iter[it-1].lf_out;
      assign lv_in   = g_iter[it-1].lv_out;
      assign lvoq_in = g_iter[it-1].lvoq_out;
    end

    // Step 2: grant.
    for (genvar r = 0; r < M; r++) begin : g_al
      logic [VW-1:0] unused_idx;
      logic          unused_any;
      rr_arbiter #(.N(NK)) u_al (
        .req     (lf_in[r] ? vf_in : '0),
        .ptr     (ptr_l[r]),
        .gnt     (lgnt[r]),
        .gnt_idx (unused_idx),
        .any_gnt (unused_any)
      );
    end
    // Step 3: accept.
    for (genvar v = 0; v < NK; v++) begin : g_av
      logic [RW-1:0] unused_idx;
      for (genvar r = 0; r < M; r++) begin : g_tr
        assign vgrants[v][r] = lgnt[r][v];
      end
      rr_arbiter #(.N(M)) u_av (
        .req     (vgrants[v]),
        .ptr     (ptr_v[v]),
        .gnt     (vacc[v]),
        .gnt_idx (unused_idx),
        .any_gnt (vacc_any[v])
      );
    end

    always_comb begin
      link_acc = '0;
      lvoq_out = lvoq_in;
      for (int v = 0; v < NK; v++) begin
        link_acc |= vacc[v];
        for (int r = 0; r < M; r++)
          if (vacc[v][r]) lvoq_out[r] = VW'(v);
      end
    end
    assign vf_out = vf_in & ~vacc_any;
    assign lf_out = lf_in & ~link_acc;
    assign lv_out = lv_in | link_acc;
  end

  assign link_valid  = g_iter[ITER-1].lv_out;
  assign link_voq    = g_iter[ITER-1].lvoq_out;
  assign link_first  = g_iter[0].link_acc;
  assign voq_matched = req & ~g_iter[ITER-1].vf_out;

  // Pointer update: first-round match that the CM also granted.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < M; r++)  ptr_l[r] <= '0;
      for (int v = 0; v < NK; v++) ptr_v[v] <= '0;
    end else if (commit) begin
      for (int r = 0; r < M; r++) begin
        if (link_valid[r] && link_first[r] && cm_gnt[r]) begin
          ptr_l[r]           <= VW'((int'(link_voq[r]) + 1) % NK);
          ptr_v[link_voq[r]] <= RW'((r + 1) % M);
        end
      end
    end
  end

endmodule
