// crrd_cm_arb: phase 2 of CRRD in one central module, CM(r).
//
// Each IM(i) whose output link L_I(i,r) was matched in phase 1 sends a
// request for the output module OM(j) its VOQ is destined to.  The CM has
// one round-robin arbiter A_C(r,j) per output link L_C(r,j); it grants one
// of the IMs requesting OM(j), searching from its pointer P_C(r,j).  The
// grant is returned to the requesting IM.
//
// Pointer rule: on 'commit', P_C(r,j) moves to one past the granted IM,
// but only if that IM's request came from a first-round phase-1 match
// (req_first).  Pointers reset to 0.
//
// Interface: per IM i, req_valid[i], req_om[i] (= j) and req_first[i];
// gnt[i] is the combinational grant.  Like crrd_im_match, the logic may
// take the whole P-slot matching window to settle.
module crrd_cm_arb #(
  parameter int unsigned K  = pcrrd_pkg::K_DEF,  // IMs = OMs (k)
  parameter int unsigned JW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [K-1:0]  req_valid,
  input  logic [JW-1:0] req_om [K],
  input  logic [K-1:0]  req_first,
  input  logic          commit,
  output logic [K-1:0]  gnt
);

  logic [JW-1:0] ptr_c [K];          // P_C(r,j), indexed by j
  logic [K-1:0]  req_j [K];          // requests for OM(j), indexed by IM
  logic [K-1:0]  gnt_j [K];
  logic [JW-1:0] gidx_j [K];
  logic [K-1:0]  any_j;

  always_comb begin
    for (int j = 0; j < K; j++) begin
      for (int i = 0; i < K; i++) begin
        req_j[j][i] = req_valid[i] && (int'(req_om[i]) == j);
      end
    end
  end

  for (genvar j = 0; j < K; j++) begin : g_ac
    rr_arbiter #(.N(K)) u_ac (
      .req     (req_j[j]),
      .ptr     (ptr_c[j]),
      .gnt     (gnt_j[j]),
      .gnt_idx (gidx_j[j]),
      .any_gnt (any_j[j])
    );
  end

  always_comb begin
    gnt = '0;
    for (int j = 0; j < K; j++) gnt |= gnt_j[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < K; j++) ptr_c[j] <= '0;
    end else if (commit) begin
      for (int j = 0; j < K; j++) begin
        if (any_j[j] && req_first[gidx_j[j]])
          ptr_c[j] <= JW'((int'(gidx_j[j]) + 1) % K);
      end
    end
  end

endmodule
