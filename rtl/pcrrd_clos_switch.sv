// pcrrd_clos_switch: three-stage Clos-network cell switch dispatched by PCRRD.
//
// k input modules (im_voq, n ports and n*k VOQs each), m bufferless k x k
// central modules (cm_switch) and k output modules (om_outbuf, n output
// buffers each) form an N = n*k port switch.  Link r of IM(i) goes to
// CM(r), link j of CM(r) goes to OM(j).  A centralized PCRRD scheduler
// (pcrrd_scheduler: request counters plus P pipelined CRRD subschedulers)
// decides each slot which VOQ of each IM uses which IM output link, so
// that no two cells meet on a CM output link and no cell waits in a CM.
//
// One clock cycle is one cell time slot.  Per slot:
//   * each input port IP(i,h) may deliver one cell with its destination
//     tag v = h*k + j (output port OP(j,h)); it enters VOQ(i,v), and the
//     request counter RC(i,v) counts it at the end of the slot;
//   * the dispatch decided at the end of the previous slot is carried out:
//     the head cells travel IM -> CM -> OM in this slot, tagged with v as
//     routing bits, and are written to their output buffers;
//   * each output port with a buffered cell sends one cell.
// A cell therefore needs at least P + 2 slots from arrival to output
// (one to reach its counter and a flag, P to be matched, one to cross).
//
// drop signals report cells lost at a full VOQ or output buffer;
// cm_conflict would flag two cells on one CM output link and must stay 0.
module pcrrd_clos_switch #(
  parameter int unsigned N         = pcrrd_pkg::N_DEF,
  parameter int unsigned M         = pcrrd_pkg::M_DEF,
  parameter int unsigned K         = pcrrd_pkg::K_DEF,
  parameter int unsigned P         = pcrrd_pkg::P_DEF,
  parameter int unsigned ITER      = pcrrd_pkg::ITER_DEF,
  parameter int unsigned VOQ_DEPTH = pcrrd_pkg::VOQ_DEPTH_DEF,
  parameter int unsigned OB_DEPTH  = pcrrd_pkg::OB_DEPTH_DEF,
  parameter int unsigned CELL_W    = pcrrd_pkg::CELL_W_DEF,
  parameter int unsigned NK        = N * K,
  parameter int unsigned VW        = (NK > 1) ? $clog2(NK) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      in_valid    [K],
  input  logic [VW-1:0]     in_dst      [K][N],
  input  logic [CELL_W-1:0] in_cell     [K][N],
  output logic [N-1:0]      out_valid   [K],
  output logic [CELL_W-1:0] out_cell    [K][N],
  output logic [N-1:0]      voq_drop    [K],
  output logic [M-1:0]      ob_drop     [K],
  output logic [M-1:0]      cm_conflict
);

  localparam int unsigned AW  = $clog2(N + 1);
  localparam int unsigned PW  = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned OW  = $clog2(VOQ_DEPTH + 1);
  localparam int unsigned OBW = $clog2(OB_DEPTH + 1);

  logic [AW-1:0]     arr_cnt    [K][NK];
  logic [OW-1:0]     voq_occ    [K][NK];
  logic [M-1:0]      disp_valid [K];
  logic [VW-1:0]     disp_voq   [K][M];
  logic [PW-1:0]     phase;

  // IM(i) output link r
  logic [M-1:0]      im_lv [K];
  logic [VW-1:0]     im_ld [K][M];
  logic [CELL_W-1:0] im_lc [K][M];
  // CM(r) input link i
  logic [K-1:0]      cm_iv [M];
  logic [VW-1:0]     cm_id [M][K];
  logic [CELL_W-1:0] cm_ic [M][K];
  // CM(r) output link j
  logic [K-1:0]      cm_ov [M];
  logic [VW-1:0]     cm_od [M][K];
  logic [CELL_W-1:0] cm_oc [M][K];
  // OM(j) input link r
  logic [M-1:0]      om_iv [K];
  logic [VW-1:0]     om_id [K][M];
  logic [CELL_W-1:0] om_ic [K][M];
  logic [OBW-1:0]    ob_occ [K][N];

  pcrrd_scheduler #(
    .N(N), .M(M), .K(K), .P(P), .ITER(ITER), .LMAX(VOQ_DEPTH)
  ) u_sched (
    .clk        (clk),
    .rst_n      (rst_n),
    .arr_cnt    (arr_cnt),
    .disp_valid (disp_valid),
    .disp_voq   (disp_voq),
    .phase      (phase)
  );

  for (genvar i = 0; i < K; i++) begin : g_im
    im_voq #(
      .N(N), .M(M), .K(K), .DEPTH(VOQ_DEPTH), .CELL_W(CELL_W)
    ) u_im (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (in_valid[i]),
      .in_dst     (in_dst[i]),
      .in_cell    (in_cell[i]),
      .drop       (voq_drop[i]),
      .arr_cnt    (arr_cnt[i]),
      .occ        (voq_occ[i]),
      .disp_valid (disp_valid[i]),
      .disp_voq   (disp_voq[i]),
      .link_valid (im_lv[i]),
      .link_dst   (im_ld[i]),
      .link_cell  (im_lc[i])
    );
  end

  // IM(i) link r  ->  CM(r) input i
  always_comb begin
    for (int r = 0; r < M; r++) begin
      for (int i = 0; i < K; i++) begin
        cm_iv[r][i] = im_lv[i][r];
        cm_id[r][i] = im_ld[i][r];
        cm_ic[r][i] = im_lc[i][r];
      end
    end
  end

  for (genvar r = 0; r < M; r++) begin : g_cm
    cm_switch #(.N(N), .K(K), .CELL_W(CELL_W)) u_cm (
      .in_valid  (cm_iv[r]),
      .in_dst    (cm_id[r]),
      .in_cell   (cm_ic[r]),
      .out_valid (cm_ov[r]),
      .out_dst   (cm_od[r]),
      .out_cell  (cm_oc[r]),
      .conflict  (cm_conflict[r])
    );
  end

  // CM(r) link j  ->  OM(j) input r
  always_comb begin
    for (int j = 0; j < K; j++) begin
      for (int r = 0; r < M; r++) begin
        om_iv[j][r] = cm_ov[r][j];
        om_id[j][r] = cm_od[r][j];
        om_ic[j][r] = cm_oc[r][j];
      end
    end
  end

  for (genvar j = 0; j < K; j++) begin : g_om
    om_outbuf #(
      .N(N), .M(M), .K(K), .DEPTH(OB_DEPTH), .CELL_W(CELL_W)
    ) u_om (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (om_iv[j]),
      .in_dst   (om_id[j]),
      .in_cell  (om_ic[j]),
      .op_valid (out_valid[j]),
      .op_cell  (out_cell[j]),
      .drop     (ob_drop[j]),
      .occ      (ob_occ[j])
    );
  end

  // A request is never lost: the cells of VOQ(i,v) are its counter plus
  // its flags in all subschedulers (checked by the testbench), and a CM
  // never sees two cells for one output link.
  always_ff @(posedge clk) begin
    if (rst_n) assert (cm_conflict == '0) else $error("pcrrd_clos_switch: CM output-link conflict");
  end

endmodule
