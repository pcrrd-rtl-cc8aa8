// im_voq: input module IM(i) of the Clos switch, with its VOQs.
//
// The IM has n input ports and n*k virtual output queues; VOQ(i,v) holds
// the cells for output port OP(j,h) with v = h*k + j.  Each slot every
// input port may deliver one cell tagged with its destination v.  All
// cells of one slot are written in port order; a VOQ can therefore take
// up to n cells in a slot.  A cell that finds its VOQ full is dropped
// (drop[h] pulses); the source assumes queues large enough for this not
// to happen and does not say what should be done.
//
// The scheduler tells the IM, per output link L_I(i,r), which VOQ sends
// (disp_valid/disp_voq).  During that slot the head cell of the VOQ is put
// on the link together with its routing tag v, and it is removed at the
// end of the slot.  A VOQ is never named by two links in one slot.
//
// arr_cnt[v] reports how many cells VOQ(i,v) accepted this slot; it feeds
// the request counter RC(i,v).  occ[v] is the VOQ occupancy L(i,v).
// Free space is judged on the occupancy at the start of the slot, so a
// cell leaving in the same slot does not make room until the next one.
// Queue storage is a circular buffer per VOQ with DEPTH a power of two.
module im_voq #(
  parameter int unsigned N      = pcrrd_pkg::N_DEF,
  parameter int unsigned M      = pcrrd_pkg::M_DEF,
  parameter int unsigned K      = pcrrd_pkg::K_DEF,
  parameter int unsigned DEPTH  = pcrrd_pkg::VOQ_DEPTH_DEF,
  parameter int unsigned CELL_W = pcrrd_pkg::CELL_W_DEF,
  parameter int unsigned NK     = N * K,
  parameter int unsigned VW     = (NK > 1) ? $clog2(NK) : 1,
  parameter int unsigned DW     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned AW     = $clog2(N + 1),
  parameter int unsigned OW     = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // input ports IP(i,h)
  input  logic [N-1:0]      in_valid,
  input  logic [VW-1:0]     in_dst   [N],
  input  logic [CELL_W-1:0] in_cell  [N],
  output logic [N-1:0]      drop,
  output logic [AW-1:0]     arr_cnt  [NK],
  output logic [OW-1:0]     occ      [NK],
  // dispatch for this slot
  input  logic [M-1:0]      disp_valid,
  input  logic [VW-1:0]     disp_voq [M],
  // output links L_I(i,r)
  output logic [M-1:0]      link_valid,
  output logic [VW-1:0]     link_dst  [M],
  output logic [CELL_W-1:0] link_cell [M]
);

  logic [CELL_W-1:0] mem [NK][DEPTH];
  logic [DW-1:0]     rd_ptr [NK];
  logic [N-1:0]      acc;
  logic [DW-1:0]     wr_addr [N];
  logic [NK-1:0]     pop;

  // Accept cells in port order while their VOQ has room.
  always_comb begin
    int unsigned taken [NK];
    for (int v = 0; v < NK; v++) taken[v] = 0;
    for (int h = 0; h < N; h++) begin
      acc[h]     = 1'b0;
      wr_addr[h] = '0;
      if (in_valid[h]) begin
        if (int'(occ[in_dst[h]]) + int'(taken[in_dst[h]]) < int'(DEPTH)) begin
          acc[h]     = 1'b1;
          wr_addr[h] = DW'(int'(rd_ptr[in_dst[h]]) + int'(occ[in_dst[h]])
                           + int'(taken[in_dst[h]]));
          taken[in_dst[h]] = taken[in_dst[h]] + 1;
        end
      end
    end
    for (int v = 0; v < NK; v++) arr_cnt[v] = AW'(taken[v]);
    drop = in_valid & ~acc;
  end

  // Head-of-line cells onto the output links.
  always_comb begin
    pop = '0;
    for (int r = 0; r < M; r++) begin
      link_valid[r] = disp_valid[r];
      link_dst[r]   = disp_voq[r];
      link_cell[r]  = mem[disp_voq[r]][rd_ptr[disp_voq[r]]];
      if (disp_valid[r]) pop[disp_voq[r]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int h = 0; h < N; h++)
      if (acc[h]) mem[in_dst[h]][wr_addr[h]] <= in_cell[h];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NK; v++) begin
        rd_ptr[v] <= '0;
        occ[v]    <= '0;
      end
    end else begin
      for (int v = 0; v < NK; v++) begin
        rd_ptr[v] <= rd_ptr[v] + DW'(pop[v]);
        occ[v]    <= occ[v] + OW'(arr_cnt[v]) - OW'(pop[v]);
      end
    end
  end

  // The scheduler must only dispatch from a non-empty VOQ, once per slot.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int r = 0; r < M; r++) begin
        if (disp_valid[r]) begin
          assert (occ[disp_voq[r]] != '0)
            else $error("im_voq: dispatch from empty VOQ %0d", disp_voq[r]);
          for (int q = r + 1; q < M; q++)
            assert (!(disp_valid[q] && disp_voq[q] == disp_voq[r]))
              else $error("im_voq: VOQ %0d dispatched twice", disp_voq[r]);
        end
      end
    end
  end

endmodule
