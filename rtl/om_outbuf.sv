// om_outbuf: output module OM(j) with one FIFO buffer per output port.
//
// The OM receives up to m cells per slot, one from each central module.
// A cell's routing tag v = h*k + j selects its output port OP(j,h) as
// h = v / k.  Each output buffer accepts all cells addressed to it in one
// slot (in link order) and sends one cell per slot, first in first out.
// A cell arriving at a full buffer is dropped and counted on 'drop'; the
// source assumes buffers large enough to avoid loss.
//
// Timing: cells written at the end of slot t can leave in slot t+1; the
// head cell is presented combinationally on op_valid/op_cell and removed
// at the end of the slot.  DEPTH must be a power of two.
module om_outbuf #(
  parameter int unsigned N      = pcrrd_pkg::N_DEF,
  parameter int unsigned M      = pcrrd_pkg::M_DEF,
  parameter int unsigned K      = pcrrd_pkg::K_DEF,
  parameter int unsigned DEPTH  = pcrrd_pkg::OB_DEPTH_DEF,
  parameter int unsigned CELL_W = pcrrd_pkg::CELL_W_DEF,
  parameter int unsigned NK     = N * K,
  parameter int unsigned VW     = (NK > 1) ? $clog2(NK) : 1,
  parameter int unsigned DW     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned OW     = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [M-1:0]      in_valid,
  input  logic [VW-1:0]     in_dst  [M],
  input  logic [CELL_W-1:0] in_cell [M],
  output logic [N-1:0]      op_valid,
  output logic [CELL_W-1:0] op_cell [N],
  output logic [M-1:0]      drop,
  output logic [OW-1:0]     occ     [N]
);

  logic [CELL_W-1:0] mem [N][DEPTH];
  logic [DW-1:0]     rd_ptr [N];
  logic [M-1:0]      acc;
  logic [DW-1:0]     wr_addr [M];
  logic [$clog2(M+1)-1:0] arr [N];
  logic [N-1:0]      port_of [M];

  always_comb begin
    int unsigned taken [N];
    int unsigned h;
    h = 0;
    for (int q = 0; q < N; q++) taken[q] = 0;
    for (int r = 0; r < M; r++) begin
      acc[r]     = 1'b0;
      wr_addr[r] = '0;
      port_of[r] = '0;
      if (in_valid[r]) begin
        h = int'(in_dst[r]) / K;
        if (int'(occ[h]) + int'(taken[h]) < int'(DEPTH)) begin
          acc[r]        = 1'b1;
          port_of[r][h] = 1'b1;
          wr_addr[r]    = DW'(int'(rd_ptr[h]) + int'(occ[h]) + int'(taken[h]));
          taken[h]      = taken[h] + 1;
        end
      end
    end
    for (int q = 0; q < N; q++) arr[q] = ($clog2(M+1))'(taken[q]);
    drop = in_valid & ~acc;
  end

  always_comb begin
    for (int q = 0; q < N; q++) begin
      op_valid[q] = (occ[q] != '0);
      op_cell[q]  = mem[q][rd_ptr[q]];
    end
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < M; r++)
      for (int q = 0; q < N; q++)
        if (acc[r] && port_of[r][q]) mem[q][wr_addr[r]] <= in_cell[r];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < N; q++) begin
        rd_ptr[q] <= '0;
        occ[q]    <= '0;
      end
    end else begin
      for (int q = 0; q < N; q++) begin
        rd_ptr[q] <= rd_ptr[q] + DW'(op_valid[q]);
        occ[q]    <= occ[q] + OW'(arr[q]) - OW'(op_valid[q]);
      end
    end
  end

endmodule
