// cm_switch: bufferless k x k central module CM(r).
//
// Input link i comes from IM(i), output link j goes to OM(j).  A cell is
// routed by its routing tag: the destination VOQ index v = h*k + j, whose
// residue modulo k names the output module.  The CM holds no cells: the
// scheduler guarantees that at most one input asks for each output in a
// slot, which an assertion checks; should two collide anyway, the lower
// input wins and 'conflict' is raised.  Purely combinational.
module cm_switch #(
  parameter int unsigned N      = pcrrd_pkg::N_DEF,
  parameter int unsigned K      = pcrrd_pkg::K_DEF,
  parameter int unsigned CELL_W = pcrrd_pkg::CELL_W_DEF,
  parameter int unsigned NK     = N * K,
  parameter int unsigned VW     = (NK > 1) ? $clog2(NK) : 1
) (
  input  logic [K-1:0]      in_valid,
  input  logic [VW-1:0]     in_dst   [K],
  input  logic [CELL_W-1:0] in_cell  [K],
  output logic [K-1:0]      out_valid,
  output logic [VW-1:0]     out_dst  [K],
  output logic [CELL_W-1:0] out_cell [K],
  output logic              conflict
);

  always_comb begin
    int unsigned j;
    j         = 0;
    out_valid = '0;
    conflict  = 1'b0;
    for (int o = 0; o < K; o++) begin
      out_dst[o]  = '0;
      out_cell[o] = '0;
    end
    for (int i = K - 1; i >= 0; i--) begin
      if (in_valid[i]) begin
        j = int'(in_dst[i]) % K;
        if (out_valid[j]) conflict = 1'b1;
        out_valid[j] = 1'b1;
        out_dst[j]   = in_dst[i];
        out_cell[j]  = in_cell[i];
      end
    end
  end

endmodule
