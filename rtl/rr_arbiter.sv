// rr_arbiter: round-robin arbiter with an external pointer.
//
// This is the arbiter used everywhere in CRRD: as the VOQ arbiter A_V, the
// IM output-link arbiter A_L and the CM output-link arbiter A_C.  Given a
// request vector and a pointer, it grants the first request found when
// searching upward from the pointer position, wrapping around.  The pointer
// itself is stored by the owner, because CRRD only moves it under
// conditions that the arbiter cannot see (first-iteration match that is
// also granted by the CM).
//
// Interface: req[N] requests, ptr the highest-priority position (values
// >= N are treated as 0), gnt one-hot grant, gnt_idx its index, any_gnt
// set when some request was granted.  Purely combinational.
module rr_arbiter #(
  parameter int unsigned N  = pcrrd_pkg::N_DEF,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  input  logic [IW-1:0] ptr,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] gnt_idx,
  output logic          any_gnt
);

  always_comb begin
    int unsigned start;
    int unsigned idx;
    gnt     = '0;
    gnt_idx = '0;
    any_gnt = 1'b0;
    start   = (int'(ptr) < int'(N)) ? int'(ptr) : 0;
    for (int unsigned s = 0; s < N; s++) begin
      idx = (start + s) % N;
      if (!any_gnt && req[idx]) begin
        any_gnt      = 1'b1;
        gnt[idx]     = 1'b1;
        gnt_idx      = IW'(idx);
      end
    end
  end

endmodule
