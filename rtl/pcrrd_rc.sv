// pcrrd_rc: the request counters RC(i,v) of one input module.
//
// C(i,v) counts cells that have entered VOQ(i,v) but whose request has not
// yet been handed to any subscheduler.  Stage 1: every cell accepted into
// the VOQ adds one (up to n per slot, one per input port).  Stage 2: when
// the scheduler moves a request into a subscheduler's request flag it
// raises take[v] and the counter drops by one.  Both may happen in the
// same slot.  Counters reset to zero, as the source specifies.
//
// Stage 2 happens at the start of the next slot, that is at the same clock
// edge as stage 1, so a cell that arrives during slot t can already be
// handed to the subscheduler whose window starts at slot t+1: 'pending'
// therefore looks at the counter plus this slot's arrivals.
//
// Interface: arr_cnt[v] cells accepted this slot, take[v] request handed
// over (only legal when pending[v]), count[v] = C(i,v) at the start of the
// slot, pending[v] = C(i,v) + arr_cnt[v] > 0.
// The counter width covers 0..LMAX, the VOQ depth, which bounds C.
module pcrrd_rc #(
  parameter int unsigned NK   = pcrrd_pkg::N_DEF * pcrrd_pkg::K_DEF, // VOQs per IM
  parameter int unsigned N    = pcrrd_pkg::N_DEF,  // input ports per IM
  parameter int unsigned LMAX = pcrrd_pkg::VOQ_DEPTH_DEF, // maximum VOQ occupancy
  parameter int unsigned CW   = $clog2(LMAX + 1),
  parameter int unsigned AW   = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] arr_cnt [NK],
  input  logic [NK-1:0] take,
  output logic [CW-1:0] count   [NK],
  output logic [NK-1:0] pending
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NK; v++) count[v] <= '0;
    end else begin
      for (int v = 0; v < NK; v++)
        count[v] <= count[v] + CW'(arr_cnt[v]) - CW'(take[v]);
    end
  end

  always_comb begin
    for (int v = 0; v < NK; v++) pending[v] = (count[v] != '0) || (arr_cnt[v] != '0);
  end

  // A request can only be handed over if one is pending.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int v = 0; v < NK; v++)
        assert (!(take[v] && !pending[v]))
          else $error("pcrrd_rc: take from empty counter %0d", v);
    end
  end

endmodule
