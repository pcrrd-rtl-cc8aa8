// pcrrd_pkg: constants and helpers shared by the PCRRD Clos-network switch.
//
// The default sizes are those of the evaluated configuration: a 64-port
// three-stage Clos network with n = m = k = 8, up to P = 4 pipelined
// subschedulers, up to four phase-1 iterations and 64-byte cells.
// VOQ and output-buffer depths are this design's own choice; the source
// only calls them "large enough".
package pcrrd_pkg;

  localparam int unsigned N_DEF         = 8;    // input/output ports per IM/OM (n)
  localparam int unsigned M_DEF         = 8;    // central modules (m)
  localparam int unsigned K_DEF         = 8;    // input and output modules (k)
  localparam int unsigned P_DEF         = 4;    // subschedulers = slots per matching (P)
  localparam int unsigned ITER_DEF      = 4;    // phase-1 iterations inside an IM
  localparam int unsigned CELL_W_DEF    = 512;  // cell size, 64 x 8 bits
  localparam int unsigned VOQ_DEPTH_DEF = 16;   // cells per VOQ (L_max)
  localparam int unsigned OB_DEPTH_DEF  = 32;   // cells per output-port buffer

  // Width of an index into 'n' things; at least one bit.
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
