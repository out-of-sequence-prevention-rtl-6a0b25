// clos_pkg - constants and types shared by the IQ-SMM Clos switch.
//
// The switch is a three-stage Clos network C(n, m, r): r input modules (IM)
// of size n x m, m central modules (CM) of size r x r and r output modules
// (OM) of size m x n, with N = n*r external ports. The default size is
// C(4,7,4), the configuration the design is evaluated in. A cell carries an
// N-bit fan-out vector (bit j set: the cell is bound for output port j)
// and a payload; the payload width is this design's choice.
//
// scheme_e selects the cell dispatching scheme run in the IMs: MFRR
// (multicast flow-based round robin, with a free-link list per IM) or
// MF-DSRR (multicast flow-based desynchronized static round robin).
package clos_pkg;

  localparam int unsigned N_DEF  = 4;   // n: ports per IM / OM
  localparam int unsigned M_DEF  = 7;   // m: number of CMs (IM outputs)
  localparam int unsigned R_DEF  = 4;   // r: number of IMs / OMs
  localparam int unsigned DW_DEF = 32;  // payload bits per cell (own choice)
  localparam int unsigned QD_DEF = 8;   // depth of every cell queue (own choice)

  typedef enum logic {
    SCHEME_MFRR   = 1'b0,
    SCHEME_MFDSRR = 1'b1
  } scheme_e;

endpackage
