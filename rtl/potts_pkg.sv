// potts_pkg: constants and types shared by the Potts clustering solver.
//
// The default problem size is the solver's main configuration: 4096 nodes,
// 32 processing elements (PEs), 120 neighbours per node and 4 clusters.
// Edge weights are 8-bit unsigned integers and the balance strength gamma is
// an 8-bit unsigned runtime value; both widths are this design's choice.
// Energy differences are carried as 32-bit signed integers, which is wide
// enough for every size up to the defaults (|dH| < 2^23 there).
package potts_pkg;

  localparam int unsigned DEF_N  = 4096;  // nodes
  localparam int unsigned DEF_P  = 32;    // processing elements = spin banks
  localparam int unsigned DEF_K  = 120;   // neighbours per node
  localparam int unsigned DEF_Q  = 4;     // clusters (Potts states)
  localparam int unsigned DEF_WW = 8;     // edge-weight width
  localparam int unsigned DEF_GW = 8;     // gamma width

  // Cycles from issuing a node to its spin write-back (four pipeline stages).
  localparam int unsigned PIPE_LAT = 4;

  // Energy difference of a candidate move.
  typedef logic signed [31:0] dh_t;

  // Global controller phases.
  typedef enum logic [2:0] {
    ST_IDLE,   // waiting for start
    ST_INIT,   // random spin initialisation and cluster counting
    ST_RUN,    // issuing the nodes of one epoch to all PEs
    ST_DRAIN,  // pipeline drain, then converged / iteration-limit decision
    ST_DONE    // Done asserted, result readable by the host
  } ctrl_state_e;

endpackage
