// xbar_pkg: constants shared by the token-ring crossbar.
//
// The crossbar is self-timed; its gate delays are modelled with delay
// annotations so that simulation reproduces the latency budget of the design
// at 1.8 V: 150 ps per token hop, 550 ps from a won request to data at the
// output port (request port plus steering), and 160 ps through the output
// port (completion pulse and latch). Synthesis ignores these delays. The
// metastability-filter delay (MF_PS) is this design's own estimate.
//
// Origin: The sizes (4x4, 4 bits) and the three 1.8 V delays are the published
// design's figures.
package xbar_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N_IN     = 4;    // input ports (rows)
  localparam int unsigned N_OUT    = 4;    // output ports (columns)
  localparam int unsigned DATA_W   = 4;    // data bits per transfer
  localparam int unsigned HOP_PS   = 150;  // token ring latency per hop
  localparam int unsigned GRID_PS  = 550;  // request port + steering latency
  localparam int unsigned OPORT_PS = 160;  // output port latency
  localparam int unsigned MF_PS    = 20;   // metastability filter delay
endpackage
