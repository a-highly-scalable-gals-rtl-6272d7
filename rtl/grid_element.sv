// grid_element: the steering logic at one row/column intersection.
//
// Forward path: while Req_im of this row is high for this column, the
// row's dual-rail data is driven onto the column (in silicon two
// transistors per bit onto a precharged, wired-OR column; here an AND per
// rail, ORed over the rows in the top level). Feedback path: the same Req_im
// steers the output port's completion (full) back to the row as ackdat, so
// only the sending input port sees it.
//
// The forward path carries the grid latency GRID_PS (request port plus
// steering, 550 ps at 1.8 V); it is an inertial delay annotation that
// synthesis ignores. The feedback path is modelled without delay.
//
// Origin: Steering the row onto the column with the request and steering the
// completion back with the same request follows the published design; the
// AND gating is this design's simplest form of it.
module grid_element #(
  parameter int unsigned DATA_W  = xbar_pkg::DATA_W,
  parameter int unsigned GRID_PS = xbar_pkg::GRID_PS
) (
  input  logic              req_im,
  input  logic [DATA_W-1:0] row_t,
  input  logic [DATA_W-1:0] row_f,
  output logic [DATA_W-1:0] col_t,
  output logic [DATA_W-1:0] col_f,
  input  logic              full,
  output logic              ackdat
);
  timeunit 1ps; timeprecision 1ps;

  assign #GRID_PS col_t = row_t & {DATA_W{req_im}};
  assign #GRID_PS col_f = row_f & {DATA_W{req_im}};
  assign ackdat = req_im & full;
endmodule
