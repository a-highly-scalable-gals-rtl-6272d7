// input_port: one input port (row driver) of the crossbar.
//
// Combines the interface to the synchronous sender (sender_if), the
// single-rail to dual-rail data port (dual_rail_port) and the request port
// (input_request_port). The token-ring stops that belong to this port are
// instantiated per output port in token_ring; this port exchanges req_ring
// and won with them. ackdat is the completion steered back through the grid
// from whichever output port this port is sending to.
//
// Origin: The grouping into sender interface, data port, request port and ring
// stops follows the published design; placing the stops in the per-column
// token_ring instead of here is this design's choice and changes no wire.
module input_port #(
  parameter int unsigned N_OUT  = xbar_pkg::N_OUT,
  parameter int unsigned DATA_W = xbar_pkg::DATA_W,
  parameter int unsigned MF_PS  = xbar_pkg::MF_PS
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              syn_req,
  input  logic [N_OUT-1:0]  syn_dest,
  input  logic [DATA_W-1:0] syn_data,
  output logic              syn_ack,
  input  logic [N_OUT-1:0]  ackout,
  output logic [N_OUT-1:0]  req_ring,
  input  logic [N_OUT-1:0]  won,
  output logic [N_OUT-1:0]  req_im,
  output logic [DATA_W-1:0] row_t,
  output logic [DATA_W-1:0] row_f,
  input  logic              ackdat
);
  timeunit 1ps; timeprecision 1ps;

  logic [N_OUT-1:0]  req_st;
  logic [DATA_W-1:0] data_q;

  sender_if #(.N_OUT(N_OUT), .DATA_W(DATA_W), .MF_PS(MF_PS)) u_sif (
    .clk, .rst, .syn_req, .syn_dest, .syn_data, .syn_ack,
    .ackdat, .req_st, .data_q
  );

  dual_rail_port #(.DATA_W(DATA_W)) u_dp (
    .valid(|req_st), .data(data_q), .row_t, .row_f
  );

  input_request_port #(.N_OUT(N_OUT)) u_rp (
    .rst, .req_st, .ackout, .req_ring, .won, .req_im
  );
endmodule
