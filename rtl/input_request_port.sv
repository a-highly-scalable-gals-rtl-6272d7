// input_request_port: the request side of one input port.
//
// Has one request wire to each output port's token ring. Req_st[j] is
// offered to stop j as it is, so the stop catches the token even while
// output port j is still busy with an earlier word. The port fires Req_im[j],
// which steers its row onto column j in the grid, when three things hold:
// the request, the token at its stop (won = Req_ti) and Ackout[j] (output
// port j free). This is the join of the crossbar protocol: while a waiting
// port holds the token, the token's travel overlaps the receiver's
// acknowledge of the previous word. Req_im is a set-reset latch: cleared
// only when Req_st falls, so it outlives the early release of the token
// (which happens when the word reaches the output port) and still steers
// the completion back to this port.
//
// Lint tools may not recognise the per-bit always_latch as a latch; it is a
// set-reset latch by intent.
//
// Origin: That a request needs both the token and a free output port, and that
// the same request steers the completion back, follows the published
// design; the set-reset latch form is this design's choice.
module input_request_port #(
  parameter int unsigned N_OUT = xbar_pkg::N_OUT
) (
  input  logic             rst,
  input  logic [N_OUT-1:0] req_st,
  input  logic [N_OUT-1:0] ackout,
  output logic [N_OUT-1:0] req_ring,   // to stop of ring j
  input  logic [N_OUT-1:0] won,        // Req_ti from stop of ring j
  output logic [N_OUT-1:0] req_im
);
  timeunit 1ps; timeprecision 1ps;

  assign req_ring = req_st;

  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    always_latch begin
      if (rst || !req_st[j])        req_im[j] = 1'b0;
      else if (won[j] && ackout[j]) req_im[j] = 1'b1;
    end
  end

  always_comb assert ($countones(req_im) <= 1) else $error("input_request_port: Req_im not one-hot");
endmodule
