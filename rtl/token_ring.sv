// token_ring: distributed arbiter for one output port.
//
// One stop per input port. The token is a transition (two-phase) travelling
// round the ring: stop i holds the token while its input tin[i] differs from
// its output tout[i]. Each stop is a transparent latch from tin[i] to
// tout[i], opened whenever the stop has no request; a stop that sees no
// request therefore passes the token on, and the link to the next stop adds
// one hop delay (HOP_PS). A stop whose request is high closes its latch, so a
// token that arrives there stays: the request has won (tok = Req_ti). When
// the request falls the latch opens and the token moves on at once.
//
// The link from the last stop back to stop 0 is inverted. This is the
// starter: with every latch cleared by reset, stop 0 sees a transition and
// so owns the single token. The ring is free-running: with no request the
// token circulates, taking N*HOP_PS per round.
//
// Interface: req[i] is the request of input port i for this output port
// (level), tok[i] is high while stop i holds the token, and won[i] is
// req[i] & tok[i]. A request that rises at the very instant the token passes
// is either caught or left for the next round; both are safe.
//
// Each stop latch feeds the next through the hop delay, so lint tools see a
// combinational loop round the ring; the delay breaks it in simulation and
// in silicon the ring is a deliberate oscillating loop.
//
// Origin: One ring per output port with one stop per input port, the starter, the
// free-running token and the 150 ps hop follow the published design; the
// transition-coded token and the latch form of the stop are this design's
// own, since the published stop circuit cannot be read as logic here.
module token_ring #(
  parameter int unsigned N      = xbar_pkg::N_IN,
  parameter int unsigned HOP_PS = xbar_pkg::HOP_PS
) (
  input  logic         rst,
  input  logic [N-1:0] req,
  output logic [N-1:0] tok,
  output logic [N-1:0] won
);
  timeunit 1ps; timeprecision 1ps;

  logic [N-1:0] tout;

  for (genvar i = 0; i < N; i++) begin : g_stop
    logic tin;
    if (i == 0) begin : g_starter
      assign #HOP_PS tin = ~tout[N-1];
    end else begin : g_link
      assign #HOP_PS tin = tout[i-1];
    end

    always_latch begin
      if (rst)         tout[i] = 1'b0;
      else if (!req[i]) tout[i] = tin;
    end

    assign tok[i] = tin ^ tout[i];
    assign won[i] = req[i] & tok[i];
  end

  always_comb if (!rst) assert ($countones(tok) <= 1) else $error("token_ring: more than one token");
endmodule
