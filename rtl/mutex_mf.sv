// mutex_mf: metastability filter (MF), a two-way mutual-exclusion element.
//
// Behavioural model. The real part is an analog MUTEX: a cross-coupled latch
// followed by a filter that holds both grants low while the latch resolves.
// This model grants whichever request arrives first, grants r1 when both rise
// in the same instant, keeps a grant for as long as its request stays high,
// and hands over to the other request when it drops. Metastability itself is
// not modelled; the resolution time is a fixed MF_PS delay on both grants.
//
// The crossbar uses it three ways: against the inverted clock at the sender
// and at the receiver, so that acknowledge and request change only while the
// local clock is high, and (functionally) at every token-ring stop.
//
// The grant state is written as a latch in a plain always block; lint tools
// report it as an inferred latch, which is what a MUTEX is.
//
// Origin: Using a MUTEX against the inverted clock follows the published design;
// the MUTEX circuit is not given there, so this model, its tie rule and
// its 20 ps resolution delay are this design's own.
module mutex_mf #(
  parameter int unsigned MF_PS = xbar_pkg::MF_PS
) (
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  timeunit 1ps; timeprecision 1ps;

  logic s1, s2;

  // grant state; a grant is released when its request falls and then given
  // to the other request if that one is waiting
  // power-up state: whichever request is already high holds the grant (the
  // model has no reset, like the real part)
  initial begin
    s1 = r1;
    s2 = !r1 && r2;
  end

  always @(r1 or r2) begin
    if (!r1) s1 = 1'b0;
    if (!r2) s2 = 1'b0;
    if (!s1 && !s2) begin
      if (r1)      s1 = 1'b1;
      else if (r2) s2 = 1'b1;
    end
  end

  assign #MF_PS g1 = s1;
  assign #MF_PS g2 = s2;

  always @(g1 or g2) if ($time > 0) assert (!(g1 && g2)) else $error("mutex_mf: both grants high");
endmodule
