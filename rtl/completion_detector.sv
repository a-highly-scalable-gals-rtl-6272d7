// completion_detector: completion detection of a dual-rail word.
//
// valid is high when every bit has one rail high (a complete data word has
// arrived); null is high when every rail is low (the word has returned to
// the precharge value). Between the two, neither is high. A bit with both
// rails high is a code violation and is flagged by an assertion.
//
// Origin: The published design names a completion detector at the output port but
// does not draw it; the AND-of-ORs (valid) and NOR (null) form is the usual
// dual-rail one and is this design's choice.
//
// Inside the crossbar this detector sits on the handshake loop column ->
// completion -> output port -> Ackdat -> sender request -> row -> column.
// Lint tools report that loop as circular logic at this module's output;
// it is the self-timed four-phase handshake and is broken by the output
// port's latches and the annotated delays.
module completion_detector #(
  parameter int unsigned DATA_W = xbar_pkg::DATA_W
) (
  input  logic [DATA_W-1:0] t,
  input  logic [DATA_W-1:0] f,
  output logic              valid,
  output logic              null_w
);
  timeunit 1ps; timeprecision 1ps;

  assign valid  = &(t | f);
  assign null_w = ~|(t | f);

  always_comb assert ((t & f) == '0) else $error("completion_detector: both rails high");
endmodule
