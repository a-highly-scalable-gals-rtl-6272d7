// dual_rail_port: data port of an input port.
//
// Converts the single-rail word taken from the sender into four-phase
// dual-rail code on the row: bit k is sent as (t[k], f[k]) = (1,0) for a one
// and (0,1) for a zero while the port has a request out (valid phase), and
// as (0,0), NULL, otherwise. The row therefore returns to NULL (the
// precharge phase) as soon as the completion from the output port clears
// the request. Combinational; the real port is precharged dynamic logic.
//
// Origin: The published design converts the sender's single-rail word to dual rail
// at the input port; the encoding (true rail = bit, false rail = its
// complement, both low = NULL) is the standard one and the circuit is this
// design's own.
module dual_rail_port #(
  parameter int unsigned DATA_W = xbar_pkg::DATA_W
) (
  input  logic              valid,   // request outstanding (any Req_st)
  input  logic [DATA_W-1:0] data,
  output logic [DATA_W-1:0] row_t,
  output logic [DATA_W-1:0] row_f
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    row_t = valid ? data  : '0;
    row_f = valid ? ~data : '0;
  end
endmodule
