// sender_if: interface between an input port and its synchronous sender.
//
// The sender holds syn_req high together with its data and a one-hot choice
// of output port until it sees syn_ack at a rising edge of its clock. On the
// rising edge where syn_req is high and the port is free (Ack_in), the port
// takes the data and raises the request Req_st towards the chosen output's
// token ring. Req_st is cleared asynchronously by the completion steered back
// from the output port (ackdat, the data has arrived there). The port then
// acknowledges: ack_s = issued & ~Req_st. The acknowledge passes to the
// sender through a metastability filter arbitrating against the inverted
// clock, so syn_ack only changes while clk is high and is settled half a
// cycle before the next rising edge. On the edge that sees syn_ack the port
// frees itself; the next request can be taken on the following edge.
//
// Timing: one request per two sender cycles at best (take, acknowledge), plus
// the crossbar latency. The split into an `issued` flag and Req_st is this
// design's choice; the use of clk, Syn_req, Ack_in, Ack_s and the filtered
// acknowledge follows the protocol of the crossbar.
module sender_if #(
  parameter int unsigned N_OUT  = xbar_pkg::N_OUT,
  parameter int unsigned DATA_W = xbar_pkg::DATA_W,
  parameter int unsigned MF_PS  = xbar_pkg::MF_PS
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              syn_req,
  input  logic [N_OUT-1:0]  syn_dest,   // one-hot output port
  input  logic [DATA_W-1:0] syn_data,
  output logic              syn_ack,
  input  logic              ackdat,     // completion steered back from the output port
  output logic [N_OUT-1:0]  req_st,     // Req_st, one-hot
  output logic [DATA_W-1:0] data_q
);
  timeunit 1ps; timeprecision 1ps;

  logic issued;      // a transfer is in progress or awaiting its acknowledge
  logic ack_in;      // port free to take a request
  logic ack_s;       // transfer delivered, to be acknowledged
  logic take;
  logic clr_req;
  logic unused_g2;

  assign ack_in  = !issued;
  assign take    = syn_req && ack_in;
  assign clr_req = rst || ackdat;
  assign ack_s   = issued && (req_st == '0);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                    issued <= 1'b0;
    else if (take)              issued <= 1'b1;
    else if (issued && syn_ack) issued <= 1'b0;
  end

  always_ff @(posedge clk or posedge clr_req) begin
    if (clr_req)   req_st <= '0;
    else if (take) req_st <= syn_dest;
  end

  always_ff @(posedge clk) begin
    if (take) data_q <= syn_data;
  end

  mutex_mf #(.MF_PS(MF_PS)) u_mf (
    .r1(ack_s), .r2(!clk), .g1(syn_ack), .g2(unused_g2)
  );

  always_ff @(posedge clk) begin
    if (take && !rst) assert ($onehot(syn_dest)) else $error("sender_if: destination not one-hot");
  end
endmodule
