// output_port: one output port (column end) of the crossbar.
//
// Asynchronous side. The completion detector watches the column. When a
// complete word is present, and the port is armed (it has seen the column,
// and the delayed completion, return to NULL since the last word), the
// state `full` is set after the
// output-port latency OPORT_PS (pulse generator and latch, 160 ps at 1.8 V).
// `full` is the Reqout state wire of the port, held by a keeper in silicon
// and by a set-reset latch here. Setting it closes the data latch on the
// word, drops Ackout (which releases the token and, through the grid, clears
// the sender's request so the row returns to NULL) and requests the
// receiver. Ackout rises again only when the receiver has taken the word and
// the column has returned to NULL, which enables the next transfer.
//
// Synchronous side. The request to the receiver, req_o, passes a
// metastability filter against the inverted receiver clock, so it only
// changes while clk is high. At a rising edge where req_o and the
// receiver's ackr are both high the word is transferred to sync_data,
// sync_valid is raised for one cycle, and `full` is cleared during that
// cycle (the data latch then follows the NULL column again). In silicon this
// clear and the transfer are a pulse generated from clk and ackr; here the
// pulse is one receiver cycle wide, which is this design's choice, and
// Ackout also waits for the end of that cycle.
//
// full and armed form a set-reset latch pair through each other; lint tools
// report this loop (and may not recognise the always_latch blocks as
// latches). It is the intended state-holding circuit.
//
// Origin: Completion detection, the Reqout state, Ackout, early token release
// and the filtered request to the receiver follow the published design;
// the arming rule, the one-cycle pulse and sync_valid are this design's
// choices.
module output_port #(
  parameter int unsigned DATA_W   = xbar_pkg::DATA_W,
  parameter int unsigned OPORT_PS = xbar_pkg::OPORT_PS,
  parameter int unsigned MF_PS    = xbar_pkg::MF_PS
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] col_t,
  input  logic [DATA_W-1:0] col_f,
  output logic              full,       // data held (Reqout asserted)
  output logic              ackout,     // port free for the next transfer
  output logic              req_o,      // request to the receiver
  input  logic              ackr,       // receiver takes the word
  output logic [DATA_W-1:0] sync_data,
  output logic              sync_valid
);
  timeunit 1ps; timeprecision 1ps;

  logic              cd_valid, cd_null, cd_valid_d;
  logic              armed, taken, xfer;
  logic [DATA_W-1:0] dq;
  logic              unused_g2;

  completion_detector #(.DATA_W(DATA_W)) u_cd (
    .t(col_t), .f(col_f), .valid(cd_valid), .null_w(cd_null)
  );

  assign #OPORT_PS cd_valid_d = cd_valid;

  always_latch begin
    if (rst || taken)             full = 1'b0;
    else if (cd_valid_d && armed) full = 1'b1;
  end

  always_latch begin
    if (rst)          armed = 1'b1;
    else if (full)    armed = 1'b0;
    else if (cd_null && !cd_valid_d) armed = 1'b1;
  end

  // data latch: transparent while empty, holds the word while full
  always_latch begin
    if (!full) dq = col_t;
  end

  assign ackout = !full && armed && !taken;

  mutex_mf #(.MF_PS(MF_PS)) u_mf (
    .r1(full), .r2(!clk), .g1(req_o), .g2(unused_g2)
  );

  assign xfer = req_o && ackr && !taken;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      taken      <= 1'b0;
      sync_valid <= 1'b0;
    end else begin
      taken      <= xfer;
      sync_valid <= xfer;
    end
  end

  always_ff @(posedge clk) begin
    if (xfer) sync_data <= dq;
  end
endmodule
