// gals_crossbar: N_IN x N_OUT asynchronous crossbar with token-ring
// arbitration, connecting clocked senders to clocked receivers that each run
// on their own clock (globally asynchronous, locally synchronous).
//
// Structure. Each input port drives one row with four-phase dual-rail data
// and has one request wire per output port. Each output port is fed by one
// column and owns one token ring with a stop per input port; the ring, not a
// central arbiter, decides which row may use the column. A grid element at
// every intersection steers the row onto the column while that row's
// Req_im for the column is high, and steers the output port's completion
// back to the row.
//
// One transfer (input i to output j):
//   1. sender i raises syn_req with data and one-hot destination; on its
//      clock edge the input port takes them and raises Req_st[i][j];
//   2. the request goes straight to stop i of ring j, which catches the
//      token when it is (or arrives) there; once the stop holds the token
//      and output j is free (Ackout[j]), Req_im[i][j] rises;
//   3. after GRID_PS the word is on column j; after OPORT_PS more the output
//      port is full: it latches the word, drops Ackout, and the completion, steered
//      back, clears Req_st[i][j], which releases the token early;
//   4. the row returns to NULL, sender i is acknowledged on its clock;
//      receiver j is requested on its clock and takes the word with ackr;
//      Ackout[j] rises again once the column is NULL and the word is taken.
// Forward latency with the request waiting: h*HOP_PS + GRID_PS + OPORT_PS,
// where h is the number of hops the token travels to reach the requester.
//
// Delay parameters are simulation annotations (1.8 V figures); synthesis
// ignores them. One asynchronous reset, rst, clears every port and ring.
//
// Origin: The structure (rows, columns, a token ring per output port, grid
// elements, metastability filters at both clock interfaces, early token
// release, the latency budget) follows the published design. The port
// names, the active-high polarity, the single reset and the one-hot
// destination at the sender are this design's choices.
module gals_crossbar #(
  parameter int unsigned N_IN     = xbar_pkg::N_IN,
  parameter int unsigned N_OUT    = xbar_pkg::N_OUT,
  parameter int unsigned DATA_W   = xbar_pkg::DATA_W,
  parameter int unsigned HOP_PS   = xbar_pkg::HOP_PS,
  parameter int unsigned GRID_PS  = xbar_pkg::GRID_PS,
  parameter int unsigned OPORT_PS = xbar_pkg::OPORT_PS,
  parameter int unsigned MF_PS    = xbar_pkg::MF_PS
) (
  input  logic                         rst,
  // synchronous senders, one clock each
  input  logic [N_IN-1:0]              snd_clk,
  input  logic [N_IN-1:0]              snd_req,
  input  logic [N_IN-1:0][N_OUT-1:0]   snd_dest,
  input  logic [N_IN-1:0][DATA_W-1:0]  snd_data,
  output logic [N_IN-1:0]              snd_ack,
  // synchronous receivers, one clock each
  input  logic [N_OUT-1:0]             rcv_clk,
  output logic [N_OUT-1:0]             rcv_req,
  input  logic [N_OUT-1:0]             rcv_ackr,
  output logic [N_OUT-1:0][DATA_W-1:0] rcv_data,
  output logic [N_OUT-1:0]             rcv_valid
);
  timeunit 1ps; timeprecision 1ps;

  // row side, indexed [input][output]
  logic [N_IN-1:0][N_OUT-1:0]  req_ring, won, req_im, ackdat_ij;
  logic [N_IN-1:0][DATA_W-1:0] row_t, row_f;
  logic [N_IN-1:0]             ackdat;
  // column side, indexed [output][input]
  logic [N_OUT-1:0][N_IN-1:0]  ring_req, ring_won;
  logic [N_OUT-1:0][N_IN-1:0][DATA_W-1:0] ct, cf;
  logic [N_OUT-1:0][DATA_W-1:0] col_t, col_f;
  logic [N_OUT-1:0]            full, ackout;

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    input_port #(.N_OUT(N_OUT), .DATA_W(DATA_W), .MF_PS(MF_PS)) u_ip (
      .clk(snd_clk[i]), .rst,
      .syn_req(snd_req[i]), .syn_dest(snd_dest[i]), .syn_data(snd_data[i]),
      .syn_ack(snd_ack[i]),
      .ackout, .req_ring(req_ring[i]), .won(won[i]), .req_im(req_im[i]),
      .row_t(row_t[i]), .row_f(row_f[i]), .ackdat(ackdat[i])
    );
    assign ackdat[i] = |ackdat_ij[i];
  end

  for (genvar i = 0; i < N_IN; i++) begin : g_row
    for (genvar j = 0; j < N_OUT; j++) begin : g_col
      grid_element #(.DATA_W(DATA_W), .GRID_PS(GRID_PS)) u_ge (
        .req_im(req_im[i][j]), .row_t(row_t[i]), .row_f(row_f[i]),
        .col_t(ct[j][i]), .col_f(cf[j][i]),
        .full(full[j]), .ackdat(ackdat_ij[i][j])
      );
      assign ring_req[j][i] = req_ring[i][j];
      assign won[i][j]      = ring_won[j][i];
    end
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    token_ring #(.N(N_IN), .HOP_PS(HOP_PS)) u_ring (
      .rst, .req(ring_req[j]), .tok(), .won(ring_won[j])
    );

    // wired-OR column
    always_comb begin
      col_t[j] = '0;
      col_f[j] = '0;
      for (int i = 0; i < N_IN; i++) begin
        col_t[j] |= ct[j][i];
        col_f[j] |= cf[j][i];
      end
    end

    output_port #(.DATA_W(DATA_W), .OPORT_PS(OPORT_PS), .MF_PS(MF_PS)) u_op (
      .clk(rcv_clk[j]), .rst, .col_t(col_t[j]), .col_f(col_f[j]),
      .full(full[j]), .ackout(ackout[j]),
      .req_o(rcv_req[j]), .ackr(rcv_ackr[j]),
      .sync_data(rcv_data[j]), .sync_valid(rcv_valid[j])
    );
  end
endmodule
