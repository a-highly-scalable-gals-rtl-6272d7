// tb_input_port: test of a whole input port, with the token rings, grid and
// output ports replaced by the testbench. A clocked sender sends words; the
// testbench checks that the request appears on the chosen ring only while
// that output is free, that a win raises Req_im and drives the word onto the
// row in dual-rail code, that the steered-back completion returns the row to
// NULL, clears the request, and that the sender is then acknowledged.
//
// Origin: The stimulus and the model of the output side are this testbench's own.
module tb_input_port;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned N_OUT = 4, DATA_W = 4, MF_PS = 20, HALF = 541;

  logic clk = 1'b0, rst = 1'b0;   // rst low before time 0, so raising it is an edge
  logic syn_req = 1'b0;
  logic [N_OUT-1:0] syn_dest = '0;
  logic [DATA_W-1:0] syn_data = '0;
  logic syn_ack;
  logic [N_OUT-1:0] ackout = '1, req_ring, won = '0, req_im;
  logic [DATA_W-1:0] row_t, row_f;
  logic ackdat;
  int checks = 0, failures = 0;

  input_port #(.N_OUT(N_OUT), .DATA_W(DATA_W), .MF_PS(MF_PS)) dut (.*);

  // grid feedback: the output port's completion, steered by Req_im
  logic [N_OUT-1:0] full_j;
  assign ackdat = |(req_im & full_j);

  always #HALF clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    full_j = '0;
    rst = 1'b1;
    #2000 rst = 1'b0;
    repeat (40) begin
      int j;
      logic [DATA_W-1:0] w;
      j = $urandom_range(N_OUT - 1);
      w = DATA_W'($urandom);
      @(negedge clk);
      ackout[j] = 1'b0;                 // output busy at first
      syn_req = 1'b1; syn_dest = N_OUT'(1) << j; syn_data = w;
      @(posedge clk); #1;
      check(req_ring == (N_OUT'(1) << j), "request not offered to the chosen ring");
      check(row_t == w && row_f == ~w, "row not driven with the word");
      #($urandom_range(600)) won[j] = 1'b1;
      #1 check(req_im == '0, "Req_im fired while the output was busy");
      #300 ackout[j] = 1'b1;
      #1 check(req_im == (N_OUT'(1) << j), "Req_im not raised by win and Ackout");
      // data reaches the output port, which becomes full
      #700 full_j[j] = 1'b1; ackout[j] = 1'b0; won[j] = 1'b0;
      #1 check(req_im == '0 && req_ring == '0, "request not cleared by the completion");
      check(row_t == '0 && row_f == '0, "row not returned to NULL");
      full_j[j] = 1'b0;
      fork
        wait (syn_ack);
        #(4 * HALF);
      join_any
      disable fork;
      check(syn_ack, "sender not acknowledged");
      @(posedge clk);
      @(negedge clk) syn_req = 1'b0;
      check(!syn_ack, "acknowledge not removed");
      ackout[j] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
