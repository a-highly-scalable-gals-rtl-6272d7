// tb_input_request_port: test of the request side of an input port.
// Checks that Req_st[j] is offered to ring j, that Req_im[j] rises only when
// stop j has won and Ackout[j] is high (in either order), that it holds
// after the win ends (early token release), and falls only with Req_st[j].
//
// Origin: The stimulus and the reference model are this testbench's own.
module tb_input_request_port;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned N_OUT = 4;

  logic             rst = 1'b0;   // low before time 0, so raising it is an edge
  logic [N_OUT-1:0] req_st = '0, ackout = '1, won = '0;
  logic [N_OUT-1:0] req_ring, req_im;
  int checks = 0, failures = 0;

  input_request_port #(.N_OUT(N_OUT)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    #100 rst = 1'b0;
    #10 check(req_im == '0, "Req_im after reset");
    repeat (100) begin
      int j;
      j = $urandom_range(N_OUT - 1);
      ackout = N_OUT'($urandom);
      req_st = N_OUT'(1) << j;
      #10 check(req_ring == req_st, "req_ring differs from Req_st");
      check(req_im == '0, "Req_im without a win");
      if ($urandom_range(1)) begin
        ackout[j] = 1'b0;        // output busy: the win alone must not fire
        #10 won[j] = 1'b1;
        #10 check(req_im == '0, "Req_im fired while the output was busy");
        ackout[j] = 1'b1;
      end else begin
        ackout[j] = 1'b1;
        #10 won[j] = 1'b1;
      end
      #10 check(req_im == req_st, "Req_im not raised by win and Ackout");
      won[j] = 1'b0;
      ackout[j] = 1'b0;          // output full: token released early
      #10 check(req_im == req_st, "Req_im dropped with the token");
      req_st = '0;
      #10 check(req_im == '0, "Req_im held after Req_st fell");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
