// tb_sender_if: test of the input port's interface to a clocked sender.
// A sender model drives requests on falling edges. The testbench checks
// that a request is taken on the next rising edge (Req_st = destination,
// data captured), that the completion (ackdat) clears Req_st at once, that
// syn_ack then rises while the clock is high and is seen at the following
// rising edge, that no second request is taken before that acknowledge,
// and that a back-to-back request is taken on the edge after it.
//
// Origin: The stimulus and the model of the crossbar side are this testbench's own.
module tb_sender_if;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned N_OUT = 4, DATA_W = 4, MF_PS = 20, HALF = 500;

  logic clk = 1'b0, rst = 1'b0;   // rst low before time 0, so raising it is an edge
  logic syn_req = 1'b0;
  logic [N_OUT-1:0] syn_dest = '0;
  logic [DATA_W-1:0] syn_data = '0;
  logic syn_ack, ackdat = 1'b0;
  logic [N_OUT-1:0] req_st;
  logic [DATA_W-1:0] data_q;
  int checks = 0, failures = 0;

  sender_if #(.N_OUT(N_OUT), .DATA_W(DATA_W), .MF_PS(MF_PS)) dut (.*);

  always #HALF clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  time t_fall = 0;
  always @(negedge clk) t_fall = $time;
  always @(syn_ack) if (!rst) check(clk || $time - t_fall <= MF_PS, "syn_ack changed in low clock phase");

  initial begin : watchdog
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    #2200 rst = 1'b0;
    repeat (50) begin
      logic [N_OUT-1:0] d;
      logic [DATA_W-1:0] w;
      @(negedge clk);
      d = N_OUT'(1) << $urandom_range(N_OUT - 1);
      w = DATA_W'($urandom);
      syn_req = 1'b1; syn_dest = d; syn_data = w;
      @(posedge clk); #1;
      check(req_st == d, $sformatf("Req_st %b, expected %b", req_st, d));
      check(data_q == w, "data not captured");
      check(!syn_ack, "acknowledge before completion");
      // change the sender's word: the port must keep what it took
      // completion arrives asynchronously some time later
      #($urandom_range(3000) + 10);
      check(req_st == d && !syn_ack, "request lost before completion");
      ackdat = 1'b1;
      #1 check(req_st == '0, "completion did not clear Req_st");
      ackdat = 1'b0;
      // acknowledge must reach the sender within two rising edges
      fork
        wait (syn_ack);
        #(4 * HALF);
      join_any
      disable fork;
      check(syn_ack, "no acknowledge");
      check(clk || $time - t_fall <= MF_PS, "acknowledge rose in low clock phase");
      check(req_st == '0, "request taken again before acknowledge");
      @(posedge clk);              // sender sees the acknowledge here
      #(MF_PS + 1);
      check(!syn_ack, "acknowledge not removed");
      // the sender either stops or presents its next word straight away
      if ($urandom_range(1)) begin
        syn_req = 1'b0;
        @(posedge clk); #1 check(req_st == '0, "request taken without syn_req");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
