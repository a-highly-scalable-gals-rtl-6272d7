// tb_output_port: test of one output port with a clocked receiver model.
// For each word the testbench drives the column with a complete dual-rail
// word and checks that the port becomes full exactly OPORT_PS later, that
// Ackout falls with it, that the request to the receiver rises while the
// receiver clock is high, that a stalled receiver (ackr low) keeps the word
// waiting, that the word reaches sync_data with a one-cycle sync_valid, that
// a column still holding the old word is not taken twice, and that Ackout
// rises only once the word is taken and the column is back to NULL.
//
// Origin: The stimulus and the model of the column and receiver are this
// testbench's own; the 160 ps output-port latency is the published figure.
module tb_output_port;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned DATA_W = 4, OPORT_PS = 160, MF_PS = 20, HALF = 613;

  logic clk = 1'b0, rst = 1'b0;   // rst low before time 0, so raising it is an edge
  logic [DATA_W-1:0] col_t = '0, col_f = '0;
  logic full, ackout, req_o;
  logic ackr = 1'b0;
  logic [DATA_W-1:0] sync_data;
  logic sync_valid;
  int checks = 0, failures = 0;
  int n_valid = 0, n_stall = 0;
  logic [DATA_W-1:0] expect_w;

  output_port #(.DATA_W(DATA_W), .OPORT_PS(OPORT_PS), .MF_PS(MF_PS)) dut (.*);

  always #HALF clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  time t_fall = 0;
  always @(negedge clk) t_fall = $time;
  always @(req_o) if (!rst) check(clk || $time - t_fall <= MF_PS, "req_o changed in low clock phase");

  always @(posedge clk) if (!rst && sync_valid) begin
    n_valid++;
    check(sync_data == expect_w, $sformatf("sync_data %h, expected %h", sync_data, expect_w));
  end

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    #2000 rst = 1'b0;
    #10 check(ackout && !full && !req_o, "port not free after reset");
    for (int n = 0; n < 40; n++) begin
      logic [DATA_W-1:0] w;
      int stall;
      w = DATA_W'($urandom);
      #($urandom_range(500) + 1);
      // bits arrive one by one; completion only when all are there
      for (int k = 0; k < DATA_W; k++) begin
        col_t[k] = w[k]; col_f[k] = !w[k];
        if (k < DATA_W - 1) begin #7; check(!full, "full before the word was complete"); end
      end
      expect_w = w;
      #(OPORT_PS - 1) check(!full, "full earlier than OPORT_PS");
      #2 check(full, "full not set OPORT_PS after completion");
      check(!ackout, "Ackout high while full");
      // the receiver stalls for a few cycles before taking the word
      stall = $urandom_range(3);
      repeat (stall) begin
        @(posedge clk);
        if (req_o) n_stall++;
      end
      @(negedge clk) ackr = 1'b1;
      wait (req_o);
      @(posedge clk);
      #1 ackr = 1'b0;
      check(!full, "full not cleared by the transfer");
      // column still holds the word: it must not be taken again
      #(2 * HALF) check(!full && !ackout, "old word taken twice or port freed early");
      // return to NULL
      col_t = '0; col_f = '0;
      #(2 * HALF + 10) check(ackout, "Ackout not raised after NULL");
    end
    #(4 * HALF);
    check(n_valid == 40, $sformatf("%0d words delivered, expected 40", n_valid));
    check(n_stall > 0, "receiver never stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
