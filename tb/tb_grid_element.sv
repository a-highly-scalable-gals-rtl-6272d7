// tb_grid_element: test of one steering element.
// While Req_im is high the row's dual-rail word must appear on the column
// exactly GRID_PS later (not earlier); with Req_im low the column stays
// NULL. The completion (full) must be steered back to the row only while
// Req_im is high.
//
// Origin: The stimulus and the expected values are this testbench's own.
module tb_grid_element;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned DATA_W  = 4;
  localparam int unsigned GRID_PS = 550;

  logic              req_im = 1'b0, full = 1'b0;
  logic [DATA_W-1:0] row_t = '0, row_f = '0, col_t, col_f;
  logic              ackdat;
  int checks = 0, failures = 0;

  grid_element #(.DATA_W(DATA_W), .GRID_PS(GRID_PS)) dut (.*);

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
    #1000;
    repeat (40) begin
      logic [DATA_W-1:0] d;
      logic sel;
      d   = DATA_W'($urandom);
      sel = 1'($urandom);
      row_t = d; row_f = ~d;
      req_im = sel;
      #(GRID_PS - 1);
      check(col_t == '0 && col_f == '0, "column changed before GRID_PS");
      #2;
      check(col_t == (sel ? d : '0) && col_f == (sel ? ~d : '0),
            $sformatf("sel=%0d column t=%b f=%b for word %b", sel, col_t, col_f, d));
      full = 1'b1;
      #1 check(ackdat == sel, "completion not steered by Req_im");
      full = 1'b0;
      #1 check(ackdat == 1'b0, "completion without full");
      // return to NULL
      req_im = 1'b0; row_t = '0; row_f = '0;
      #(GRID_PS + 10);
      check(col_t == '0 && col_f == '0, "column not NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
