// tb_dual_rail_port: exhaustive test of the single-rail to dual-rail data
// port. Every word with valid high must appear as (t, f) = (word, ~word);
// with valid low the row must be NULL (all rails low).
//
// Origin: The stimulus and the expected values are this testbench's own.
module tb_dual_rail_port;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned DATA_W = 4;

  logic              valid;
  logic [DATA_W-1:0] data, row_t, row_f;
  int checks = 0, failures = 0;

  dual_rail_port #(.DATA_W(DATA_W)) dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      for (int d = 0; d < (1 << DATA_W); d++) begin
        logic [DATA_W-1:0] et, ef;
        valid = v[0];
        data  = DATA_W'(d);
        #10;
        for (int k = 0; k < DATA_W; k++) begin
          et[k] = valid &&  d[k];
          ef[k] = valid && !d[k];
        end
        checks++;
        if (row_t !== et || row_f !== ef) begin
          failures++;
          $display("FAIL valid=%0d data=%h: t=%b f=%b", valid, data, row_t, row_f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
