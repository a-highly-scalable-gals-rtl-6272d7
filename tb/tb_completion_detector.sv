// tb_completion_detector: test of dual-rail completion detection.
// Exhaustive over all legal rail combinations (each bit NULL, 0 or 1):
// valid must be high exactly when every bit carries a value, null_w exactly
// when no bit does.
//
// Origin: The stimulus and the expected values are this testbench's own; the
// dual-rail rules come from the published design.
module tb_completion_detector;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned DATA_W = 4;

  logic [DATA_W-1:0] t, f;
  logic valid, null_w;
  int checks = 0, failures = 0;

  completion_detector #(.DATA_W(DATA_W)) dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 1;
    for (int k = 0; k < DATA_W; k++) n *= 3;
    for (int c = 0; c < n; c++) begin
      int x, n_set;
      x = c;
      n_set = 0;
      for (int k = 0; k < DATA_W; k++) begin
        t[k] = (x % 3 == 1);
        f[k] = (x % 3 == 2);
        if (x % 3 != 0) n_set++;
        x /= 3;
      end
      #10;
      checks++;
      if (valid !== (n_set == DATA_W) || null_w !== (n_set == 0)) begin
        failures++;
        $display("FAIL t=%b f=%b valid=%b null=%b", t, f, valid, null_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
