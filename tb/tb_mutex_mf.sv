// tb_mutex_mf: test of the metastability filter model.
//
// Drives the two requests with directed and random sequences and compares
// the grants with a reference owner computed in the testbench: a grant goes
// to the first request to arrive (r1 on a tie), stays while its request is
// high, and passes to a waiting request when it is released. Grants must
// follow the reference MF_PS after each change and never be high together.
//
// Origin: The stimulus and the reference model are this testbench's own.
module tb_mutex_mf;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned MF_PS = 20;

  logic r1 = 1'b0, r2 = 1'b0;
  logic g1, g2;
  int checks = 0, failures = 0;
  int owner = 0;   // reference: 0 none, 1 r1, 2 r2

  mutex_mf #(.MF_PS(MF_PS)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  function automatic void update_ref();
    if (owner == 1 && !r1) owner = 0;
    if (owner == 2 && !r2) owner = 0;
    if (owner == 0) begin
      if (r1)      owner = 1;
      else if (r2) owner = 2;
    end
  endfunction

  task automatic apply(input logic n1, input logic n2);
    r1 = n1; r2 = n2;
    update_ref();
    #(MF_PS - 1);
    #2;
    check(g1 == (owner == 1) && g2 == (owner == 2),
          $sformatf("r=%b%b owner=%0d g=%b%b", r1, r2, owner, g1, g2));
    check(!(g1 && g2), "both grants");
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    // grant timing: no grant before MF_PS, grant at MF_PS
    r1 = 1'b1; update_ref();
    #(MF_PS - 1) check(g1 == 1'b0, "grant earlier than MF_PS");
    #2           check(g1 == 1'b1, "grant not given after MF_PS");
    apply(1, 1);   // r2 waits
    apply(0, 1);   // hand over to r2
    apply(1, 1);   // r1 waits
    apply(1, 0);   // hand over to r1
    apply(0, 0);
    apply(1, 1);   // tie: r1 wins
    apply(0, 0);
    repeat (2000) begin
      logic n1, n2;
      n1 = r1; n2 = r2;
      case ($urandom_range(3))
        0: n1 = ~n1;
        1: n2 = ~n2;
        default: begin n1 = ~n1; n2 = ~n2; end
      endcase
      apply(n1, n2);
      #($urandom_range(50) + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
