// tb_token_ring: test of one token ring at the default 4 stops, 150 ps/hop.
//
// Part 1 measures the ring latency: with the token held at stop a by a
// request, a request is raised at stop b, then stop a is released; stop b
// must win exactly h*HOP_PS later, h = (b - a) mod N (a full round, N hops,
// when b = a). Part 2 raises and drops random requests and checks that at
// most one stop wins at a time, that a stop wins only while it requests, and
// that every request is served within N rounds of the ring plus the
// holding times of the stops ahead of it (no request starves).
//
// Origin: The 150 ps hop is the published figure; the stimulus is this
// testbench's own.
module tb_token_ring;
  timeunit 1ps; timeprecision 100fs;
  localparam int unsigned N = 4;
  localparam int unsigned HOP_PS = 150;

  logic rst = 1'b0;   // low before time 0, so raising it is an edge
  logic [N-1:0] req = '0;
  logic [N-1:0] tok, won;
  int checks = 0, failures = 0;
  int wins [N] = '{default: 0};

  token_ring #(.N(N), .HOP_PS(HOP_PS)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  always @(won) check($countones(won) <= 1, $sformatf("several winners %b", won));
  // a stop may only win while it requests (checked just after each change,
  // so that the stimulus below may react to a win in the same instant)
  always @(won) #0.5 check((won & ~req) == '0, "winner without request");
  for (genvar k = 0; k < N; k++) begin : g_cnt
    always @(posedge won[k]) wins[k]++;
  end

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    int n_pend;
    rst = 1'b1;
    #1000 rst = 1'b0;
    // the single token starts at stop 0: it reaches stop 1 one hop after reset
    req[1] = 1'b1;
    wait (won[1]);
    check($time == 1000 + HOP_PS, $sformatf("first token at stop 1 at %0t", $time));
    #1;
    // ring latency for every hop distance
    for (int a = 0; a < N; a++) begin
      for (int h = 1; h <= N; h++) begin
        int b;
        b = (a + h) % N;
        req = '0; req[a] = 1'b1;
        wait (won[a]);
        #300;
        req[b] = 1'b1;
        #300;
        check(won == (N'(1) << a), "holder lost token");
        t0 = $time;
        req[a] = 1'b0;
        if (b == a) #1 req[a] = 1'b1;
        wait (won[b] && $time > t0);
        check($time - t0 == h * HOP_PS,
              $sformatf("hop %0d->%0d took %0t, expected %0d", a, b, $time - t0, h * HOP_PS));
        #1;
        #100;
      end
    end
    // random load
    req = '0;
    #1000;
    for (int k = 0; k < N; k++) wins[k] = 0;
    repeat (400) begin
      int k;
      k = $urandom_range(N - 1);
      if (!req[k]) req[k] = 1'b1;
      else if (won[k]) req[k] = 1'b0;
      #($urandom_range(400) + 1);
    end
    // every pending request is served, each within one round of the
    // previous winner letting go
    n_pend = $countones(req);
    repeat (n_pend) begin
      fork
        begin wait (won != '0); end
        begin #(N * HOP_PS + 1); end
      join_any
      disable fork;
      check(won != '0, $sformatf("pending requests %b not served within a round", req));
      #1;
      req = req & ~won;
      #1;
    end
    check(req == '0, $sformatf("requests %b never served", req));
    for (int k = 0; k < N; k++) check(wins[k] > 0, $sformatf("stop %0d never won under random load", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
