// tb_latency_table: forward latency of the crossbar at its three supply
// corners and at larger sizes, and token travel in an 8-stop ring.
//
// Three 4x4, 4-bit crossbars are built side by side, each with the delay set
// of one supply voltage (1.5 V, 1.8 V, 2.1 V): hop, request/steering and
// output port delays; two more, 8x8 and 16x16, use the 1.8 V set. On each
// crossbar the testbench measures the forward latency from a sender's
// request to the word being held at output port 0 (the port's Reqout), for
// every hop distance the ring allows (0..N-1):
//   - hops 1..N-1 (lightly loaded, mode 2): the sender's clock edge is placed
//     exactly when the free-running token reaches the stop h hops before
//     the requesting stop, so the latency must be h*hop + grid + port;
//   - hop 0 (fully loaded, mode 1): the requesting stop already holds the
//     token and waits for the output port to become free; the latency runs
//     from Ackout rising and must be grid + port.
// Expected totals, in ps, for hops 0..3:
//   1.5 V: 875 1045 1215 1385   (hop 170, grid 675, port 200)
//   1.8 V: 710  860 1010 1160   (hop 150, grid 550, port 160)
//   2.1 V: 605  710  815  920   (hop 105, grid 475, port 130)
// These are the totals the published table gives; the testbench works them
// out from its own copy of the three delays per corner, independently of the
// design's parameters, and also compares them with the printed totals.
// Every word is also checked at the receiver.
//
// The 8-stop ring is the arbitration-only comparison at 1.8 V: with no
// requests the token must reach each stop 150 ps after the previous one, so a
// token h stops away arrives after h*150 ps (375 ps for the average 2.5 hops
// of a 4-stop ring) and a round takes 1200 ps.
//
// Origin: The corner delays and totals are the published figures; the way they
// are measured is this testbench's own.
module tb_latency_table;
  timeunit 1ps; timeprecision 1ps;

  // per corner: hop, grid, port delay and the four printed totals
  localparam int unsigned HOP_T [3] = '{170, 150, 105};
  localparam int unsigned GRID_T[3] = '{675, 550, 475};
  localparam int unsigned OP_T  [3] = '{200, 160, 130};
  localparam int unsigned TOT_T [3][4] = '{'{875, 1045, 1215, 1385},
                                          '{710,  860, 1010, 1160},
                                          '{605,  710,  815,  920}};
  localparam int unsigned REPS = 4;   // measurements per hop count

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  // ---------------------------------------------------------------------
  // one crossbar per row of the table (4x4), and 8x8 and 16x16 at 1.8 V
  // ---------------------------------------------------------------------
  localparam int unsigned NI = 5;
  localparam int unsigned NP_T[NI] = '{4, 4, 4, 8, 16};   // ports
  localparam int unsigned CI_T[NI] = '{0, 1, 2, 1, 1};    // corner
  logic [NI-1:0] done = '0;

  for (genvar v = 0; v < NI; v++) begin : g_v
    localparam int unsigned NP   = NP_T[v];
    localparam int unsigned CI   = CI_T[v];
    localparam int unsigned HOP  = HOP_T[CI];
    localparam int unsigned GRID = GRID_T[CI];
    localparam int unsigned OP   = OP_T[CI];
    localparam int unsigned RQ   = NP - 1;   // requesting input port
    localparam int unsigned OT   = NP - 2;   // input port that fills port 0 first

    logic                 rst = 1'b0;   // low before time 0, so raising it is an edge
    logic [NP-1:0]        snd_clk, snd_req;
    logic [NP-1:0][NP-1:0] snd_dest;
    logic [NP-1:0][3:0]   snd_data;
    logic [NP-1:0]        snd_ack;
    logic [NP-1:0]        rcv_clk, rcv_req, rcv_ackr, rcv_valid;
    logic [NP-1:0][3:0]   rcv_data;

    gals_crossbar #(.N_IN(NP), .N_OUT(NP), .DATA_W(4),
                    .HOP_PS(HOP), .GRID_PS(GRID), .OPORT_PS(OP)) dut (.*);

    // receivers: free-running clocks, port 0's ackr driven by the test
    initial begin
      rcv_clk = '0;
      forever #1000 rcv_clk = ~rcv_clk;
    end

    // expected words at output port 0, in order
    logic [3:0] exp_q[$];
    always @(posedge rcv_clk[0]) begin
      #1;
      if (!rst && rcv_valid[0]) begin
        check(exp_q.size() > 0, $sformatf("%0d: word received with none sent", v));
        if (exp_q.size() > 0) begin
          check(rcv_data[0] == exp_q[0],
                $sformatf("%0d: received %h, expected %h", v, rcv_data[0], exp_q[0]));
          void'(exp_q.pop_front());
        end
      end
    end

    // the token arrives at stop k of ring 0 when that stop's input toggles
    logic [NP-1:0] tin0;
    for (genvar k = 0; k < NP; k++) begin : g_tin
      assign tin0[k] = dut.g_out[0].u_ring.g_stop[k].tin;
    end

    task automatic wait_token(input int k);
      logic [NP-1:0] tin_was;
      do begin
        tin_was = tin0;
        @(tin0);
      end while (tin0[k] == tin_was[k]);
    endtask

    // present a word at sender s with its clock low; the caller raises it
    task automatic load(input int s, input logic [3:0] w);
      snd_req[s]  = 1'b1;
      snd_dest[s] = NP'(1);
      snd_data[s] = w;
      exp_q.push_back(w);
    endtask

    // after the request edge: wait for the acknowledge with the clock held
    // high, then one more clock cycle lets the sender interface see it
    task automatic finish(input int s);
      #1 snd_req[s] = 1'b0;
      wait (snd_ack[s]);
      #200 snd_clk[s] = 1'b0;
      #500 snd_clk[s] = 1'b1;
      #500 snd_clk[s] = 1'b0;
      wait (!snd_ack[s]);
      #300;
    endtask

    initial begin
      longint unsigned t0, lat, expect_ps;
      rst = 1'b1;
      snd_clk  = '0;
      snd_req  = '0;
      snd_dest = '0;
      snd_data = '0;
      rcv_ackr = '1;
      // a sender clock edge during reset clears the sender interfaces even
      // where the reset itself was not seen as an edge
      #500 snd_clk = '1;
      #500 snd_clk = '0;
      #2000 rst = 1'b0;
      #2000;

      // the printed totals follow from the three delays
      for (int h = 0; h < 4; h++)
        check(TOT_T[CI][h] == h*HOP + GRID + OP,
              $sformatf("%0d: printed total %0d for %0d hops vs %0d", v, TOT_T[CI][h], h, h*HOP + GRID + OP));

      // hops 1..NP-1: request from input port RQ, edge placed as the token
      // reaches stop RQ-h
      for (int r = 0; r < REPS; r++) begin
        for (int h = 1; h < NP; h++) begin
          wait (dut.ackout[0]);   // previous word taken, port free
          #1;
          load(RQ, 4'($urandom));
          wait_token(RQ - h);
          snd_clk[RQ] = 1'b1;
          t0 = $time;
          @(posedge dut.full[0]);
          lat = $time - t0;
          expect_ps = (h < 4) ? TOT_T[CI][h] : h*HOP + GRID + OP;
          check(lat == expect_ps,
                $sformatf("%0d: %0d hops: latency %0d ps, expected %0d", v, h, lat, expect_ps));
          finish(RQ);
          #($urandom_range(0, 700));
        end
      end

      // hop 0: port 0 held full by a word from input port OT while input
      // port RQ's stop catches the token and waits for Ackout
      for (int r = 0; r < REPS; r++) begin
        wait (dut.ackout[0]);
        #1 rcv_ackr[0] = 1'b0;
        load(OT, 4'($urandom));
        #($urandom_range(50, 400)) snd_clk[OT] = 1'b1;
        finish(OT);
        check(dut.full[0] && !dut.ackout[0], $sformatf("%0d: port 0 not busy", v));
        load(RQ, 4'($urandom));
        #($urandom_range(50, 400)) snd_clk[RQ] = 1'b1;
        wait (dut.ring_won[0][RQ]);
        #($urandom_range(100, 900)) rcv_ackr[0] = 1'b1;
        @(posedge dut.ackout[0]);
        t0 = $time;
        check(dut.ring_won[0][RQ], $sformatf("%0d: token not held while waiting", v));
        @(posedge dut.full[0]);
        lat = $time - t0;
        check(lat == TOT_T[CI][0],
              $sformatf("%0d: 0 hops: latency %0d ps, expected %0d", v, lat, TOT_T[CI][0]));
        finish(RQ);
        #3000;
      end

      #6000;
      check(exp_q.size() == 0, $sformatf("%0d: %0d words never received", v, exp_q.size()));
      $display("%0dx%0d crossbar, corner %0d: hops 0..%0d measured", NP, NP, CI, NP - 1);
      done[v] = 1'b1;
    end
  end

  // ---------------------------------------------------------------------
  // 8-stop ring at 1.8 V, no requests
  // ---------------------------------------------------------------------
  localparam int unsigned HOP8 = 150;
  logic       rst8;
  logic [7:0] tok8, won8;
  longint unsigned t8[8];
  int unsigned n_hop8 = 0;

  token_ring #(.N(8), .HOP_PS(HOP8)) ring8 (.rst(rst8), .req(8'h00), .tok(tok8), .won(won8));

  for (genvar k = 0; k < 8; k++) begin : g_r8
    always @(ring8.g_stop[k].tin) begin
      if (!rst8) begin
        if (t8[(k + 7) % 8] != 0) begin
          check($time - t8[(k + 7) % 8] == HOP8,
                $sformatf("ring8: hop into stop %0d took %0d ps", k, $time - t8[(k + 7) % 8]));
          n_hop8++;
        end
        if (t8[k] != 0)
          check($time - t8[k] == 8 * HOP8,
                $sformatf("ring8: round at stop %0d took %0d ps", k, $time - t8[k]));
        t8[k] = $time;
      end
    end
  end

  initial begin
    t8   = '{default: 0};
    rst8 = 1'b1;
    #1000 rst8 = 1'b0;
  end

  // ---------------------------------------------------------------------
  initial begin
    wait (done == '1);
    check(n_hop8 >= 16, $sformatf("ring8: only %0d hops seen", n_hop8));
    check(won8 == '0, "ring8: a stop won with no request");
    $display("8-stop ring: %0d hops of %0d ps; a token 2.5 hops away arrives after %0d ps",
             n_hop8, HOP8, HOP8 * 5 / 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
