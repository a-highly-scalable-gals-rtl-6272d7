// tb_gals_crossbar: end-to-end test of the 4x4, 4-bit crossbar at its
// default parameters.
//
// Four clocked senders, each on its own clock, send random words to random
// output ports; four clocked receivers, each on its own clock, take them
// with a randomly stalling ackr. The testbench checks
//   - every word arrives at the chosen output port, intact, and every sender
//     transfer is acknowledged exactly once;
//   - the output port fills exactly GRID_PS + OPORT_PS (710 ps) after the
//     request, the token and Ackout have all arrived at the stop (the last
//     of the three fires Req_im), and every token hop between two
//     idle stops takes HOP_PS (150 ps): together, the forward latency
//     h*150 + 710 ps for a token h hops away;
//   - at most one input port drives a column at any time;
//   - the acknowledge to a sender and the request to a receiver change only
//     while the local clock is high (or within the filter's resolution time,
//     MF_PS, after it fell), so they are stable well before the next rising
//     edge.
// It counts the mechanisms of the design and fails if one never happens:
// requests offered while another stop holds the token (mode 1, fully
// loaded), requests offered while the token travels freely (mode 2, lightly
// loaded), tokens passing idle stops, early token release (before the
// receiver has taken the word), contention on a ring, a stop holding the
// token while it waits for Ackout, receiver stalls, and back-to-back
// requests from one sender.
//
// Origin: The latency figures checked are the published 1.8 V ones; the traffic,
// the clock periods and the mechanism classes are this testbench's own.
module tb_gals_crossbar;
  timeunit 1ps; timeprecision 1ps;
  import xbar_pkg::*;

  localparam int unsigned N_WORDS = 60;          // per sender
  localparam int unsigned LAT     = GRID_PS + OPORT_PS;

  logic                         rst = 1'b0;   // low before time 0, so raising it is an edge
  logic [N_IN-1:0]              snd_clk = '0;
  logic [N_IN-1:0]              snd_req;
  logic [N_IN-1:0][N_OUT-1:0]   snd_dest;
  logic [N_IN-1:0][DATA_W-1:0]  snd_data;
  logic [N_IN-1:0]              snd_ack;
  logic [N_OUT-1:0]             rcv_clk = '0;
  logic [N_OUT-1:0]             rcv_req;
  logic [N_OUT-1:0]             rcv_ackr;
  logic [N_OUT-1:0][DATA_W-1:0] rcv_data;
  logic [N_OUT-1:0]             rcv_valid;

  gals_crossbar dut (.*);

  int checks = 0, failures = 0;
  int n_mode1 = 0, n_mode2 = 0, n_mode3 = 0, n_pass = 0, n_early = 0;
  int n_contend = 0, n_stall = 0, n_b2b = 0, n_ackwait = 0;
  int sent_done [N_IN]  = '{default: 0};
  int recv_cnt  [N_OUT] = '{default: 0};

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  // ---------------- clocks: unrelated periods per sender and receiver
  int unsigned snd_half [4] = '{503, 617, 709, 811};
  int unsigned rcv_half [4] = '{557, 661, 743, 907};
  for (genvar i = 0; i < N_IN; i++) begin : g_sclk
    initial begin
      #(37 * i + 11);
      forever #(snd_half[i % 4]) snd_clk[i] = ~snd_clk[i];
    end
  end
  for (genvar j = 0; j < N_OUT; j++) begin : g_rclk
    initial begin
      #(53 * j + 29);
      forever #(rcv_half[j % 4]) rcv_clk[j] = ~rcv_clk[j];
    end
  end

  // ---------------- senders
  typedef struct { int src; logic [DATA_W-1:0] data; } word_t;
  word_t exp_q [N_OUT][$];

  for (genvar i = 0; i < N_IN; i++) begin : g_snd
    int n = 0;
    bit prev_ack = 0;
    always @(posedge snd_clk[i] or posedge rst) begin
      if (rst) begin
        snd_req[i]  <= 1'b0;
        snd_dest[i] <= '0;
        snd_data[i] <= '0;
        n = 0;
      end else begin
        if (snd_req[i] && snd_ack[i]) begin
          sent_done[i]++;
          snd_req[i] <= 1'b0;
          prev_ack = 1;
        end
        if ((!snd_req[i] || snd_ack[i]) && n < N_WORDS && ($urandom_range(3) != 0 || prev_ack)) begin
          if (prev_ack && snd_req[i]) n_b2b++;
          snd_req[i]  <= 1'b1;
          snd_dest[i] <= N_OUT'(1) << $urandom_range(N_OUT - 1);
          snd_data[i] <= DATA_W'($urandom);
          n++;
        end
        if (!(snd_req[i] && snd_ack[i])) prev_ack = 0;
      end
    end
    // acknowledge may only change while the sender clock is high
    time t_fall = 0;
    always @(negedge snd_clk[i]) t_fall = $time;
    always @(snd_ack[i]) if (!rst) check(snd_clk[i] == 1'b1 || $time - t_fall <= MF_PS,
                                         $sformatf("snd_ack[%0d] changed in low clock phase", i));
  end

  // ---------------- receivers
  for (genvar j = 0; j < N_OUT; j++) begin : g_rcv
    always @(posedge rcv_clk[j] or posedge rst) begin
      if (rst) rcv_ackr[j] <= 1'b0;
      else begin
        if (rcv_req[j] && !rcv_ackr[j]) n_stall++;
        rcv_ackr[j] <= ($urandom_range(2) != 0);
      end
    end
    always @(posedge rcv_clk[j]) begin
      if (!rst && rcv_valid[j]) begin
        word_t w;
        recv_cnt[j]++;
        check(exp_q[j].size() > 0, $sformatf("receiver %0d got an unexpected word", j));
        if (exp_q[j].size() > 0) begin
          w = exp_q[j].pop_front();
          check(rcv_data[j] == w.data, $sformatf("receiver %0d data %h, expected %h from sender %0d",
                                                  j, rcv_data[j], w.data, w.src));
        end
      end
    end
    time t_fall = 0;
    always @(negedge rcv_clk[j]) t_fall = $time;
    always @(rcv_req[j]) if (!rst) check(rcv_clk[j] == 1'b1 || $time - t_fall <= MF_PS,
                                         $sformatf("rcv_req[%0d] changed in low clock phase", j));
  end

  // ---------------- arbitration and latency monitors
  logic [DATA_W-1:0] row_word [N_IN];
  for (genvar i = 0; i < N_IN; i++) begin : g_row
    assign row_word[i] = dut.g_in[i].u_ip.data_q;
  end
  for (genvar j = 0; j < N_OUT; j++) begin : g_mon
    time t_arr [N_IN] = '{default: 0};   // last token arrival at stop k
    time t_dep [N_IN] = '{default: 0};   // last token departure from stop k
    time t_req [N_IN] = '{default: 0};   // last rise of the request offered to stop k
    time t_ack = 0;                      // last rise of Ackout
    always @(posedge dut.ackout[j]) t_ack = $time;

    for (genvar k = 0; k < N_IN; k++) begin : g_stop
      // the token is a transition: it arrives at stop k when tin toggles and
      // leaves when the stop's output tout[k] toggles
      always @(dut.g_out[j].u_ring.g_stop[k].tin) begin
        t_arr[k] = $time;
        if (!rst && $time > 5000) begin
          int p;
          p = (k + N_IN - 1) % N_IN;
          check($time - t_dep[p] == HOP_PS, $sformatf("ring %0d hop %0d->%0d took %0t", j, p, k, $time - t_dep[p]));
        end
      end
      always @(dut.g_out[j].u_ring.tout[k]) begin
        t_dep[k] = $time;
        if (!rst && $time == t_arr[k]) n_pass++;
        if (!rst && $time > t_arr[k] && dut.full[j]) n_early++;
      end
      always @(posedge dut.req_ring[k][j]) begin
        t_req[k] = $time;
        if (!rst) begin
          if ($countones(dut.g_out[j].u_ring.req) > 1) n_contend++;
          if (dut.g_out[j].u_ring.tok[k])         n_mode3++;
          else if (dut.g_out[j].u_ring.tok != '0) n_mode1++;   // token held elsewhere
          else                                     n_mode2++;   // token travelling freely
        end
      end
    end

    always @(posedge dut.full[j]) begin
      int winners, w;
      time t_won;
      winners = 0;
      w = -1;
      for (int k = 0; k < N_IN; k++) if (dut.req_im[k][j]) begin winners++; w = k; end
      check(winners == 1, $sformatf("output %0d filled with %0d row(s) steering", j, winners));
      if (w >= 0) begin
        // Req_im fires on the last of: request, token, Ackout
        t_won = (t_req[w] > t_arr[w]) ? t_req[w] : t_arr[w];
        if (t_ack > t_won) begin
          t_won = t_ack;
          n_ackwait++;
        end
        check($time - t_won == LAT, $sformatf("output %0d from %0d: latency %0t, expected %0d",
                                               j, w, $time - t_won, LAT));
        check(snd_dest[w][j] == 1'b1, $sformatf("output %0d filled by sender %0d aimed elsewhere", j, w));
        exp_q[j].push_back('{src: w, data: row_word[w]});
        check(row_word[w] == snd_data[w], "row word differs from sender word");
      end
    end

    // steering: one row per column at any time
    always @(dut.req_im) check($countones({dut.req_im[0][j], dut.req_im[1][j], dut.req_im[2][j], dut.req_im[3][j]}) <= 1,
                               $sformatf("column %0d steered by two rows", j));
  end

  // ---------------- sequence
  initial begin
    rst = 1'b1;
    #2000 rst = 1'b0;
  end

  initial begin : watchdog
    #(5_000_000);
    failures++;
    $display("watchdog expired");
    finish_report();
  end

  initial begin
    int total_s, total_r;
    wait (!rst);
    do begin
      #1000;
      total_s = 0; total_r = 0;
      for (int i = 0; i < N_IN; i++) total_s += sent_done[i];
      for (int j = 0; j < N_OUT; j++) total_r += recv_cnt[j];
    end while (total_s < N_IN * N_WORDS || total_r < N_IN * N_WORDS);
    #5000;
    finish_report();
  end

  task automatic finish_report();
    int total_s, total_r;
    total_s = 0;
    total_r = 0;
    for (int i = 0; i < N_IN; i++) total_s += sent_done[i];
    for (int j = 0; j < N_OUT; j++) begin
      total_r += recv_cnt[j];
      check(exp_q[j].size() == 0, $sformatf("receiver %0d missed %0d word(s)", j, exp_q[j].size()));
    end
    check(total_s == N_IN * N_WORDS, $sformatf("%0d sender acknowledges, expected %0d", total_s, N_IN * N_WORDS));
    check(total_r == N_IN * N_WORDS, $sformatf("%0d words received, expected %0d", total_r, N_IN * N_WORDS));
    $display("mechanisms: mode1=%0d mode2=%0d mode3=%0d pass=%0d early_release=%0d contention=%0d ackout_wait=%0d rcv_stall=%0d back_to_back=%0d",
             n_mode1, n_mode2, n_mode3, n_pass, n_early, n_contend, n_ackwait, n_stall, n_b2b);
    check(n_mode1 > 0, "mode 1 never happened");
    check(n_mode2 > 0, "mode 2 never happened");
    check(n_pass > 0, "no token passed an idle stop");
    check(n_early > 0, "no early token release");
    check(n_contend > 0, "no contention");
    check(n_ackwait > 0, "no token held waiting for Ackout");
    check(n_stall > 0, "no receiver stall");
    check(n_b2b > 0, "no back-to-back sender request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
