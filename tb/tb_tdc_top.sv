// tb_tdc_top: end-to-end test of the multi-channel TDC at its default sizes.
//
// Two channels share the clock, as in a coincidence measurement: one random
// source drives channel 0 directly and channel 1 after an extra path delay
// (fixed per run of hits), and the test also sends hits to one channel alone.
// Every event read back from the memory is compared with the channel, clock
// edge number and fine code predicted here from the hit time (same formula
// as the channel test: counter k reads ceil((W - k*TAP)/(2*RO_HALF)) where W
// is the time from hit to the next clock edge). For two-channel hits the
// measured delay, (coarse1 - coarse0)*T_clk - (t(fine1) - t(fine0)), must
// match the applied delay to within the coarser of the two codes' bins.
//
// Mechanisms counted, each must happen at least once: a single-channel hit,
// both channels hit in the same clock period (write arbitration), a hit pair
// straddling a clock edge (different coarse stamps), the memory filling up
// while events wait (backpressure), and a hit ignored because its channel was
// still reading out (dead time).
`timescale 1ps/1ps
module tb_tdc_top;
  import tdc_pkg::*;
  localparam int unsigned N = TDC_N_CNT, TAP = 100, RH = 415, TCLK = 2000;
  localparam int unsigned CMAX = (1 << TDC_CNT_W) - 1;
  localparam int unsigned DEPTH = 1024;
  logic clk = 1'b0, rst = 1'b1, rd_en = 1'b0;
  logic [1:0] time_in = '0;
  tdc_event_t rd_data;
  logic rd_valid, empty, full;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0;
  int n_single = 0, n_same = 0, n_straddle = 0, n_full = 0, n_dead = 0;

  tdc_top dut (.*);

  always #(TCLK/2) clk = ~clk;

  // Independent clock edge counter (matches the coarse stamp: edge 1 is the
  // first edge after reset).
  longint unsigned edge_no = 0;
  always @(posedge clk) if (!rst) edge_no++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int expect_fine(int w);
    int s = 0;
    for (int k = 0; k < N; k++) begin
      int wk = w - k * TAP;
      if (wk > 0) begin
        int c = (wk + 2 * RH - 1) / (2 * RH);
        s += (c > CMAX) ? CMAX : c;
      end
    end
    return s;
  endfunction

  function automatic bit near_edge(int w);
    for (int k = 0; k < N; k++)
      for (int j = 0; j < 8; j++) begin
        int e = k * TAP + j * 2 * RH;
        if (w >= e - 2 && w <= e + 2) return 1'b1;
      end
    return (w < 3) || (w > TCLK - 3);
  endfunction

  // Expected events, in the order the channels produce them per channel.
  typedef struct { int coarse; int fine; longint t_hit; } exp_t;
  exp_t exp_q [2][$];

  // Calibration, as a code-density test would give: code -> time before edge,
  // taken as the middle of the code's W range, from the formula above.
  int lo [0:511], hi [0:511];
  initial begin
    for (int c = 0; c < 512; c++) begin lo[c] = 1 << 30; hi[c] = -1; end
    for (int w = 1; w < TCLK; w++) begin
      int f;
      f = expect_fine(w);
      if (w < lo[f]) lo[f] = w;
      if (w > hi[f]) hi[f] = w;
    end
  end

  // Send a hit to channel ch at absolute time t (ps, in the future).
  task automatic hit_at(input int ch, input longint t);
    longint now_t;
    now_t = longint'($time);
    #(t - now_t);
    time_in[ch] = 1'b1;
    #300 time_in[ch] = 1'b0;
  endtask

  // Model which clock edge ends a hit at t: the first edge after t.
  // Edges are at T0 + n*TCLK with edge_no n; t0_edge captures T0.
  longint t_edge0;   // time of edge 1
  initial begin
    @(negedge rst);
    @(posedge clk);
    t_edge0 = longint'($time);
  end

  function automatic void predict(input int ch, input longint t);
    exp_t e;
    longint n;
    int w;
    n = (t - t_edge0) / TCLK + 1;            // edges after edge 1 that precede t
    w = int'(t_edge0 + n * TCLK - t);
    e.coarse = int'(n + 1) & 16'hFFFF;
    e.fine   = expect_fine(w);
    e.t_hit  = t;
    exp_q[ch].push_back(e);
  endfunction

  function automatic int w_of(longint t);
    return int'(TCLK - ((t - t_edge0) % TCLK));
  endfunction

  // Reader: pops the memory when asked and checks each word.
  bit reading = 1'b1;
  exp_t got [2][$];
  always @(posedge clk) begin
    if (!rst && rd_valid) begin
      int ch;
      ch = int'(rd_data.ch);
      if (ch > 1 || exp_q[ch].size() == 0) begin
        check(1'b0, $sformatf("unexpected event ch %0d", ch));
      end else begin
        exp_t e;
        e = exp_q[ch].pop_front();
        check(int'(rd_data.coarse) == e.coarse && int'(rd_data.fine) == e.fine,
              $sformatf("ch%0d coarse %0d fine %0d want %0d %0d", ch, rd_data.coarse, rd_data.fine, e.coarse, e.fine));
        got[ch].push_back('{coarse: int'(rd_data.coarse), fine: int'(rd_data.fine), t_hit: e.t_hit});
      end
    end
    if (!rst && full && dut.ev_valid != '0) n_full++;
  end
  always @(negedge clk) rd_en <= reading && !empty;

  initial begin
    #(64'd2000 * 64'd400000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t, d;
    int npairs;
    repeat (3) @(posedge clk);
    #10 rst = 1'b0;
    repeat (4) @(posedge clk);
    #1;

    // 1. Single-channel hits on each channel.
    for (int i = 0; i < 40; i++) begin
      int ch;
      ch = i % 2;
      do t = longint'($time) + 5 * TCLK + $urandom_range(TCLK); while (near_edge(w_of(t)));
      predict(ch, t);
      hit_at(ch, t);
      n_single++;
    end

    // 2. Coincidences: channel 1 sees the source 'd' ps later.
    npairs = 0;
    for (int i = 0; i < 60; i++) begin
      longint t1;
      d = (i < 30) ? 40 + $urandom_range(600) : 800 + $urandom_range(1500);
      do begin
        t  = longint'($time) + 5 * TCLK + $urandom_range(TCLK);
        t1 = t + d;
      end while (near_edge(w_of(t)) || near_edge(w_of(t1)));
      predict(0, t);
      predict(1, t1);
      if ((t - t_edge0) / TCLK == (t1 - t_edge0) / TCLK) n_same++; else n_straddle++;
      fork
        hit_at(0, t);
        hit_at(1, t1);
      join
      npairs++;
    end

    // 3. Dead time: a second hit on channel 0 one clock after the first is
    //    dropped, since the channel is still reading out.
    repeat (5) @(posedge clk);
    #1;
    do t = longint'($time) + 2 * TCLK + $urandom_range(TCLK); while (near_edge(w_of(t)));
    predict(0, t);
    hit_at(0, t);
    @(posedge clk); #(TCLK / 4);         // just after edge E: readout in progress
    time_in[0] = 1'b1; #300 time_in[0] = 1'b0;
    n_dead++;
    repeat (6) @(posedge clk);

    // 4. Backpressure: stop reading, fill the memory, then drain.
    //    The memory holds DEPTH events and each channel one more; hits
    //    after that find their channel busy and are dropped.
    wait (empty);
    reading = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    for (int i = 0; i < DEPTH / 2 + 8; i++) begin
      do t = longint'($time) + 4 * TCLK + $urandom_range(TCLK); while (near_edge(w_of(t)) || near_edge(w_of(t + 333)));
      if (i < (DEPTH + 2) / 2) begin
        predict(0, t);
        predict(1, t + 333);
      end else n_dead += 2;
      fork
        hit_at(0, t);
        hit_at(1, t + 333);
      join
    end
    repeat (20) @(posedge clk);
    check(full, "memory full while reading is stopped");
    reading = 1'b1;
    repeat (DEPTH + 50) @(posedge clk);

    // All predicted events must have come out.
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0,
          $sformatf("events left unread: %0d %0d", exp_q[0].size(), exp_q[1].size()));
    check(empty, "memory empty at the end");

    // Delay measurement of the coincidence pairs (section 2 events).
    for (int i = 0; i < npairs; i++) begin
      exp_t e0, e1;
      real meas, truth, tol;
      e0 = got[0][20 + i];
      e1 = got[1][20 + i];
      meas  = real'(e1.coarse - e0.coarse) * TCLK
            - (real'(lo[e1.fine] + hi[e1.fine]) / 2.0 - real'(lo[e0.fine] + hi[e0.fine]) / 2.0);
      truth = real'(e1.t_hit - e0.t_hit);
      tol   = real'(hi[e1.fine] - lo[e1.fine] + hi[e0.fine] - lo[e0.fine]) / 2.0 + 2.0;
      if (i < 3) $display("pair %0d: codes %0d %0d delay %0.1f measured %0.1f tol %0.1f", i, e0.fine, e1.fine, truth, meas, tol);
      check(meas - truth <= tol && truth - meas <= tol,
            $sformatf("pair %0d delay %0.1f measured %0.1f tol %0.1f", i, truth, meas, tol));
    end

    $display("single %0d same-period pairs %0d straddling pairs %0d full-stall cycles %0d dead-time hits %0d",
             n_single, n_same, n_straddle, n_full, n_dead);
    check(n_single > 0, "single-channel hits happened");
    check(n_same > 0, "same-period coincidences happened");
    check(n_straddle > 0, "edge-straddling coincidences happened");
    check(n_full > 0, "memory backpressure happened");
    check(n_dead > 0, "dead-time hit happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
