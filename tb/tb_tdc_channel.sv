// tb_tdc_channel: end-to-end test of one LUT-based TDC channel.
//
// Hits are placed W ps before a rising clock edge (0 < W < 2000, the clock
// period). The expected fine code is computed here from the timing the
// channel is built on: counter k (k = 0..N-1) is enabled for W - k*TAP ps
// if that is positive, and its oscillator gives one edge at once and one more
// every 2*RO_HALF ps, so it reads ceil((W - k*TAP) / (2*RO_HALF)), capped at
// the counter's top value; the fine code is the sum over k. Hit times within
// 2 ps of a counter start or an oscillator edge are skipped, since there the
// code legitimately takes either value.
//
// Also checked: the coarse stamp is the number of the edge that ended the
// measurement, ev_valid rises exactly one clock after that edge, the event is
// held until ev_ready, and the code never decreases as W grows. The number of
// distinct codes over a fine sweep of W (the channel's n_codes) is reported.
`timescale 1ps/1ps
module tb_tdc_channel;
  import tdc_pkg::*;
  localparam int unsigned N = TDC_N_CNT, TAP = 100, RH = 415, TCLK = 2000;
  localparam int unsigned CMAX = (1 << TDC_CNT_W) - 1;
  logic clk = 1'b0, rst = 1'b1, time_in = 1'b0, ev_ready = 1'b0;
  logic [TDC_COARSE_W-1:0] coarse;
  logic ev_valid;
  logic [TDC_FINE_W-1:0] ev_fine;
  logic [TDC_COARSE_W-1:0] ev_coarse;
  int checks = 0, failures = 0;

  tdc_channel #(.N_CNT(N), .TAP_PS(TAP), .RO_HALF_PS(RH)) dut (.*);

  always #(TCLK/2) clk = ~clk;
  always @(posedge clk or posedge rst)
    if (rst) coarse <= '0; else coarse <= coarse + 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit near_edge(int w);
    for (int k = 0; k < N; k++)
      for (int j = 0; j < 8; j++) begin
        int e = k * TAP + j * 2 * RH;
        if (w >= e - 2 && w <= e + 2) return 1'b1;
      end
    return 1'b0;
  endfunction

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

  // Measure one hit W ps before a clock edge; return the fine code.
  task automatic measure(input int w, input int ready_delay, output int fine);
    int unsigned c_edge;
    @(posedge clk);
    #(TCLK - w);
    time_in = 1'b1;
    @(posedge clk);                   // edge E ends the measurement
    c_edge = coarse;                  // value after E (NBA settled below)
    #1 c_edge = coarse;
    time_in = 1'b0;
    check(!ev_valid, "no event before E+1");
    @(posedge clk); #1;               // E+1
    check(ev_valid, $sformatf("event valid one clock after E (w=%0d)", w));
    repeat (ready_delay) begin
      @(posedge clk); #1;
      check(ev_valid, "event held until taken");
    end
    fine = ev_fine;
    check(int'(ev_coarse) == int'(c_edge), $sformatf("coarse %0d want %0d", ev_coarse, c_edge));
    ev_ready = 1'b1;
    @(posedge clk); #1;
    ev_ready = 1'b0;
    check(!ev_valid, "event gone after transfer");
    @(posedge clk);
  endtask

  initial begin
    #(64'd2000 * 64'd200000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f, w, prev, n_codes;
    repeat (3) @(posedge clk);
    #10 rst = 1'b0;
    repeat (2) @(posedge clk);
    // Random hits.
    for (int i = 0; i < 150; i++) begin
      do w = 3 + $urandom_range(TCLK - 6); while (near_edge(w));
      measure(w, $urandom_range(2), f);
      check(f == expect_fine(w), $sformatf("w=%0d fine=%0d want %0d", w, f, expect_fine(w)));
    end
    // Sweep: monotonic code, count n_codes.
    prev = -1; n_codes = 0;
    for (w = 3; w < TCLK - 2; w += 4) begin
      if (near_edge(w)) continue;
      measure(w, 0, f);
      check(f == expect_fine(w), $sformatf("sweep w=%0d fine=%0d want %0d", w, f, expect_fine(w)));
      check(f >= prev, "code monotonic in W");
      if (f != prev) n_codes++;
      prev = f;
    end
    $display("distinct codes over one clock period: %0d, largest code %0d", n_codes, prev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
