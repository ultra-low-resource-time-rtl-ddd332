// tb_tdc_code_density: the single- and two-channel code-density test.
//
// Hits arrive at times uniformly spread over the clock period, unrelated to
// the clock, as from a random source. Each code's share of the hits is then
// proportional to its bin width, which is how a TDC is calibrated and how its
// average bin size, DNL and INL are measured. The test runs the full design
// (tdc_top at its defaults), checks every event's code against the value
// predicted from its hit time (counter k reads ceil((W - k*TAP)/(2*RO_HALF)),
// W = time from hit to the next clock edge), builds the code histogram of
// channel 0 and reports active bins, average bin size, its spread and the
// largest |DNL| and |INL|. Checks: every code, the number of active codes
// equals the number of distinct codes the model predicts over one period,
// and the histogram holds every hit.
`timescale 1ps/1ps
module tb_tdc_code_density;
  import tdc_pkg::*;
  localparam int unsigned N = TDC_N_CNT, TAP = 100, RH = 415, TCLK = 2000;
  localparam int unsigned CMAX = (1 << TDC_CNT_W) - 1;
  localparam int unsigned HITS = 6000;   // per channel
  logic clk = 1'b0, rst = 1'b1, rd_en = 1'b0;
  logic [1:0] time_in = '0;
  tdc_event_t rd_data;
  logic rd_valid, empty, full;
  logic [10:0] level;
  int checks = 0, failures = 0;
  int hist [0:511];
  int exp_q [2][$];
  longint t_edge0;

  tdc_top dut (.*);

  always #(TCLK/2) clk = ~clk;
  always @(negedge clk) rd_en <= !empty;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
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
      for (int j = 0; j < 8; j++)
        if (w >= k * TAP + j * 2 * RH - 1 && w <= k * TAP + j * 2 * RH + 1) return 1'b1;
    return (w < 2) || (w > TCLK - 2);
  endfunction

  always @(posedge clk) if (!rst && rd_valid) begin
    int ch, e;
    ch = int'(rd_data.ch);
    if (ch > 1 || exp_q[ch].size() == 0) check(1'b0, "unexpected event");
    else begin
      e = exp_q[ch].pop_front();
      check(int'(rd_data.fine) == e, $sformatf("ch%0d fine %0d want %0d", ch, rd_data.fine, e));
      if (ch == 0) hist[rd_data.fine]++;
    end
  end

  initial begin
    #(64'd2000 * 64'd400000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w0, w1, n_codes, active, total, prev;
    real avg, sd, dnl, inl, max_dnl, max_inl;
    foreach (hist[c]) hist[c] = 0;
    repeat (3) @(posedge clk);
    #10 rst = 1'b0;
    repeat (4) @(posedge clk);
    t_edge0 = longint'($time);
    for (int i = 0; i < HITS; i++) begin
      // Both channels, independent hit times, W in [2, 1998] ps.
      do w0 = $urandom_range(TCLK - 1, 1); while (near_edge(w0));
      do w1 = $urandom_range(TCLK - 1, 1); while (near_edge(w1));
      @(posedge clk);
      exp_q[0].push_back(expect_fine(w0));
      exp_q[1].push_back(expect_fine(w1));
      fork
        begin #(TCLK - w0) time_in[0] = 1'b1; #300 time_in[0] = 1'b0; end
        begin #(TCLK - w1) time_in[1] = 1'b1; #300 time_in[1] = 1'b0; end
      join
      repeat (4) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "all events read");

    // Predicted number of distinct codes over one period.
    n_codes = 0; prev = -1;
    for (int w = 1; w < TCLK; w++) begin
      int f;
      f = expect_fine(w);
      if (f != prev) n_codes++;
      prev = f;
    end
    active = 0; total = 0;
    foreach (hist[c]) begin total += hist[c]; if (hist[c] > 0) active++; end
    check(total == HITS, $sformatf("histogram holds %0d of %0d hits", total, HITS));
    check(active == n_codes, $sformatf("active codes %0d want %0d", active, n_codes));

    avg = real'(TCLK) / real'(active);
    sd = 0.0; max_dnl = 0.0; max_inl = 0.0; inl = 0.0;
    foreach (hist[c]) if (hist[c] > 0) begin
      real bw;
      bw  = real'(hist[c]) / real'(total) * TCLK;
      sd += (bw - avg) * (bw - avg);
      dnl = bw / avg - 1.0;
      inl += dnl;
      if (dnl > max_dnl || -dnl > max_dnl) max_dnl = (dnl < 0) ? -dnl : dnl;
      if (inl > max_inl || -inl > max_inl) max_inl = (inl < 0) ? -inl : inl;
    end
    sd = $sqrt(sd / active);
    $display("channel 0: %0d hits, %0d active bins over %0d ps, average bin %0.1f ps, std %0.1f ps, max |DNL| %0.2f LSB, max |INL| %0.2f LSB",
             total, active, TCLK, avg, sd, max_dnl, max_inl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
