// tb_tdc_counter_table: the per-counter staircase of one channel.
//
// A hit arrives just after a clock edge, so the measurement pulse lasts
// almost a whole period. Every delay step (100 ps) the test reads all 21
// counters of the channel and prints them as a table, one row per counter
// and one column per step, like the counter table the design is explained
// with: counter k starts k steps after counter 1, reads 1 as soon as it
// starts, and then steps up once per oscillator period. Each entry is checked
// against ceil((t - k*TAP) / (2*RO_HALF)), where t is the time since the hit,
// and each column total against the running fine code it implies. The code
// the Σ register captures at the end must equal the last column's total.
`timescale 1ps/1ps
module tb_tdc_counter_table;
  import tdc_pkg::*;
  localparam int unsigned N = TDC_N_CNT, TAP = 100, RH = 415, TCLK = 2000;
  localparam int unsigned COLS = 20;
  logic clk = 1'b0, rst = 1'b1, time_in = 1'b0, ev_ready = 1'b0;
  logic [TDC_COARSE_W-1:0] coarse = '0;
  logic ev_valid;
  logic [TDC_FINE_W-1:0] ev_fine;
  logic [TDC_COARSE_W-1:0] ev_coarse;
  int checks = 0, failures = 0;

  tdc_channel #(.N_CNT(N), .TAP_PS(TAP), .RO_HALF_PS(RH)) dut (.*);

  always #(TCLK/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #(64'd2000 * 64'd1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tab [N][COLS];
    int colsum [COLS];
    int t, want, last_total;
    string line;
    repeat (3) @(posedge clk);
    #10 rst = 1'b0;
    repeat (3) @(posedge clk);
    #5 time_in = 1'b1;                        // hit 5 ps after the edge
    for (int c = 0; c < COLS; c++) begin
      #(c == 0 ? 50 : TAP);                  // sample mid-step: t = c*TAP + 50
      t = c * TAP + 50;
      colsum[c] = 0;
      for (int k = 0; k < N; k++) begin
        tab[k][c] = int'(dut.cnt[k]);
        want = (t > k * TAP) ? (t - k * TAP + 2 * RH - 1) / (2 * RH) : 0;
        check(tab[k][c] == want, $sformatf("counter %0d step %0d: %0d want %0d", k + 1, c, tab[k][c], want));
        colsum[c] += tab[k][c];
      end
      if (c > 0) check(colsum[c] >= colsum[c-1], "column totals never fall");
    end
    time_in = 1'b0;
    last_total = colsum[COLS-1];
    for (int k = 0; k < N; k++) begin
      line = $sformatf("LUT-based counter %2d", k + 1);
      for (int c = 0; c < COLS; c++)
        line = {line, (tab[k][c] == 0) ? "  ." : $sformatf("%3d", tab[k][c])};
      $display("%s", line);
    end
    line = "column total        ";
    for (int c = 0; c < COLS; c++) line = {line, $sformatf("%3d", colsum[c])};
    $display("%s", line);
    // The pulse ends at the next edge (W = 1995 ps); the captured code then
    // includes the edges between the last sample (1950 ps) and 1995 ps.
    @(posedge ev_valid); #1;
    want = 0;
    for (int k = 0; k < N; k++)
      if (1995 > k * TAP) want += (1995 - k * TAP + 2 * RH - 1) / (2 * RH);
    check(int'(ev_fine) == want, $sformatf("captured code %0d want %0d", ev_fine, want));
    check(int'(ev_fine) >= last_total, "captured code not below the last column");
    ev_ready = 1'b1;
    @(posedge clk); #1 ev_ready = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
