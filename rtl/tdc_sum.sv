// tdc_sum: the Σ block of a TDC channel.
//
// Adds the values of all N LUT-based counters and registers the total as the
// channel's fine time code. Because the counters start one delay element
// apart and each counts oscillator periods, the total rises by one at every
// counter start and every oscillator edge, so it grows monotonically with the
// time between the hit and the clock edge: the running column total of the
// design's counter table, plotted against time.
//
// The adder is written as a plain sum over the counters; the tool may build
// any adder tree. The register loads when load is high and holds otherwise.
//
// Interface: clk, rst (async, active high), load, cnt[N] -> sum.
// Timing: sum holds the total of the cycle in which load was high, one clock
// edge later.
`timescale 1ps/1ps
module tdc_sum
  import tdc_pkg::*;
#(
  parameter int unsigned N      = TDC_N_CNT,
  parameter int unsigned CNT_W  = TDC_CNT_W,
  parameter int unsigned SUM_W  = TDC_FINE_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [CNT_W-1:0] cnt [N],
  output logic [SUM_W-1:0] sum
);
  logic [SUM_W-1:0] total;

  always_comb begin
    total = '0;
    for (int k = 0; k < N; k++) total += SUM_W'(cnt[k]);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       sum <= '0;
    else if (load) sum <= total;
  end

  // The total of N saturated counters must fit in SUM_W bits.
  initial assert (N * ((1 << CNT_W) - 1) < (1 << SUM_W))
    else $error("tdc_sum: SUM_W too small for N counters of CNT_W bits");
endmodule
