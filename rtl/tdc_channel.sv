// tdc_channel: one complete LUT-based TDC channel.
//
// A hit on time_in opens Logic out, which stays high until the next clock
// edge. A chain of delay elements makes N copies of it, each one element
// later than the one before, and N AND gates turn them into Enable 1..N:
// enables that start one element apart and all end at the clock edge.
// Each enable gates its own LUT ring oscillator, whose edges a LUT-based
// counter counts. The Σ block adds all N counts; the total is the fine code,
// larger the earlier the hit came before the clock edge. This is the
// structure of the design's schematic; the delay chain and oscillators are
// behavioural models of LUT delays.
//
// After the edge that ended Logic out, the readout controller loads the sum
// and latches the coarse cycle count (one edge later), clears the counters
// and offers {coarse, fine} on a valid/ready port. The channel takes no new
// hit until the event has been taken (this sequencing is this design's own).
//
// Interface: clk, rst (async, active high), time_in, coarse (cycle count
//   from the top) -> ev_valid, ev_fine, ev_coarse; ev_ready back.
// Time from hit to a hit = ev_coarse * T_clk - f(ev_fine), where f is the
// code-to-time calibration obtained by a code-density test.
`timescale 1ps/1ps
module tdc_channel
  import tdc_pkg::*;
#(
  parameter int unsigned N_CNT      = TDC_N_CNT,
  parameter int unsigned CNT_W      = TDC_CNT_W,
  parameter int unsigned TAP_PS     = 100,
  parameter int unsigned RO_HALF_PS = 415
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    time_in,
  input  logic [TDC_COARSE_W-1:0] coarse,
  output logic                    ev_valid,
  input  logic                    ev_ready,
  output logic [TDC_FINE_W-1:0]   ev_fine,
  output logic [TDC_COARSE_W-1:0] ev_coarse
);
  logic             logic_out, hit, arm, cnt_clr, sum_load;
  logic [N_CNT-1:0] taps, en, ro;
  logic [CNT_W-1:0] cnt [N_CNT];

  tdc_in_logic u_in (
    .clk, .rst, .time_in, .arm, .logic_out, .hit
  );

  tdc_delay_line #(.N_TAP(N_CNT), .TAP_PS(TAP_PS)) u_dly (
    .din(logic_out), .taps
  );

  tdc_enable_gen #(.N(N_CNT)) u_and (
    .logic_out, .taps, .en
  );

  for (genvar k = 0; k < N_CNT; k++) begin : g_cnt
    tdc_gated_ro #(.HALF_PS(RO_HALF_PS)) u_ro (
      .en(en[k]), .ro(ro[k])
    );
    tdc_lut_counter #(.CNT_W(CNT_W)) u_cnt (
      .ro(ro[k]), .clr(cnt_clr), .cnt(cnt[k])
    );
  end

  tdc_sum #(.N(N_CNT), .CNT_W(CNT_W), .SUM_W(TDC_FINE_W)) u_sum (
    .clk, .rst, .load(sum_load), .cnt, .sum(ev_fine)
  );

  tdc_readout_ctrl u_ctrl (
    .clk, .rst, .hit, .ev_ready, .arm, .cnt_clr, .sum_load, .ev_valid
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst)           ev_coarse <= '0;
    else if (sum_load) ev_coarse <= coarse;
  end
endmodule
