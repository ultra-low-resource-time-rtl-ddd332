// tdc_top: a multi-channel LUT-based time-to-digital converter.
//
// NUM_CH independent TDC channels share one clock. Each measures the time
// from a rising edge on its time_in input to the next clock edge with a
// delay chain of LUTs that staggers 21 gated counters, and reports the sum of
// the counters as a fine code. A free-running coarse counter numbers the
// clock edges; each event is stored with that number and its channel in one
// event memory, which the user reads as a FIFO. Two channels fed from the
// same source through paths of different length measure the path difference
// as the difference of their timestamps.
//
// The channels, counters and memory are the design's; the coarse counter,
// the memory organisation and all widths and depths not stated are this
// design's own choices (see tdc_pkg and the block headers).
//
// Interface: clk, rst (async, active high), time_in[NUM_CH];
//   rd_en -> rd_data (tdc_event_t), rd_valid, empty, full, level.
// Timing: an event enters the memory two to three clocks after the clock
// edge that ends its measurement, later if the memory is full or another
// channel is served first.
`timescale 1ps/1ps
module tdc_top
  import tdc_pkg::*;
#(
  parameter int unsigned NUM_CH     = 2,
  parameter int unsigned N_CNT      = TDC_N_CNT,
  parameter int unsigned CNT_W      = TDC_CNT_W,
  parameter int unsigned TAP_PS     = 100,
  parameter int unsigned RO_HALF_PS = 415,
  parameter int unsigned MEM_DEPTH  = 1024
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [NUM_CH-1:0]            time_in,
  input  logic                         rd_en,
  output tdc_event_t                   rd_data,
  output logic                         rd_valid,
  output logic                         empty,
  output logic                         full,
  output logic [$clog2(MEM_DEPTH):0]   level
);
  logic [TDC_COARSE_W-1:0] coarse;
  logic [NUM_CH-1:0]       ev_valid, ev_ready;
  logic [TDC_FINE_W-1:0]   ev_fine   [NUM_CH];
  logic [TDC_COARSE_W-1:0] ev_coarse [NUM_CH];

  // Coarse counter: number of the current clock period.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) coarse <= '0;
    else     coarse <= coarse + 1'b1;
  end

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    tdc_channel #(
      .N_CNT(N_CNT), .CNT_W(CNT_W), .TAP_PS(TAP_PS), .RO_HALF_PS(RO_HALF_PS)
    ) u_ch (
      .clk, .rst, .time_in(time_in[c]), .coarse,
      .ev_valid(ev_valid[c]), .ev_ready(ev_ready[c]),
      .ev_fine(ev_fine[c]), .ev_coarse(ev_coarse[c])
    );
  end

  tdc_memory #(.NUM_CH(NUM_CH), .DEPTH(MEM_DEPTH)) u_mem (
    .clk, .rst,
    .ch_valid(ev_valid), .ch_ready(ev_ready),
    .ch_fine(ev_fine), .ch_coarse(ev_coarse),
    .rd_en, .rd_data, .rd_valid, .empty, .full, .level
  );
endmodule
