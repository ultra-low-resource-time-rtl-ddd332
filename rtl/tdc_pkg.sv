// tdc_pkg: widths and the event word shared by the LUT-based TDC.
//
// One channel sums N_CNT counters of CNT_W bits into a fine code of FINE_W
// bits. TDC_N_CNT = 21 follows the 21 LUT-based counters of the design's
// counter table; the 4-bit counter width, the 16-bit coarse cycle count and
// the 4-bit channel field are this design's own choices. FINE_W is chosen so
// that 21 saturated 4-bit counters (21 * 15 = 315) always fit.
`timescale 1ps/1ps
package tdc_pkg;
  localparam int unsigned TDC_N_CNT    = 21;
  localparam int unsigned TDC_CNT_W    = 4;
  localparam int unsigned TDC_FINE_W   = 9;
  localparam int unsigned TDC_COARSE_W = 16;
  localparam int unsigned TDC_CH_W     = 4;

  // One measured hit as stored in the event memory.
  //   ch     : channel that took the hit
  //   coarse : index of the clock edge that ended the measurement pulse
  //   fine   : sum of all counters, grows with the time from the hit to that edge
  typedef struct packed {
    logic [TDC_CH_W-1:0]     ch;
    logic [TDC_COARSE_W-1:0] coarse;
    logic [TDC_FINE_W-1:0]   fine;
  } tdc_event_t;
endpackage
