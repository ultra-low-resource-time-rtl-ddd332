// tdc_delay_line: behavioural model of the LUT delay chain of one channel.
//
// Not synthesizable logic: on the FPGA each element is a LUT used as a buffer
// and its delay is what the design measures with. The model gives
// taps[k] = din delayed by k * TAP_PS picoseconds, so taps[0] is din itself
// (it feeds the AND gate of Enable 1 on both inputs) and taps[N_TAP-1] is the
// copy used for Enable N. The design's schematic draws one more delay element
// after the last tap, whose output goes nowhere; it has no function and is
// left out.
//
// N_TAP = 21 matches the 21 counters of the design. TAP_PS = 100 is this
// model's choice: with a 2000 ps clock period, Enable 21 opens only for a
// hit a full period (2000 ps) before the clock edge, so Enable N stays quiet
// as drawn in the enable timing diagram.
`timescale 1ps/1ps
module tdc_delay_line #(
  parameter int unsigned N_TAP  = 21,
  parameter int unsigned TAP_PS = 100
) (
  input  logic             din,
  output logic [N_TAP-1:0] taps
);
  assign taps[0] = din;

  for (genvar k = 1; k < N_TAP; k++) begin : g_tap
    assign #(TAP_PS) taps[k] = taps[k-1];
  end
endmodule
