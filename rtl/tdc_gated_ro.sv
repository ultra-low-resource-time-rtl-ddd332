// tdc_gated_ro: behavioural model of the LUT ring oscillator that clocks one
// LUT-based counter.
//
// Not synthesizable logic: on the FPGA this is a loop of LUTs gated by the
// counter's enable, and its period is set by LUT and routing delays. While en
// is low, ro is low. When en rises, ro rises at once, so the counter reads 1
// as soon as it is enabled (the first column of each row of the design's
// counter table), then ro toggles every HALF_PS picoseconds. When en falls,
// ro falls at once and the oscillator stops.
//
// The period 2 * HALF_PS = 830 ps is this model's choice: it is about 8.3 of
// the 100 ps delay elements, close to the 8 to 9 steps between counter
// increments in the design's counter table.
`timescale 1ps/1ps
module tdc_gated_ro #(
  parameter int unsigned HALF_PS = 415
) (
  input  logic en,
  output logic ro
);
  logic phase;   // set by the process below at time 0

  assign ro = en & phase;

  always begin
    phase = 1'b1;
    wait (en);
    while (en) begin
      #(HALF_PS);
      if (en) phase = ~phase;
    end
  end
endmodule
