// tdc_lut_counter: one LUT-based counter of a TDC channel.
//
// Counts the rising edges of its gated ring oscillator (ro), i.e. how long its
// enable stayed open, in oscillator periods. The count saturates at all ones
// instead of wrapping, so a too-long enable reads as the largest value rather
// than a small one. clr, driven from the clock domain between hits, clears it
// asynchronously; the oscillator is stopped then, so no edge races the clear.
//
// The design gives the counter's job and its place (CNT 1..N in the
// schematic); the 4-bit width, saturation and asynchronous clear are this
// design's choices. With an 830 ps oscillator and a 2000 ps clock a counter
// reaches at most 3.
//
// Interface: ro (count clock), clr (async, active high) -> cnt[CNT_W-1:0].
// cnt is stable from the falling edge of the enable until clr.
`timescale 1ps/1ps
module tdc_lut_counter #(
  parameter int unsigned CNT_W = 4
) (
  input  logic             ro,
  input  logic             clr,
  output logic [CNT_W-1:0] cnt
);
  always_ff @(posedge ro or posedge clr) begin
    if (clr)           cnt <= '0;
    else if (~&cnt)    cnt <= cnt + 1'b1;
  end
endmodule
