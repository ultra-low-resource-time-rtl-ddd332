// tdc_enable_gen: the row of AND gates that makes the counter enables.
//
// Enable k (en[k-1]) = Logic out AND the (k-1)-times delayed Logic out, as in
// the design's schematic. Each enable therefore rises (k-1) delay elements
// after the hit but falls together with Logic out at the clock edge, so the
// enables get shorter from Enable 1 to Enable N and a counter only runs for
// the part of the pulse left after its delay.
//
// Interface: logic_out, taps[N-1:0] from the delay chain -> en[N-1:0].
// Purely combinational.
`timescale 1ps/1ps
module tdc_enable_gen #(
  parameter int unsigned N = 21
) (
  input  logic         logic_out,
  input  logic [N-1:0] taps,
  output logic [N-1:0] en
);
  always_comb begin
    for (int k = 0; k < N; k++) en[k] = logic_out & taps[k];
  end
endmodule
