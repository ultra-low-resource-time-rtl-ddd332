// tdc_in_logic: the IN logic of one LUT-based TDC channel.
//
// Logic out goes high at the rising edge of time_in, with no clock involved,
// and goes low again at the next rising edge of clk, as the design's IN-logic
// timing diagram shows. Its width is therefore the time from the hit to the
// next clock edge, which the delay chain and counters downstream measure.
//
// How it is built (this design's own choice; only the behaviour is given):
// a toggle flip-flop a, clocked by time_in, and its copy b, clocked by clk.
// logic_out = a ^ b. A hit toggles a, which raises logic_out; the next clock
// edge copies a into b, which drops it. a only toggles while arm is high and
// no pulse is open (a == b), so a second hit in the same clock period, or a
// hit while the channel is still reading out, is ignored.
// hit is a one-cycle pulse, in the clock domain, in the cycle right after the
// edge that ended logic_out (b differs from its registered copy).
//
// Interface: clk, rst (asynchronous, active high), time_in, arm -> logic_out, hit.
// arm is a clk-domain signal used as enable of the time_in flop; the hit must
// not coincide with a clk edge to within the flop's setup window.
`timescale 1ps/1ps
module tdc_in_logic (
  input  logic clk,
  input  logic rst,
  input  logic time_in,
  input  logic arm,
  output logic logic_out,
  output logic hit
);
  logic a, b, b_q;

  always_ff @(posedge time_in or posedge rst) begin
    if (rst)                  a <= 1'b0;
    else if (arm && (a == b)) a <= ~a;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      b   <= 1'b0;
      b_q <= 1'b0;
    end else begin
      b   <= a;
      b_q <= b;
    end
  end

  assign logic_out = a ^ b;
  assign hit       = b ^ b_q;
endmodule
