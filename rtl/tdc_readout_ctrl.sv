// tdc_readout_ctrl: the clock-domain sequencer of one TDC channel.
//
// The design shows counters, a Σ and a memory but not how a hit is read out;
// this controller is this design's own, kept as short as the circuit allows:
//
//   edge E   : the clock edge ends Logic out, the enables fall, the
//              oscillators stop. hit is high in the cycle after E.
//   edge E+1 : the counters have had a whole period to settle; sum_load is
//              high so the Σ register takes their total. State -> CLEAR.
//   CLEAR    : cnt_clr high for one cycle clears the counters; ev_valid is
//              high, offering the event to the memory.
//   SEND     : entered only if the memory did not accept in CLEAR; ev_valid
//              stays high until ev_ready.
//   IDLE     : arm high, the IN logic accepts the next hit.
//
// After reset the controller first spends one cycle in INIT and one in
// FLUSH, where cnt_clr pulses high. The counters are clocked only by their
// oscillators, so their asynchronous clear needs a real rising edge; holding
// cnt_clr low during reset and raising it afterwards gives one whatever the
// power-up state. A hit the IN logic reports during INIT or FLUSH comes from
// its power-up state, not from time_in, and is ignored.
//
// Dead time after a hit is therefore two clock cycles when the memory accepts
// at once. ev_valid/ev_ready is a valid/ready handshake: a transfer happens
// in a cycle where both are high; once raised, ev_valid stays high until then.
//
// Interface: clk, rst (async, active high), hit, ev_ready ->
//            arm, cnt_clr, sum_load, ev_valid.
`timescale 1ps/1ps
module tdc_readout_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic hit,
  input  logic ev_ready,
  output logic arm,
  output logic cnt_clr,
  output logic sum_load,
  output logic ev_valid
);
  typedef enum logic [2:0] {S_INIT, S_FLUSH, S_IDLE, S_CLEAR, S_SEND} state_t;
  state_t state;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state   <= S_INIT;
      cnt_clr <= 1'b0;
    end else begin
      cnt_clr <= 1'b0;
      unique case (state)
        S_INIT:  begin
                   state   <= S_FLUSH;
                   cnt_clr <= 1'b1;
                 end
        S_FLUSH: state <= S_IDLE;
        S_IDLE:  if (hit) begin
                   state   <= S_CLEAR;
                   cnt_clr <= 1'b1;
                 end
        S_CLEAR: state <= ev_ready ? S_IDLE : S_SEND;
        S_SEND:  if (ev_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign sum_load = (state == S_IDLE) && hit;
  assign ev_valid = (state == S_CLEAR) || (state == S_SEND);
  assign arm      = (state == S_IDLE) && !hit;

  // A hit can only be reported while idle (arm was low otherwise), or right
  // after reset from a power-up state of the IN logic; INIT and FLUSH ignore
  // it and the flush clears whatever the counters took.
  a_hit_idle: assert property (@(posedge clk) disable iff (rst)
                               hit |-> state inside {S_INIT, S_FLUSH, S_IDLE});
  // valid/ready: once offered, the event stays offered until taken.
  a_valid_hold: assert property (@(posedge clk) disable iff (rst)
                                 ev_valid && !ev_ready |=> ev_valid);
endmodule
