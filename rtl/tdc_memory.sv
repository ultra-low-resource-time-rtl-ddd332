// tdc_memory: the event memory shared by all TDC channels.
//
// The design's schematic shows every channel writing into one memory and
// says no more; the organisation here is this design's own. Each channel
// offers an event on a valid/ready port. A round-robin arbiter picks one
// offering channel per clock, starting after the channel served last, and
// the chosen event, tagged with its channel number, is written into a FIFO
// of DEPTH words. When the FIFO is full no channel is served: the channels
// hold their events (and take no new hits) until space frees up, so no event
// is lost inside the TDC.
//
// Read side: rd_en pops the oldest word when the FIFO is not empty; rd_data
// and rd_valid appear one clock later. level counts the words held.
// A write and a read may happen in the same cycle.
//
// Interface: clk, rst (async, active high), ch_valid/ch_ready/ch_fine/
//   ch_coarse per channel; rd_en -> rd_data, rd_valid; empty, full, level.
`timescale 1ps/1ps
module tdc_memory
  import tdc_pkg::*;
#(
  parameter int unsigned NUM_CH = 2,
  parameter int unsigned DEPTH  = 1024,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned CW    = (NUM_CH > 1) ? $clog2(NUM_CH) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [NUM_CH-1:0]       ch_valid,
  output logic [NUM_CH-1:0]       ch_ready,
  input  logic [TDC_FINE_W-1:0]   ch_fine   [NUM_CH],
  input  logic [TDC_COARSE_W-1:0] ch_coarse [NUM_CH],
  input  logic                    rd_en,
  output tdc_event_t              rd_data,
  output logic                    rd_valid,
  output logic                    empty,
  output logic                    full,
  output logic [AW:0]             level
);
  tdc_event_t mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0]               last;   // channel served last
  logic [CW-1:0]               pick;
  logic                        any;
  logic                        wr, rd;

  assign empty = (level == 0);
  assign full  = (level == (AW+1)'(DEPTH));

  // Round-robin choice: the first offering channel after 'last'.
  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int i = 1; i <= NUM_CH; i++) begin
      logic [CW-1:0] c;
      c = CW'((int'(last) + i) % NUM_CH);
      if (!any && ch_valid[c]) begin
        pick = c;
        any  = 1'b1;
      end
    end
  end

  assign wr = any && !full;
  assign rd = rd_en && !empty;

  always_comb begin
    ch_ready = '0;
    if (wr) ch_ready[pick] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wr_ptr] <= '{ch:     TDC_CH_W'(pick),
                             coarse: ch_coarse[pick],
                             fine:   ch_fine[pick]};
    if (rd) rd_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      level    <= '0;
      last     <= CW'(NUM_CH - 1);
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd;
      if (wr) begin
        wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
        last   <= pick;
      end
      if (rd) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      level <= level + (AW+1)'(wr) - (AW+1)'(rd);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) full |-> !wr);
  a_one_grant:   assert property (@(posedge clk) disable iff (rst) $onehot0(ch_ready));
  a_grant_valid: assert property (@(posedge clk) disable iff (rst) (ch_ready & ~ch_valid) == '0);
endmodule
