// tb_tdc_in_logic: self-checking test of the IN logic.
//
// A 2000 ps clock runs; hits arrive at chosen offsets inside a clock period.
// For each, the test measures when logic_out rose and fell and checks: rise at
// the hit itself, fall at the next clock edge, one hit pulse of exactly one
// cycle right after that edge. It also checks that a hit is ignored while arm
// is low and that a second hit in the same period does not cut the pulse.
`timescale 1ps/1ps
module tb_tdc_in_logic;
  localparam time TCLK = 2000;
  logic clk = 1'b0, rst = 1'b1, time_in = 1'b0, arm = 1'b0;
  logic logic_out, hit;
  int checks = 0, failures = 0;
  time t_rise, t_fall;
  int  hit_cycles;

  tdc_in_logic dut (.*);

  always #(TCLK/2) clk = ~clk;

  always @(posedge logic_out) t_rise = $time;
  always @(negedge logic_out) t_fall = $time;
  always @(posedge clk) if (hit) hit_cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Hit 'off' ps after a rising clock edge; expect a pulse to the next edge.
  task automatic one_hit(input time off);
    time t_hit, t_edge;
    @(posedge clk);
    t_edge = $time + TCLK;
    #(off);
    t_hit = $time;
    hit_cycles = 0;
    time_in = 1'b1;
    #(1);
    check(logic_out == 1'b1, "logic_out high after hit");
    #(300) time_in = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(t_rise == t_hit, $sformatf("rise at hit (off=%0t)", off));
    check(t_fall == t_edge, $sformatf("fall at next edge (off=%0t got %0t want %0t)", off, t_fall, t_edge));
    check(hit_cycles == 1, $sformatf("one hit pulse (got %0d)", hit_cycles));
  endtask

  initial begin
    #(TCLK * 2000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #100 rst = 1'b0;
    arm = 1'b1;
    one_hit(7);
    one_hit(1000);
    one_hit(1700);
    one_hit(1993);
    for (int i = 0; i < 20; i++) one_hit(time'(5 + $urandom_range(1990)));
    // Disarmed: no pulse, no hit.
    arm = 1'b0;
    @(posedge clk); #500;
    hit_cycles = 0;
    time_in = 1'b1; #1;
    check(logic_out == 1'b0, "no pulse while disarmed");
    #300 time_in = 1'b0;
    repeat (3) @(posedge clk); #1;
    check(hit_cycles == 0, "no hit while disarmed");
    arm = 1'b1;
    // Two hits in one period: the second must not end the pulse early.
    @(posedge clk); #200;
    time_in = 1'b1; #100 time_in = 1'b0; #400;
    time_in = 1'b1; #1;
    check(logic_out == 1'b1, "second hit keeps pulse open");
    #100 time_in = 1'b0;
    repeat (3) @(posedge clk); #1;
    check(logic_out == 1'b0, "pulse closed after edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
