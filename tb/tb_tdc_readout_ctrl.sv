// tb_tdc_readout_ctrl: checks the readout sequence of one channel.
//
// For each hit pulse the test checks, cycle by cycle: sum_load together with
// hit, arm low from the hit until the event is taken, cnt_clr high for
// exactly the one cycle after the load, ev_valid held until ev_ready, and arm
// back the cycle after the transfer. The memory's ready is delayed by 0 to 3
// cycles to exercise the wait state.
`timescale 1ps/1ps
module tb_tdc_readout_ctrl;
  logic clk = 1'b0, rst = 1'b1, hit = 1'b0, ev_ready = 1'b0;
  logic arm, cnt_clr, sum_load, ev_valid;
  int checks = 0, failures = 0;

  tdc_readout_ctrl dut (.*);

  always #1000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int delay;
    repeat (2) @(posedge clk);
    #10 rst = 1'b0;
    @(negedge clk);
    check(!cnt_clr && !arm && !ev_valid, "init cycle after reset");
    @(negedge clk);
    check(cnt_clr && !arm && !ev_valid, "counter flush after reset");
    @(negedge clk);
    check(!cnt_clr && arm && !ev_valid, "idle after flush");
    for (int i = 0; i < 50; i++) begin
      delay = (i < 4) ? i : $urandom_range(3);
      repeat ($urandom_range(3)) @(negedge clk);
      check(arm, "armed while idle");
      hit = 1'b1;
      #1;
      check(sum_load && !arm, "load with hit, arm low");
      @(negedge clk);
      hit = 1'b0;
      check(cnt_clr && ev_valid && !arm && !sum_load, "clear cycle");
      for (int d = 0; d < delay; d++) begin
        if (d > 0) check(!cnt_clr, "clear lasts one cycle");
        check(ev_valid && !arm, "valid held while not ready");
        @(negedge clk);
      end
      ev_ready = 1'b1;
      #1;
      check(ev_valid, "valid at transfer");
      @(negedge clk);
      ev_ready = 1'b0;
      check(!ev_valid && arm && !cnt_clr, "re-armed after transfer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
