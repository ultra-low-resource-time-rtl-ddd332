// tb_tdc_sum: checks the Σ block.
//
// Loads random counter values (including the all-maximum case) and checks
// that the register, one clock after load, holds their sum computed here, and
// that it holds its value while load is low.
`timescale 1ps/1ps
module tb_tdc_sum;
  import tdc_pkg::*;
  localparam int unsigned N = TDC_N_CNT, W = TDC_CNT_W;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0;
  logic [W-1:0] cnt [N];
  logic [TDC_FINE_W-1:0] sum;
  int checks = 0, failures = 0;

  tdc_sum dut (.*);

  always #1000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_sum, held;
    foreach (cnt[k]) cnt[k] = '0;
    repeat (2) @(posedge clk);
    #10 rst = 1'b0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ref_sum = 0;
      foreach (cnt[k]) begin
        cnt[k] = (i == 0) ? '1 : (i == 1) ? '0 : W'($urandom);
        ref_sum += cnt[k];
      end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      checks++;
      if (int'(sum) != ref_sum) begin failures++; $display("FAIL sum=%0d want %0d", sum, ref_sum); end
      held = ref_sum;
      foreach (cnt[k]) cnt[k] = W'($urandom);
      @(negedge clk);
      checks++;
      if (int'(sum) != held) begin failures++; $display("FAIL sum changed without load"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
