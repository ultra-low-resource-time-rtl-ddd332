// tb_tdc_enable_gen: checks the AND row that makes Enable 1..N.
//
// Drives random logic_out / tap patterns and compares every enable with the
// AND of logic_out and its tap, worked out bit by bit in the testbench.
`timescale 1ps/1ps
module tb_tdc_enable_gen;
  localparam int unsigned N = 21;
  logic logic_out;
  logic [N-1:0] taps, en;
  int checks = 0, failures = 0;

  tdc_enable_gen #(.N(N)) dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic_out = (i < 4) ? i[0] : 1'($urandom);
      taps      = (i < 4) ? (i[1] ? '1 : '0) : N'($urandom);
      #10;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (en[k] !== (logic_out && taps[k])) begin
          failures++;
          $display("FAIL en[%0d]=%b lo=%b tap=%b", k, en[k], logic_out, taps[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
