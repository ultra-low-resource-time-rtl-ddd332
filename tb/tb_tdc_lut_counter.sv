// tb_tdc_lut_counter: checks one LUT-based counter.
//
// Gives bursts of n clock edges on ro and checks the count is n (held at the
// top value once it saturates), and that clr returns it to zero.
`timescale 1ps/1ps
module tb_tdc_lut_counter;
  localparam int unsigned W = 4;
  logic ro = 1'b0, clr = 1'b0;
  logic [W-1:0] cnt;
  int checks = 0, failures = 0;

  tdc_lut_counter #(.CNT_W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, want;
    #50 clr = 1'b1; #50 clr = 1'b0; #100;
    check(cnt == 0, "zero after clear");
    for (int i = 0; i < 60; i++) begin
      n = (i < 20) ? i : $urandom_range(25);
      for (int e = 0; e < n; e++) begin #200 ro = 1'b1; #200 ro = 1'b0; end
      #50;
      want = (n > (1 << W) - 1) ? (1 << W) - 1 : n;
      check(int'(cnt) == want, $sformatf("n=%0d cnt=%0d want=%0d", n, cnt, want));
      clr = 1'b1; #50 clr = 1'b0; #50;
      check(cnt == 0, "cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
