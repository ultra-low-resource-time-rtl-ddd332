// tb_tdc_delay_line: checks the delay chain model.
//
// Sends pulses of several widths into the chain and records, for every tap,
// the time of its rising and falling edge. Tap k must follow the input by
// exactly k * TAP_PS on both edges.
`timescale 1ps/1ps
module tb_tdc_delay_line;
  localparam int unsigned N = 21, D = 100;
  logic din = 1'b0;
  logic [N-1:0] taps;
  time rise [N], fall [N];
  int checks = 0, failures = 0;

  tdc_delay_line #(.N_TAP(N), .TAP_PS(D)) dut (.din, .taps);

  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(posedge taps[k]) rise[k] = $time;
    always @(negedge taps[k]) fall[k] = $time;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0, w;
    #1000;
    foreach (rise[k]) begin rise[k] = 0; fall[k] = 0; end
    for (int p = 0; p < 6; p++) begin
      w = (p == 0) ? 150 : time'(150 + $urandom_range(1800));
      t0 = $time;
      din = 1'b1;
      #(w) din = 1'b0;
      #(N * D + 500);
      for (int k = 0; k < N; k++) begin
        checks++;
        if (rise[k] != t0 + k * D || fall[k] != t0 + w + k * D) begin
          failures++;
          $display("FAIL tap %0d rise %0t fall %0t (t0 %0t w %0t)", k, rise[k], fall[k], t0, w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
