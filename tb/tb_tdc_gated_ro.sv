// tb_tdc_gated_ro: checks the gated ring oscillator model.
//
// Opens the enable for windows of random length W and counts rising edges of
// ro. A rising edge comes at once and then every 2*HALF_PS, so the count must
// be ceil(W / (2*HALF_PS)); ro must be low whenever en is low. Windows that
// end within 2 ps of an edge are skipped.
`timescale 1ps/1ps
module tb_tdc_gated_ro;
  localparam int unsigned H = 415;
  logic en = 1'b0, ro;
  int edges = 0, checks = 0, failures = 0;

  tdc_gated_ro #(.HALF_PS(H)) dut (.en, .ro);

  always @(posedge ro) edges++;
  always @(negedge en) begin
    #1;
    checks++;
    if (ro !== 1'b0) begin failures++; $display("FAIL ro high while disabled"); end
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, want;
    #1000;
    for (int i = 0; i < 200; i++) begin
      do w = 1 + $urandom_range(5000); while ((w % (2*H)) < 2 || (w % (2*H)) > 2*H - 2);
      want = (w + 2*H - 1) / (2*H);
      edges = 0;
      en = 1'b1;
      #(w) en = 1'b0;
      #(2*H + 100);
      checks++;
      if (edges != want) begin
        failures++;
        $display("FAIL w=%0d edges=%0d want=%0d", w, edges, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
