// tb_tdc_memory: checks the shared event memory.
//
// Three channels offer events at random, holding each until it is taken, as
// a channel does. A reference model, written here without reference to the
// design, decides at every clock edge which channel must be granted
// (round-robin after the last one served, nothing when full), keeps the
// expected contents in a queue and predicts every word read back. The test
// first fills the memory with all channels requesting every cycle (full
// stall and three-way contention), then runs random traffic and reads, then
// drains it.
`timescale 1ps/1ps
module tb_tdc_memory;
  import tdc_pkg::*;
  localparam int unsigned NC = 3, DEPTH = 16;
  logic clk = 1'b0, rst = 1'b1, rd_en = 1'b0, burst = 1'b0;
  logic [NC-1:0] ch_valid, ch_ready;
  logic [TDC_FINE_W-1:0]   ch_fine   [NC];
  logic [TDC_COARSE_W-1:0] ch_coarse [NC];
  tdc_event_t rd_data;
  logic rd_valid, empty, full;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0, n_full = 0, n_rr = 0, n_rd = 0;
  tdc_event_t q [$];
  tdc_event_t expect_q [$];
  int last = NC - 1;

  tdc_memory #(.NUM_CH(NC), .DEPTH(DEPTH)) dut (.*);

  always #1000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Reference model, evaluated with the values just before each edge.
  always @(posedge clk) if (!rst) begin
    int pick, cnt;
    cnt  = q.size();
    pick = -1;
    for (int i = 1; i <= NC; i++)
      if (pick < 0 && ch_valid[(last + i) % NC]) pick = (last + i) % NC;
    check(int'(level) == cnt, $sformatf("level %0d want %0d", level, cnt));
    check(full == (cnt == DEPTH) && empty == (cnt == 0), "full/empty flags");
    if (rd_valid) begin
      check(expect_q.size() > 0 && rd_data == expect_q[0], $sformatf("read %h", rd_data));
      if (expect_q.size() > 0) void'(expect_q.pop_front());
      n_rd++;
    end
    if (rd_en && cnt > 0) expect_q.push_back(q.pop_front());
    if (cnt == DEPTH) begin
      check(ch_ready == '0, "nothing accepted when full");
      if (ch_valid != '0) n_full++;
    end else if (pick >= 0) begin
      check(ch_ready == NC'(1 << pick), $sformatf("grant %b want ch %0d", ch_ready, pick));
      if (&ch_valid) n_rr++;
      q.push_back('{ch: TDC_CH_W'(pick), coarse: ch_coarse[pick], fine: ch_fine[pick]});
      last = pick;
    end else check(ch_ready == '0, "no grant without request");
  end

  // Channel drivers: hold each event until it is taken.
  for (genvar c = 0; c < NC; c++) begin : g_src
    always @(posedge clk) begin
      if (rst) ch_valid[c] <= 1'b0;
      else if (ch_valid[c] && !ch_ready[c]) ch_valid[c] <= 1'b1;
      else if (burst || $urandom_range(2) == 0) begin
        ch_valid[c]  <= 1'b1;
        ch_fine[c]   <= TDC_FINE_W'($urandom);
        ch_coarse[c] <= TDC_COARSE_W'($urandom);
      end else ch_valid[c] <= 1'b0;
    end
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ch_fine[c]) begin ch_fine[c] = '0; ch_coarse[c] = '0; end
    repeat (2) @(posedge clk);
    #10 rst = 1'b0;
    burst = 1'b1;
    repeat (DEPTH + 8) @(negedge clk);
    burst = 1'b0;
    repeat (400) begin
      @(negedge clk);
      rd_en = ($urandom_range(1) == 0);
    end
    rd_en = 1'b1;
    repeat (DEPTH + 40) @(negedge clk);
    rd_en = 1'b0;
    check(n_full > 0, "memory reached full with requests pending");
    check(n_rr > 0, "all channels requested at once");
    check(n_rd > DEPTH, "words read back");
    $display("full-stall cycles %0d, three-way contention cycles %0d, reads %0d", n_full, n_rr, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
