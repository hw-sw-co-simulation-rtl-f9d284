// tb_clock_gate: self-checking testbench of the glitch-free clock gate.
//
// The enable is driven from a register clocked by clk, as the sync controller
// drives it, with random run lengths from 0 to 20 cycles. The testbench counts
// gated edges and checks that each window of N enabled cycles yields exactly N
// gclk rising edges, that each gated edge follows a cycle with en high,
// that each gclk pulse is a full half period wide and that
// gclk is never high while clk is low.
module tb_clock_gate;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int edges = 0;
  realtime t_rise = -1.0;

  clock_gate dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // en as seen during the cycle before each rising edge
  logic en_mid = 1'b0;
  always @(negedge clk) en_mid <= en;
  always @(posedge gclk) begin
    if (rst_n) check(en_mid, "gclk edge only after a cycle with en high");
    edges++;
    t_rise = $realtime;
  end
  always @(negedge gclk) if (t_rise >= 0.0) check($realtime - t_rise == 5.0, "gclk pulse width");
  always @(negedge clk) #1 check(gclk == 1'b0, "gclk low while clk low");

  int n;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      n = (k < 3) ? k : $urandom_range(0, 20);
      edges = 0;
      @(posedge clk);
      en <= (n != 0);
      for (int c = 1; c < n; c++) @(posedge clk);
      if (n != 0) @(posedge clk);
      en <= 1'b0;
      repeat ($urandom_range(1, 4)) @(posedge clk);
      @(negedge clk);
      check(edges == n, "gated edge count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
