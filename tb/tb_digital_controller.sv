// tb_digital_controller: self-checking testbench of the buck converter's
// digital controller (summing node, PI compensator and DPWM) at its default
// size: 8-bit ADC codes, 1000-count 10-bit DPWM, KP = 16/256, KI = 2/256.
//
// A cycle-level model in the testbench (integer PI arithmetic, reference
// counter) predicts the counter, the applied duty, e[n], the saturation flag
// and the gate signals on every clock. The sensed voltage and the reference
// change at random instants inside periods; the model fixes the rule that they
// are sampled on count 0, that the new duty applies from the next period, and
// that the switching period is 1000 clocks (100 kHz at 100 MHz).
module tb_digital_controller;
  localparam int ADC_BITS = 8, DPWM_BITS = 10, PERIOD = 1000, KP = 16, KI = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [ADC_BITS-1:0] vsens = '0, vref = '0;
  logic d_hs, d_ls, sat;
  logic [DPWM_BITS-1:0] duty, pwm_cnt;
  logic signed [ADC_BITS:0] err;
  int checks = 0, failures = 0;

  digital_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // model state
  longint m_integ = 0;
  int m_cmd = 0, m_err = 0, m_cnt = 0, m_dutyq = 0, m_on = 0, n_sat = 0, n_periods = 0;
  bit m_sat = 0;

  task automatic model_edge();
    longint i_sum, u;
    int old_cmd = m_cmd;
    if (m_cnt == 0) begin
      m_err = int'(vref) - int'(vsens);
      i_sum = m_integ + longint'(KI) * m_err;
      if (i_sum < 0) i_sum = 0;
      if (i_sum > longint'(PERIOD - 1) * 256) i_sum = longint'(PERIOD - 1) * 256;
      m_integ = i_sum;
      u = (i_sum + longint'(KP) * m_err) >>> 8;
      m_sat = (u < 0) || (u > PERIOD - 1);
      m_cmd = (u < 0) ? 0 : (u > PERIOD - 1) ? PERIOD - 1 : int'(u);
    end
    if (m_cnt == PERIOD - 1) begin
      m_cnt = 0;
      m_dutyq = old_cmd;
    end else m_cnt++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 120 * PERIOD; c++) begin
      @(posedge clk);
      model_edge();
      @(negedge clk);
      check(int'(pwm_cnt) == m_cnt, "DPWM counter");
      check(int'(duty) == m_dutyq, "applied duty");
      check(int'(err) == m_err, "error e[n]");
      check(sat == m_sat, "saturation flag");
      check(d_hs == (m_cnt < m_dutyq) && d_ls == !d_hs, "gate signals");
      if (m_sat) n_sat++;
      if (m_cnt == 0) n_periods++;
      // disturb the inputs now and then, anywhere in the period
      if ($urandom_range(0, 999) < 3) begin
        vref  = 8'($urandom_range(100, 140));
        vsens = ($urandom_range(0, 9) == 0) ? 8'($urandom_range(150, 255)) : 8'($urandom_range(60, 130));
      end
    end
    check(n_periods == 120, "one sample per 1000 clocks");
    check(n_sat > 0, "saturation exercised");
    $display("periods %0d, saturated cycles %0d", n_periods, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
