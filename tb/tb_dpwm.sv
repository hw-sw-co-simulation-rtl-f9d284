// tb_dpwm: self-checking testbench of the DPWM at its default size (10 bits,
// 1000 counts per period).
//
// A reference counter in the testbench predicts the gate level on every clock;
// the duty command is changed at random points inside periods, and the check
// verifies that a new command only takes effect at the next period boundary,
// that d_ls is the complement of d_hs, that sample marks count 0 and that the
// period is exactly PERIOD clocks. Duty 0 (always off) and a command above the
// period (always on) are included.
module tb_dpwm;
  localparam int unsigned DPWM_BITS = 10;
  localparam int unsigned PERIOD    = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [DPWM_BITS-1:0] duty_in, cnt, duty_q;
  logic d_hs, d_ls, sample;
  int checks = 0, failures = 0;

  dpwm dut (.*);

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

  int ref_cnt, ref_duty, on_count, last_sample, period_len;
  int duties[6] = '{0, 300, 1023, 999, 1, 500};

  initial begin
    duty_in = 10'd250;
    ref_cnt = 1; ref_duty = 0; last_sample = -1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk) #1;
    on_count = 0;
    for (int p = 0; p < 14; p++) begin
      for (int c = 0; c < PERIOD; c++) begin
        @(negedge clk);
        check(cnt == DPWM_BITS'(ref_cnt), "counter");
        check(d_hs == (ref_cnt < ref_duty), "d_hs level");
        check(d_ls == !d_hs, "d_ls complement");
        check(sample == (ref_cnt == 0), "sample strobe");
        check(duty_q == DPWM_BITS'(ref_duty), "applied duty");
        if (ref_cnt == 0) on_count = 0;
        if (d_hs) on_count++;
        if (ref_cnt == PERIOD - 1)
          check(on_count == ((ref_duty > PERIOD) ? PERIOD : ref_duty), "on-time per period");
        if (sample) begin
          if (last_sample >= 0) check(period_len == PERIOD, "period length");
          last_sample = 1;
          period_len  = 0;
        end
        period_len++;
        // change the command somewhere inside the period
        if (c == 123 + 37 * p) duty_in = DPWM_BITS'(p < 6 ? duties[p] : $urandom_range(0, 1023));
        @(posedge clk);
        #1;
        if (ref_cnt == PERIOD - 1) begin
          ref_cnt  = 0;
          ref_duty = duty_in;
        end else ref_cnt++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
