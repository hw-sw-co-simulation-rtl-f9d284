// tb_pi_controller: self-checking testbench of the PI compensator.
//
// Two instances are checked against an integer model written in the
// testbench: the default PI (KP = 16/256, KI = 2/256) and a pure integral one
// (KP = 0, larger KI) as in the second case-study configuration. Inputs are random, with
// phases of large positive and negative error so that both the upper and the
// lower clamp, and the anti-windup of the integrator, are exercised. The
// outputs must change only on a sample strobe, one clock after it.
module tb_pi_controller;
  localparam int ADC_BITS = 8, DPWM_BITS = 10, DUTY_MAX = 999, FRAC = 8;

  logic clk = 1'b0, rst_n = 1'b0, sample = 1'b0;
  logic [ADC_BITS-1:0] vsens = '0, vref = '0;
  logic signed [ADC_BITS:0] err_a, err_b;
  logic [DPWM_BITS-1:0] duty_a, duty_b;
  logic sat_hi_a, sat_lo_a, sat_hi_b, sat_lo_b;
  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0;

  pi_controller #(.KP(16), .KI(2)) dut_a (
    .clk, .rst_n, .sample, .vsens, .vref,
    .err(err_a), .duty(duty_a), .sat_hi(sat_hi_a), .sat_lo(sat_lo_a));
  pi_controller #(.KP(0), .KI(40)) dut_b (
    .clk, .rst_n, .sample, .vsens, .vref,
    .err(err_b), .duty(duty_b), .sat_hi(sat_hi_b), .sat_lo(sat_lo_b));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // integer model of one update
  typedef struct { longint integ; int duty; int err; bit hi; bit lo; } pi_state_t;
  function automatic pi_state_t model(pi_state_t s, int kp, int ki, int vs, int vr);
    longint i_sum, u;
    pi_state_t n;
    n.err = vr - vs;
    i_sum = s.integ + longint'(ki) * n.err;
    if (i_sum < 0) i_sum = 0;
    if (i_sum > longint'(DUTY_MAX) * 256) i_sum = longint'(DUTY_MAX) * 256;
    n.integ = i_sum;
    u = i_sum + longint'(kp) * n.err;
    u = u >>> FRAC;
    n.hi = (u > DUTY_MAX);
    n.lo = (u < 0);
    n.duty = n.hi ? DUTY_MAX : n.lo ? 0 : int'(u);
    return n;
  endfunction

  pi_state_t sa, sb;
  int gap;

  initial begin
    sa = '{0, 0, 0, 0, 0};
    sb = '{0, 0, 0, 0, 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      // phases: random, large positive error, random, large negative error
      if (n % 1500 < 200)      begin vref = 8'($urandom_range(0, 255)); vsens = 8'($urandom_range(0, 255)); end
      else if (n % 1500 < 900) begin vref = 8'($urandom_range(200, 255)); vsens = 8'($urandom_range(0, 40)); end
      else if (n % 1500 < 1000) begin vref = 8'($urandom_range(100, 130)); vsens = 8'($urandom_range(100, 130)); end
      else                     begin vref = 8'($urandom_range(0, 40)); vsens = 8'($urandom_range(200, 255)); end
      sample = 1'b1;
      @(negedge clk);
      sample = 1'b0;
      sa = model(sa, 16, 2, int'(vsens), int'(vref));
      sb = model(sb, 0, 40, int'(vsens), int'(vref));
      check(int'(err_a) == sa.err && int'(err_b) == sb.err, "error e[n]");
      check(int'(duty_a) == sa.duty, "PI duty");
      check(int'(duty_b) == sb.duty, "I-only duty");
      check(sat_hi_a == sa.hi && sat_lo_a == sa.lo, "PI saturation flags");
      check(sat_hi_b == sb.hi && sat_lo_b == sb.lo, "I-only saturation flags");
      if (sa.hi || sb.hi) n_hi++;
      if (sa.lo || sb.lo) n_lo++;
      // outputs hold between samples while the inputs move
      gap = $urandom_range(0, 3);
      for (int g = 0; g < gap; g++) begin
        vref = 8'($urandom); vsens = 8'($urandom);
        @(negedge clk);
        check(int'(duty_a) == sa.duty && int'(err_a) == sa.err, "hold between samples");
      end
    end
    check(n_hi > 0, "upper clamp reached");
    check(n_lo > 0, "lower clamp reached");
    $display("upper clamp %0d times, lower clamp %0d times", n_hi, n_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
