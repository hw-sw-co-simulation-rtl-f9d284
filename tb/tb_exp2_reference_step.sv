// tb_exp2_reference_step: hardware-in-the-loop run of the second case-study configuration,
// a reference step on a 6.1 V to 1.65 V buck converter (1 uH, 377 uF, 0.4 ohm
// load, 5 / 2.5 mOhm switches, 390.625 kHz) under integral-only control.
//
// The emulator IP is built with the second case-study configuration's controller: a 9-bit
// DPWM of 512 counts clocked at 200 MHz (so the controller clock period, and
// the power-stage integration step, is 5 ns), KP = 0 and KI = 4/256. The
// processor model is the same as in tb_hil_emulator_ip: Runge-Kutta 2 power
// stage (here with the switch on-resistances), 8-bit ADC of the output
// divided by two (100k/100k), one synchronization step per 128 controller
// cycles. After 4 ms at Vref = 1.65 V the reference steps to 1.86 V. Every
// output buffer is checked against a cycle-level controller model; the output
// must settle within 2 % of both targets. The 10 %-90 % rise time of the step
// is printed.
module tb_exp2_reference_step;
  import hil_pkg::*;

  localparam int PERIOD = 512, KP = 0, KI = 4;
  localparam int NWIN   = 128;           // controller cycles per synchronization step
  localparam int IN_BASE = 32'h40, OUT_BASE = 32'h80;
  localparam real TCLK = 5e-9;

  // power stage, second case-study configuration
  localparam real VIN = 6.1, L = 1e-6, RL = 1.5e-3, C = 377e-6, RC = 0.375e-3, RO = 0.4;
  localparam real RHS = 5e-3, RLS = 2.5e-3;
  localparam real RA = 100e3, RB = 100e3, ADC_LSB = 3.3 / 256.0;
  localparam real RLOAD = 1.0 / (1.0 / RO + 1.0 / (RA + RB));

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] s_awaddr = '0, s_wdata = '0, s_araddr = '0, s_rdata;
  logic [2:0]  s_awprot = '0, s_arprot = '0;
  logic [3:0]  s_wstrb = '0;
  logic [1:0]  s_bresp, s_rresp;
  logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic s_arvalid = 0, s_arready, s_rvalid, s_rready = 0;
  logic [31:0] m_awaddr, m_wdata, m_araddr, m_rdata;
  logic [2:0]  m_awprot, m_arprot;
  logic [3:0]  m_wstrb;
  logic [1:0]  m_bresp, m_rresp;
  logic m_awvalid, m_awready, m_wvalid, m_wready, m_bvalid, m_bready;
  logic m_arvalid, m_arready, m_rvalid, m_rready;
  logic irq;
  int checks = 0, failures = 0;

  hil_emulator_ip #(.DPWM_BITS(9), .PERIOD(PERIOD), .KP(KP), .KI(KI)) dut (.*);

  axil_mem_model #(.DEPTH(256), .STALL_PCT(20)) shm (
    .clk, .rst_n,
    .awaddr(m_awaddr), .awprot(m_awprot), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .araddr(m_araddr), .arprot(m_arprot), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rvalid(m_rvalid), .rready(m_rready));

  always #2.5 clk = ~clk;

  `include "axil_cpu_tasks.svh"

  initial begin
    repeat (5_000_000) @(posedge clk);
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

  // ---------------- mechanism counters ----------------
  int n_start = 0, n_read = 0, n_run = 0, n_write = 0, n_irq = 0, n_poll = 0;
  int n_idle = 0, n_refstep = 0, n_zero = 0, n_busy_start = 0, n_berr = 0;
  int gated = 0;
  always @(posedge dut.gclk) if (rst_n) gated++;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_sync.state != dut.u_sync.S_RUN && dut.u_sync.state != dut.u_sync.S_CAPTURE) n_idle++;
  end

  // ---------------- cycle-level controller model ----------------
  longint m_integ = 0;
  int m_cmd = 0, m_err = 0, m_cnt = 0, m_dutyq = 0;
  bit m_sat = 0;
  task automatic model_cycles(input int n, input int vs, input int vr);
    longint i_sum, u;
    int old_cmd;
    for (int c = 0; c < n; c++) begin
      old_cmd = m_cmd;
      if (m_cnt == 0) begin
        m_err = vr - vs;
        i_sum = m_integ + longint'(KI) * m_err;
        if (i_sum < 0) i_sum = 0;
        if (i_sum > longint'(PERIOD - 1) * 256) i_sum = longint'(PERIOD - 1) * 256;
        m_integ = i_sum;
        u = (i_sum + longint'(KP) * m_err) >>> 8;
        m_sat = (u < 0) || (u > PERIOD - 1);
        m_cmd = (u < 0) ? 0 : (u > PERIOD - 1) ? PERIOD - 1 : int'(u);
      end
      if (m_cnt == PERIOD - 1) begin m_cnt = 0; m_dutyq = old_cmd; end
      else m_cnt++;
    end
  endtask

  // ---------------- power stage (Heun / RK2) ----------------
  real il = 0.0, vc = 0.0;
  function automatic real vout(real i, real v);
    return (i + v / RC) / (1.0 / RC + 1.0 / RLOAD);
  endfunction
  task automatic stage_step(input bit g, input real h);
    real vo, di1, dv1, il2, vc2, di2, dv2;
    vo  = vout(il, vc);
    di1 = ((g ? VIN - RHS * il : -RLS * il) - RL * il - vo) / L;
    dv1 = (vo - vc) / (RC * C);
    il2 = il + h * di1;
    vc2 = vc + h * dv1;
    vo  = vout(il2, vc2);
    di2 = ((g ? VIN - RHS * il2 : -RLS * il2) - RL * il2 - vo) / L;
    dv2 = (vo - vc2) / (RC * C);
    il  = il + 0.5 * h * (di1 + di2);
    vc  = vc + 0.5 * h * (dv1 + dv2);
  endtask
  function automatic int adc(real vo);
    real vs = vo * RB / (RA + RB);
    int code = int'($floor(vs / ADC_LSB));
    return (code < 0) ? 0 : (code > 255) ? 255 : code;
  endfunction

  // ---------------- one synchronization step ----------------
  logic [31:0] rd; logic [1:0] resp;
  int  out_cnt = 0, out_duty = 0, total = 0, steps = 0;
  int  vref_code = 64;
  real vo_now;

  task automatic sync_step(input int n, input bit use_irq, input bit extra_start);
    int vs_code;
    bit g;
    vs_code = adc(vout(il, vc));
    // 2. analog state to shared memory
    shm.mem[IN_BASE / 4]     = 32'(vs_code);
    shm.mem[IN_BASE / 4 + 1] = 32'(vref_code);
    if (n != NWIN) begin cpu_write(REG_NCYCLES, 32'(n), resp); end
    // 3. start the IP
    cpu_write(REG_CTRL, use_irq ? 32'h3 : 32'h1, resp);
    n_start++;
    if (extra_start) begin
      cpu_write(REG_CTRL, 32'h3, resp);       // ignored: a step is running
      n_busy_start++;
    end
    // power stage over the same window, gate from the last reported counter and duty
    for (int j = 0; j < n; j++) begin
      g = ((out_cnt + j) % PERIOD) < out_duty;
      stage_step(g, TCLK);
    end
    // 4. wait for the IP
    if (use_irq) begin
      while (!irq) @(negedge clk);
      n_irq++;
    end else begin
      do cpu_read(REG_STATUS, rd, resp); while (!rd[STAT_DONE]);
      n_poll++;
    end
    // reference model over the same window
    model_cycles(n, vs_code, vref_code);
    check(shm.mem[OUT_BASE / 4] == {29'd0, m_sat, (m_cnt >= m_dutyq), (m_cnt < m_dutyq)},
          "output word 0 (gates, saturation)");
    check(shm.mem[OUT_BASE / 4 + 1] == 32'(m_dutyq), "output word 1 (duty)");
    check(shm.mem[OUT_BASE / 4 + 2] == 32'(m_err), "output word 2 (error)");
    check(shm.mem[OUT_BASE / 4 + 3] == 32'(m_cnt), "output word 3 (DPWM counter)");
    out_duty = int'(shm.mem[OUT_BASE / 4 + 1]);
    out_cnt  = int'(shm.mem[OUT_BASE / 4 + 3]);
    cpu_write(REG_STATUS, 32'h2, resp);          // clear DONE
    if (n == 0) n_zero++;
    n_read++; n_run++; n_write++;
    total += n; steps++;
    if (n != NWIN) cpu_write(REG_NCYCLES, 32'(NWIN), resp);
  endtask

  real vtarget, vstart, t_ms, t10, t90;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    cpu_write(REG_IN_ADDR,  IN_BASE,  resp);
    cpu_write(REG_OUT_ADDR, OUT_BASE, resp);
    cpu_write(REG_NCYCLES,  NWIN,     resp);
    // 4 ms at Vref = 1.65 V
    for (int k = 0; k < 6250; k++) sync_step(NWIN, 1'b1, 1'b0);
    vstart  = vout(il, vc);
    vtarget = vref_code * ADC_LSB * (RA + RB) / RB;
    $display("before the step: Vo = %f V (target %f V)", vstart, vtarget);
    check(vstart > 0.98 * vtarget && vstart < 1.02 * vtarget, "settled at 1.65 V");
    // step to 1.86 V, 4 ms
    vref_code = 72; n_refstep++;
    vtarget = vref_code * ADC_LSB * (RA + RB) / RB;
    t10 = -1; t90 = -1;
    for (int k = 0; k < 6250; k++) begin
      sync_step(NWIN, 1'b1, 1'b0);
      vo_now = vout(il, vc);
      if (t10 < 0 && vo_now > vstart + 0.1 * (vtarget - vstart)) t10 = k * NWIN * TCLK;
      if (t90 < 0 && vo_now > vstart + 0.9 * (vtarget - vstart)) t90 = k * NWIN * TCLK;
    end
    vo_now = vout(il, vc);
    $display("after the step: Vo = %f V (target %f V), 10-90 %% rise time %f ms",
             vo_now, vtarget, (t90 - t10) * 1e3);
    check(vo_now > 0.98 * vtarget && vo_now < 1.02 * vtarget, "settled at 1.86 V");
    check(t10 >= 0 && t90 > t10, "step response rises");
    cpu_read(REG_CYCLES, rd, resp); check(rd == 32'(total), "CYCLES counter");
    check(gated == total, "controller clock edges equal the cycles requested");
    t_ms = real'(total) * TCLK * 1e3;
    $display("emulated %f ms of converter time in %0d steps", t_ms, steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
