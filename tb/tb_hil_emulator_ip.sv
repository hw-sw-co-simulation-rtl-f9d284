// tb_hil_emulator_ip: end-to-end hardware-in-the-loop run of the emulator IP
// at its default parameters, closing the loop of the first case-study configuration's buck
// converter (11 V in, 2.0 V out, 38 uH, 200 uF, 5 ohm, 100 kHz).
//
// The testbench plays the embedded processor. Its power-stage model is a
// synchronous buck (inductor current and capacitor voltage, with the
// inductor's and capacitor's series resistances, the load and the 15k/45k
// sensing divider), integrated with second-order Runge-Kutta (Heun) at one
// step per controller clock (10 ns). An 8-bit ADC model (3.3 V full scale)
// turns the divided output voltage into Vsens[n].
//
// Each synchronization step: the processor writes Vsens[n] and Vref[n] to the
// input buffer in shared memory, writes START, integrates the power stage over
// the N clock cycles of the window (the gate waveform inside the window
// follows from the DPWM counter and duty reported by the previous step), waits
// for the interrupt (or polls STATUS on some steps), reads the output buffer
// and clears DONE. Shared memory is an AXI4-Lite model that stalls 20 % of
// its cycles.
//
// Checks: every output buffer is compared with a cycle-level model of the
// controller advanced by exactly N cycles per step (so the controller must
// run exactly N clocks per step and stand still in between); CYCLES and SYNCS
// agree with the step count; the output voltage settles within 2 % of its
// target after start-up and after a reference step (2.0 V -> 2.2 V); an
// unmapped buffer address raises the bus-error flag. Each mechanism (START,
// input read, N-cycle run, output write, interrupt, polled completion, idle
// clock, memory back-pressure, reference step, zero-length step, START while
// busy, bus error) is counted and must occur at least once.
module tb_hil_emulator_ip;
  import hil_pkg::*;

  localparam int PERIOD = 1000, KP = 16, KI = 2;
  localparam int NWIN   = 100;           // controller cycles per synchronization step
  localparam int IN_BASE = 32'h40, OUT_BASE = 32'h80;
  localparam real TCLK = 10e-9;

  // power stage, first case-study configuration
  localparam real VIN = 11.0, L = 38e-6, RL = 1.0e-9, C = 200e-6, RC = 1.0e-3, RO = 5.0;
  localparam real RA = 15e3, RB = 45e3, ADC_LSB = 3.3 / 256.0;
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

  hil_emulator_ip dut (.*);

  axil_mem_model #(.DEPTH(256), .STALL_PCT(20)) shm (
    .clk, .rst_n,
    .awaddr(m_awaddr), .awprot(m_awprot), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .araddr(m_araddr), .arprot(m_arprot), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rvalid(m_rvalid), .rready(m_rready));

  always #5 clk = ~clk;

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
    di1 = ((g ? VIN : 0.0) - RL * il - vo) / L;
    dv1 = (vo - vc) / (RC * C);
    il2 = il + h * di1;
    vc2 = vc + h * dv1;
    vo  = vout(il2, vc2);
    di2 = ((g ? VIN : 0.0) - RL * il2 - vo) / L;
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
  int  vref_code = 116;
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

  real vtarget, t_ms;
  int mem_writes0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    cpu_write(REG_IN_ADDR,  IN_BASE,  resp);
    cpu_write(REG_OUT_ADDR, OUT_BASE, resp);
    cpu_write(REG_NCYCLES,  NWIN,     resp);
    // the controller clock is stopped while no step runs
    repeat (200) @(negedge clk);
    check(gated == 0, "no controller clock before the first START");
    // start-up, 12 ms at Vref = 2.0 V
    for (int k = 0; k < 12000; k++)
      begin sync_step((k == 3) ? 0 : (k == 7) ? 37 : NWIN, (k % 5) != 4, k == 11); end
    vo_now  = vout(il, vc);
    vtarget = vref_code * ADC_LSB * (RA + RB) / RB;
    $display("after start-up: Vo = %f V (target %f V)", vo_now, vtarget);
    check(vo_now > 0.98 * vtarget && vo_now < 1.02 * vtarget, "start-up settles at 2.0 V");
    // reference step to 2.2 V, 8 ms
    vref_code = 128; n_refstep++;
    for (int k = 0; k < 8000; k++) sync_step(NWIN, (k % 7) != 0, 1'b0);
    vo_now  = vout(il, vc);
    vtarget = vref_code * ADC_LSB * (RA + RB) / RB;
    $display("after reference step: Vo = %f V (target %f V)", vo_now, vtarget);
    check(vo_now > 0.98 * vtarget && vo_now < 1.02 * vtarget, "reference step settles at 2.2 V");
    // counters
    cpu_read(REG_CYCLES, rd, resp); check(rd == 32'(total), "CYCLES counter");
    cpu_read(REG_SYNCS, rd, resp);  check(rd == 32'(steps), "SYNCS counter");
    check(gated == total, "controller clock edges equal the cycles requested");
    // a buffer at an unmapped address: bus error reported
    cpu_write(REG_IN_ADDR, 32'h0002_0000, resp);
    cpu_write(REG_CTRL, 32'h1, resp);
    do cpu_read(REG_STATUS, rd, resp); while (!rd[STAT_DONE]);
    if (rd[STAT_BERR]) n_berr++;
    check(rd[STAT_BERR], "bus error flag");
    // mechanisms
    $display("starts %0d reads %0d runs %0d writes %0d irq %0d polled %0d idle-cycles %0d",
             n_start, n_read, n_run, n_write, n_irq, n_poll, n_idle);
    $display("memory stalls %0d, reference steps %0d, zero-length steps %0d, START while busy %0d, bus errors %0d",
             shm.n_stalls, n_refstep, n_zero, n_busy_start, n_berr);
    check(n_start > 0 && n_read > 0 && n_run > 0 && n_write > 0, "step mechanisms occurred");
    check(n_irq > 0, "interrupt completion occurred");
    check(n_poll > 0, "polled completion occurred");
    check(n_idle > 0, "controller clock held while idle");
    check(shm.n_stalls > 0, "memory back-pressure occurred");
    check(n_refstep > 0 && n_zero > 0 && n_busy_start > 0 && n_berr > 0, "other mechanisms occurred");
    t_ms = real'(total) * TCLK * 1e3;
    $display("emulated %f ms of converter time in %0d steps", t_ms, steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
