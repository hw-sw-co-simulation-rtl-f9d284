// tb_sync_controller: self-checking testbench of the sync controller, the
// command slave and step sequencer of the emulator IP.
//
// The testbench acts as the processor on the AXI4-Lite slave port and as the
// I/O data controller on the transfer port, answering each transfer command
// after a random delay. For random N it checks the order of one step (read
// transfer, N enabled clock cycles in one block, one capture, write transfer,
// DONE and interrupt), that run_en is high for exactly N cycles, register
// read-back, SLVERR for unmapped offsets, that START is ignored while busy,
// interrupt masking and clearing, the sticky bus-error flag and the CYCLES and
// SYNCS counters.
module tb_sync_controller;
  import hil_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] s_awaddr = '0, s_wdata = '0, s_araddr = '0, s_rdata;
  logic [2:0]  s_awprot = '0, s_arprot = '0;
  logic [3:0]  s_wstrb = '0;
  logic [1:0]  s_bresp, s_rresp;
  logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic s_arvalid = 0, s_arready, s_rvalid, s_rready = 0;
  logic xfer_valid, xfer_done = 0, xfer_err = 0, run_en, capture, irq;
  xfer_cmd_e xfer_cmd;
  logic [31:0] in_addr, out_addr;
  int checks = 0, failures = 0;

  sync_controller dut (.*);

  always #5 clk = ~clk;

  `include "axil_cpu_tasks.svh"

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

  // I/O data controller stand-in and event log
  typedef enum int { EV_READ, EV_RUN, EV_CAPTURE, EV_WRITE } ev_e;
  ev_e evs[$];
  int  run_cycles = 0, inject_err = 0;
  bit  prev_run = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (run_en) begin
        run_cycles++;
        if (!prev_run) evs.push_back(EV_RUN);
      end
      prev_run <= run_en;
      if (capture) evs.push_back(EV_CAPTURE);
      if (xfer_valid) begin
        evs.push_back(xfer_cmd == XFER_READ ? EV_READ : EV_WRITE);
        fork begin
          repeat ($urandom_range(1, 12)) @(posedge clk);
          xfer_done <= 1; xfer_err <= (inject_err != 0);
          @(posedge clk);
          xfer_done <= 0; xfer_err <= 0;
        end join_none
      end
    end
  end

  logic [31:0] rd; logic [1:0] resp;
  int n, total_cycles = 0, syncs = 0, t0, irq_seen;

  task automatic wait_done(input bit use_irq);
    if (use_irq) begin
      while (!irq) @(negedge clk);
    end else begin
      do cpu_read(REG_STATUS, rd, resp); while (!rd[STAT_DONE]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // register read-back and unmapped offsets
    cpu_write(REG_IN_ADDR, 32'h0000_0100, resp);  check(resp == RESP_OKAY, "write OKAY");
    cpu_write(REG_OUT_ADDR, 32'h0000_0200, resp);
    cpu_read(REG_IN_ADDR, rd, resp);  check(rd == 32'h100 && resp == RESP_OKAY, "IN_ADDR read-back");
    cpu_read(REG_OUT_ADDR, rd, resp); check(rd == 32'h200, "OUT_ADDR read-back");
    check(in_addr == 32'h100 && out_addr == 32'h200, "addresses to the I/O data controller");
    cpu_write(32'h40, 32'h1, resp);   check(resp == RESP_SLVERR, "write to unmapped offset");
    cpu_read(32'h44, rd, resp);       check(resp == RESP_SLVERR, "read of unmapped offset");
    cpu_read(REG_STATUS, rd, resp);   check(rd == 0, "idle status");
    check(!irq && !run_en, "quiet after reset");

    for (int k = 0; k < 60; k++) begin
      n = (k == 0) ? 0 : (k == 1) ? 1 : $urandom_range(1, 300);
      cpu_write(REG_NCYCLES, n, resp);
      cpu_read(REG_NCYCLES, rd, resp); check(rd == n, "NCYCLES read-back");
      cpu_write(REG_CTRL, (k % 2) ? 32'h2 : 32'h0, resp);   // IRQ_EN on odd rounds
      evs.delete(); run_cycles = 0;
      cpu_write(REG_CTRL, ((k % 2) ? 32'h2 : 32'h0) | 32'h1, resp);
      cpu_read(REG_STATUS, rd, resp);
      check(rd[STAT_BUSY] || rd[STAT_DONE], "busy after START");
      // START while busy is ignored
      if (k == 5) cpu_write(REG_CTRL, 32'h3, resp);
      wait_done(k % 2);
      check(run_cycles == n, $sformatf("run_en for exactly N=%0d cycles (got %0d)", n, run_cycles));
      check(evs.size() == ((n == 0) ? 3 : 4), "number of step events");
      if (evs.size() == 4)
        check(evs[0] == EV_READ && evs[1] == EV_RUN && evs[2] == EV_CAPTURE && evs[3] == EV_WRITE,
              "step order: read, run, capture, write");
      if (evs.size() == 3)
        check(evs[0] == EV_READ && evs[1] == EV_CAPTURE && evs[2] == EV_WRITE, "step order for N=0");
      cpu_read(REG_STATUS, rd, resp);
      check(rd[STAT_DONE] && !rd[STAT_BUSY], "DONE set, not busy");
      check(irq == (k % 2), "irq follows IRQ_EN");
      total_cycles += n; syncs++;
      cpu_write(REG_STATUS, 32'h2, resp);            // clear DONE
      cpu_read(REG_STATUS, rd, resp);
      check(!rd[STAT_DONE] && !irq, "DONE and irq cleared");
      if (k == 5) begin
        repeat (50) @(negedge clk);
        check(run_cycles == n && !run_en, "START while busy ignored");
      end
    end
    cpu_read(REG_CYCLES, rd, resp); check(rd == total_cycles, "CYCLES counter");
    cpu_read(REG_SYNCS, rd, resp);  check(rd == syncs, "SYNCS counter");
    // a bus error of a transfer is reported and sticky until cleared
    inject_err = 1;
    cpu_write(REG_NCYCLES, 3, resp);
    cpu_write(REG_CTRL, 32'h1, resp);
    wait_done(0);
    inject_err = 0;
    cpu_read(REG_STATUS, rd, resp); check(rd[STAT_BERR], "bus error flag");
    cpu_write(REG_STATUS, 32'h6, resp);
    cpu_read(REG_STATUS, rd, resp); check(rd[2:1] == 0, "bus error cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
