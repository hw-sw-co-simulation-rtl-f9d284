// hil_emulator_ip: the custom hardware block of a hardware-in-the-loop
// emulator for power converter digital controllers.
//
// An embedded processor simulates the power stage at electrical level; this IP
// runs the real RTL of the digital controller in programmable logic, advancing
// it in lock-step with the simulation. Per synchronization step the processor
// writes the analog state (the sampled output voltage and the reference) to a
// buffer in shared memory and writes START; the IP reads that buffer over its
// AXI4-Lite master port, lets exactly N clock edges through to the controller,
// writes the controller's outputs (gate signals, duty, error, DPWM position)
// back to shared memory and raises irq. Between steps the controller's clock is
// stopped, so its state is frozen while the processor integrates the power
// stage over the same time span.
//
//   s_* (AXI4-Lite slave)  -> sync_controller --run_en--> clock_gate --gclk--> digital_controller
//                                  | xfer cmd                                     ^ inputs  | outputs
//   m_* (AXI4-Lite master) <- io_data_controller <-------> io_data_buffer --------+---------+
//
// Everything runs from clk except the controller, which runs from the gated
// copy of clk, so no clock-domain crossing exists. All blocks but the digital
// controller are independent of the emulated design. The partition into sync
// controller (slave), I/O data controller (master), I/O data buffer, gated
// clock and digital controller follows the original proposal; the bus widths, register
// map and buffer layouts are this design's own (see hil_pkg). Parameter
// defaults are those of the first case-study configuration's controller.
module hil_emulator_ip
  import hil_pkg::*;
#(
  parameter int unsigned ADC_BITS  = 8,
  parameter int unsigned DPWM_BITS = 10,
  parameter int unsigned PERIOD    = 1000,
  parameter int unsigned FRAC      = 8,
  parameter int signed   KP        = 16,
  parameter int signed   KI        = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite slave: commands from the processor
  input  logic [AXI_AW-1:0]   s_awaddr,
  input  logic [2:0]          s_awprot,
  input  logic                s_awvalid,
  output logic                s_awready,
  input  logic [AXI_DW-1:0]   s_wdata,
  input  logic [AXI_DW/8-1:0] s_wstrb,
  input  logic                s_wvalid,
  output logic                s_wready,
  output logic [1:0]          s_bresp,
  output logic                s_bvalid,
  input  logic                s_bready,
  input  logic [AXI_AW-1:0]   s_araddr,
  input  logic [2:0]          s_arprot,
  input  logic                s_arvalid,
  output logic                s_arready,
  output logic [AXI_DW-1:0]   s_rdata,
  output logic [1:0]          s_rresp,
  output logic                s_rvalid,
  input  logic                s_rready,
  // AXI4-Lite master: data exchange with shared memory
  output logic [AXI_AW-1:0]   m_awaddr,
  output logic [2:0]          m_awprot,
  output logic                m_awvalid,
  input  logic                m_awready,
  output logic [AXI_DW-1:0]   m_wdata,
  output logic [AXI_DW/8-1:0] m_wstrb,
  output logic                m_wvalid,
  input  logic                m_wready,
  input  logic [1:0]          m_bresp,
  input  logic                m_bvalid,
  output logic                m_bready,
  output logic [AXI_AW-1:0]   m_araddr,
  output logic [2:0]          m_arprot,
  output logic                m_arvalid,
  input  logic                m_arready,
  input  logic [AXI_DW-1:0]   m_rdata,
  input  logic [1:0]          m_rresp,
  input  logic                m_rvalid,
  output logic                m_rready,
  // interrupt to the processor: a synchronization step has finished
  output logic                irq
);

  // sync controller <-> I/O data controller
  logic              xfer_valid, xfer_done, xfer_err, xfer_busy;
  xfer_cmd_e         xfer_cmd;
  logic [AXI_AW-1:0] in_addr, out_addr;
  // gating and capture
  logic              run_en, capture, gclk;
  // I/O data buffer
  logic                     buf_we;
  logic [$clog2(N_IN)-1:0]  buf_widx;
  logic [AXI_DW-1:0]        buf_wdata, buf_rdata;
  logic [$clog2(N_OUT)-1:0] buf_ridx;
  // digital controller
  logic [ADC_BITS-1:0]      vsens, vref;
  logic                     d_hs, d_ls, sat;
  logic [DPWM_BITS-1:0]     duty, pwm_cnt;
  logic signed [ADC_BITS:0] err;

  sync_controller u_sync (
    .clk, .rst_n,
    .s_awaddr, .s_awprot, .s_awvalid, .s_awready,
    .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready,
    .s_araddr, .s_arprot, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .xfer_valid, .xfer_cmd, .in_addr, .out_addr,
    .xfer_done, .xfer_err,
    .run_en, .capture, .irq
  );

  io_data_controller u_io (
    .clk, .rst_n,
    .cmd_valid(xfer_valid), .cmd(xfer_cmd), .in_addr, .out_addr,
    .busy(xfer_busy), .done(xfer_done), .resp_err(xfer_err),
    .buf_we, .buf_widx, .buf_wdata, .buf_ridx, .buf_rdata,
    .m_awaddr, .m_awprot, .m_awvalid, .m_awready,
    .m_wdata, .m_wstrb, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready,
    .m_araddr, .m_arprot, .m_arvalid, .m_arready,
    .m_rdata, .m_rresp, .m_rvalid, .m_rready
  );

  io_data_buffer #(
    .ADC_BITS (ADC_BITS),
    .DPWM_BITS(DPWM_BITS)
  ) u_buf (
    .clk, .rst_n,
    .in_we(buf_we), .in_idx(buf_widx), .in_wdata(buf_wdata),
    .capture, .rd_idx(buf_ridx), .rd_data(buf_rdata),
    .vsens, .vref, .d_hs, .d_ls, .sat, .duty, .err, .pwm_cnt
  );

  clock_gate u_cg (
    .clk, .rst_n, .en(run_en), .gclk
  );

  digital_controller #(
    .ADC_BITS (ADC_BITS),
    .DPWM_BITS(DPWM_BITS),
    .PERIOD   (PERIOD),
    .FRAC     (FRAC),
    .KP       (KP),
    .KI       (KI)
  ) u_dut (
    .clk(gclk), .rst_n,
    .vsens, .vref,
    .d_hs, .d_ls, .duty, .err, .pwm_cnt, .sat
  );

  // the sequencer never issues a transfer while one is in flight
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    xfer_valid |-> !xfer_busy);

endmodule
