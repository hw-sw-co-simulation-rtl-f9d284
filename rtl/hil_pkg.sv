// hil_pkg: types and constants shared by the blocks of the hardware-in-the-loop
// emulator IP.
//
// The IP sits in the programmable logic next to an embedded processor that
// simulates the power stage. The processor talks to the IP through two AMBA
// AXI4-Lite ports: a slave port carrying commands (the register map below) and
// a master port with which the IP fetches the controller's inputs from, and
// stores its outputs to, memory shared with the processor. The use of AMBA
// follows the original proposal; the register map, the 32-bit bus width, the response
// codes and the layout of the shared-memory buffers are this design's own.
package hil_pkg;

  localparam int unsigned AXI_AW = 32;  // address width of both AXI4-Lite ports
  localparam int unsigned AXI_DW = 32;  // data width of both AXI4-Lite ports

  // AXI response codes
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // Register map of the sync controller's slave port (byte offsets)
  localparam logic [7:0] REG_CTRL     = 8'h00;  // W: bit0 START (self clearing); RW: bit1 IRQ_EN
  localparam logic [7:0] REG_STATUS   = 8'h04;  // R: bit0 BUSY, bit1 DONE, bit2 BUS_ERR; W1C: bits 1,2
  localparam logic [7:0] REG_NCYCLES  = 8'h08;  // RW: digital clock cycles to run per synchronization
  localparam logic [7:0] REG_IN_ADDR  = 8'h0C;  // RW: shared-memory byte address of the input buffer
  localparam logic [7:0] REG_OUT_ADDR = 8'h10;  // RW: shared-memory byte address of the output buffer
  localparam logic [7:0] REG_CYCLES   = 8'h14;  // R: total digital clock cycles emulated since reset
  localparam logic [7:0] REG_SYNCS    = 8'h18;  // R: synchronization points completed since reset

  localparam int unsigned CTRL_START  = 0;
  localparam int unsigned CTRL_IRQ_EN = 1;
  localparam int unsigned STAT_BUSY   = 0;
  localparam int unsigned STAT_DONE   = 1;
  localparam int unsigned STAT_BERR   = 2;

  // Shared-memory buffers, one 32-bit word per state variable.
  // Input buffer (written by the processor before START):
  //   word 0 : Vsens[n], ADC code of the sensed output voltage (unsigned)
  //   word 1 : Vref[n],  reference in ADC codes (unsigned)
  // Output buffer (written by the IP before the interrupt):
  //   word 0 : bit0 d(t) high-side gate, bit1 low-side gate, bit2 PI output saturated
  //   word 1 : duty command held by the DPWM, in DPWM counts
  //   word 2 : e[n], last control error (two's complement, sign-extended)
  //   word 3 : DPWM counter value (position inside the switching period)
  localparam int unsigned N_IN  = 2;
  localparam int unsigned N_OUT = 4;

  // Commands from the sync controller to the I/O data controller
  typedef enum logic [1:0] {
    XFER_NONE  = 2'b00,
    XFER_READ  = 2'b01,   // fetch the input buffer into the I/O data buffer
    XFER_WRITE = 2'b10    // store the I/O data buffer's outputs to the output buffer
  } xfer_cmd_e;

endpackage
