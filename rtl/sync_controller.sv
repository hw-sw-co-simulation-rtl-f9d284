// sync_controller: command slave of the emulator IP and sequencer of one
// synchronization step between the power-stage simulation and the emulated
// digital controller.
//
// The processor programs it over an AXI4-Lite slave port (register map in
// hil_pkg): the number N of controller clock cycles per step, the shared-memory
// addresses of the input and output buffers, and an interrupt enable. Writing
// START to CTRL launches one step, which runs through the states
//   IDLE -> READ    fetch the controller inputs from shared memory
//        -> RUN     let exactly N clock cycles through to the controller
//        -> CAPTURE copy the controller outputs into the I/O data buffer
//        -> WRITE   store them in shared memory
//        -> IDLE    set DONE and raise the interrupt (if enabled)
// BUSY reads 1 from the START write until DONE is set. DONE stays set, and the
// level interrupt irq = DONE & IRQ_EN stays high, until the processor writes 1
// to STATUS bit 1. A START while busy is ignored. CYCLES and SYNCS count the
// clock cycles emulated and the steps completed since reset.
//
// Timing: run_en is a register output; it is high for exactly N cycles, and
// the clock gate turns that into N controller clock edges, the last one a
// cycle before CAPTURE. Besides the N cycles, a step spends a few cycles per
// sequencer state and the time of the N_IN + N_OUT single-beat memory accesses.
//
// The sequence (wait for start, read inputs, run N cycles fixed by the
// processor, write outputs, interrupt) and the gated clock follow the original proposal.
// The register map, the sticky DONE flag, the level interrupt, the bus-error
// flag and the counters are this design's choices.
module sync_controller
  import hil_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite slave (command port)
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
  // to the I/O data controller
  output logic                xfer_valid,
  output xfer_cmd_e           xfer_cmd,
  output logic [AXI_AW-1:0]   in_addr,
  output logic [AXI_AW-1:0]   out_addr,
  input  logic                xfer_done,
  input  logic                xfer_err,
  // to the clock gate and the I/O data buffer
  output logic                run_en,
  output logic                capture,
  // to the processor
  output logic                irq
);

  typedef enum logic [2:0] {
    S_IDLE, S_READ_REQ, S_READ, S_RUN, S_CAPTURE, S_WRITE_REQ, S_WRITE
  } state_e;

  state_e            state;
  logic [31:0]       ncycles, remaining, cycles_total, syncs_total;
  logic              irq_en, done_q, berr_q;

  // ---------------- AXI4-Lite slave ----------------
  logic [AXI_AW-1:0]   aw_q;
  logic [AXI_DW-1:0]   w_q;
  logic [AXI_DW/8-1:0] wstrb_q;
  logic                aw_have, w_have;
  logic                wr_fire;
  logic [7:0]          wr_off, rd_off;
  logic                wr_hit, rd_hit;
  logic [AXI_DW-1:0]   rd_val;

  assign s_awready = !aw_have && !s_bvalid;
  assign s_wready  = !w_have && !s_bvalid;
  assign wr_fire   = aw_have && w_have && !s_bvalid;
  assign wr_off    = aw_q[7:0];
  assign rd_off    = s_araddr[7:0];
  assign s_arready = !s_rvalid;

  always_comb begin
    unique case (wr_off)
      REG_CTRL, REG_STATUS, REG_NCYCLES, REG_IN_ADDR, REG_OUT_ADDR: wr_hit = 1'b1;
      default: wr_hit = 1'b0;
    endcase
    rd_hit = 1'b1;
    unique case (rd_off)
      REG_CTRL:     rd_val = AXI_DW'({irq_en, 1'b0});
      REG_STATUS:   rd_val = AXI_DW'({berr_q, done_q, state != S_IDLE});
      REG_NCYCLES:  rd_val = ncycles;
      REG_IN_ADDR:  rd_val = in_addr;
      REG_OUT_ADDR: rd_val = out_addr;
      REG_CYCLES:   rd_val = cycles_total;
      REG_SYNCS:    rd_val = syncs_total;
      default: begin rd_val = '0; rd_hit = 1'b0; end
    endcase
  end

  // merge a write with byte strobes into a register value
  function automatic logic [31:0] merge(input logic [31:0] old_v, input logic [31:0] new_v,
                                        input logic [3:0] strb);
    for (int b = 0; b < 4; b++) if (strb[b]) old_v[8*b +: 8] = new_v[8*b +: 8];
    return old_v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_have  <= 1'b0;
      w_have   <= 1'b0;
      aw_q     <= '0;
      w_q      <= '0;
      wstrb_q  <= '0;
      s_bvalid <= 1'b0;
      s_bresp  <= RESP_OKAY;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
      s_rresp  <= RESP_OKAY;
    end else begin
      if (s_awvalid && s_awready) begin aw_q <= s_awaddr; aw_have <= 1'b1; end
      if (s_wvalid && s_wready)   begin w_q <= s_wdata; wstrb_q <= s_wstrb; w_have <= 1'b1; end
      if (wr_fire) begin
        aw_have  <= 1'b0;
        w_have   <= 1'b0;
        s_bvalid <= 1'b1;
        s_bresp  <= wr_hit ? RESP_OKAY : RESP_SLVERR;
      end else if (s_bvalid && s_bready) begin
        s_bvalid <= 1'b0;
      end
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rd_val;
        s_rresp  <= rd_hit ? RESP_OKAY : RESP_SLVERR;
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  // ---------------- registers and sequencer ----------------
  logic wr_ctrl, start_req;
  assign wr_ctrl   = wr_fire && wr_off == REG_CTRL;
  assign start_req = wr_ctrl && wstrb_q[0] && w_q[CTRL_START];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      ncycles      <= '0;
      remaining    <= '0;
      in_addr      <= '0;
      out_addr     <= '0;
      irq_en       <= 1'b0;
      done_q       <= 1'b0;
      berr_q       <= 1'b0;
      cycles_total <= '0;
      syncs_total  <= '0;
    end else begin
      // register writes
      if (wr_fire) begin
        unique case (wr_off)
          REG_CTRL:     if (wstrb_q[0]) irq_en <= w_q[CTRL_IRQ_EN];
          REG_STATUS:   if (wstrb_q[0]) begin
                          if (w_q[STAT_DONE]) done_q <= 1'b0;
                          if (w_q[STAT_BERR]) berr_q <= 1'b0;
                        end
          REG_NCYCLES:  ncycles  <= merge(ncycles,  w_q, wstrb_q);
          REG_IN_ADDR:  in_addr  <= merge(in_addr,  w_q, wstrb_q);
          REG_OUT_ADDR: out_addr <= merge(out_addr, w_q, wstrb_q);
          default: ;
        endcase
      end

      if (run_en) cycles_total <= cycles_total + 1;

      unique case (state)
        S_IDLE: if (start_req) begin
          done_q <= 1'b0;
          state  <= S_READ_REQ;
        end
        S_READ_REQ: state <= S_READ;
        S_READ: if (xfer_done) begin
          if (xfer_err) berr_q <= 1'b1;
          remaining <= ncycles;
          state     <= S_RUN;
        end
        S_RUN: begin
          if (remaining == 0) state <= S_CAPTURE;
          else                remaining <= remaining - 1;
        end
        S_CAPTURE:   state <= S_WRITE_REQ;
        S_WRITE_REQ: state <= S_WRITE;
        S_WRITE: if (xfer_done) begin
          if (xfer_err) berr_q <= 1'b1;
          done_q      <= 1'b1;
          syncs_total <= syncs_total + 1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    xfer_valid = (state == S_READ_REQ) || (state == S_WRITE_REQ);
    xfer_cmd   = (state == S_READ_REQ)  ? XFER_READ  :
                 (state == S_WRITE_REQ) ? XFER_WRITE : XFER_NONE;
    run_en     = (state == S_RUN) && (remaining != 0);
    capture    = (state == S_CAPTURE);
    irq        = done_q && irq_en;
  end

  // AXI slave rules: responses are held until accepted
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid && $stable(s_bresp));
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
  // the controller clock is only let through while a step is running
  a_run_only: assert property (@(posedge clk) disable iff (!rst_n)
    run_en |-> state == S_RUN);

endmodule
