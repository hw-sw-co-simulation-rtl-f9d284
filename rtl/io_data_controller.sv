// io_data_controller: AXI4-Lite master that moves the emulated controller's
// state between shared memory and the I/O data buffer.
//
// On a one-cycle cmd_valid with cmd = XFER_READ it reads N_IN consecutive
// 32-bit words starting at in_addr and writes each into the I/O data buffer as
// it arrives. With cmd = XFER_WRITE it writes the N_OUT output words of the
// buffer to consecutive addresses starting at out_addr. Transfers are single
// beats, one outstanding at a time: address, then data (reads), or address
// and data together, then the write response (writes). done pulses for one
// cycle when the last word has completed; resp_err is high in that cycle if
// any response of the transfer was not OKAY. Commands arriving while busy are
// ignored. Each AXI valid is held, with its payload, until its ready.
//
// That the IP holds the master port for this exchange follows the original proposal; the
// protocol (AXI4-Lite, AMBA), the single-beat sequential access and the error
// reporting are this design's choices. A burst-capable AXI4 master would
// shorten each synchronization, at more logic.
module io_data_controller
  import hil_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // command from the sync controller
  input  logic                     cmd_valid,
  input  xfer_cmd_e                cmd,
  input  logic [AXI_AW-1:0]        in_addr,
  input  logic [AXI_AW-1:0]        out_addr,
  output logic                     busy,
  output logic                     done,
  output logic                     resp_err,
  // I/O data buffer
  output logic                     buf_we,
  output logic [$clog2(N_IN)-1:0]  buf_widx,
  output logic [AXI_DW-1:0]        buf_wdata,
  output logic [$clog2(N_OUT)-1:0] buf_ridx,
  input  logic [AXI_DW-1:0]        buf_rdata,
  // AXI4-Lite master
  output logic [AXI_AW-1:0]        m_awaddr,
  output logic [2:0]               m_awprot,
  output logic                     m_awvalid,
  input  logic                     m_awready,
  output logic [AXI_DW-1:0]        m_wdata,
  output logic [AXI_DW/8-1:0]      m_wstrb,
  output logic                     m_wvalid,
  input  logic                     m_wready,
  input  logic [1:0]               m_bresp,
  input  logic                     m_bvalid,
  output logic                     m_bready,
  output logic [AXI_AW-1:0]        m_araddr,
  output logic [2:0]               m_arprot,
  output logic                     m_arvalid,
  input  logic                     m_arready,
  input  logic [AXI_DW-1:0]        m_rdata,
  input  logic [1:0]               m_rresp,
  input  logic                     m_rvalid,
  output logic                     m_rready
);

  typedef enum logic [2:0] {
    S_IDLE, S_RD_ADDR, S_RD_DATA, S_WR_REQ, S_WR_RESP, S_DONE
  } state_e;

  localparam int unsigned IDX_W = (N_IN > N_OUT) ? $clog2(N_IN) : $clog2(N_OUT);

  state_e            state;
  logic [IDX_W-1:0]  idx;
  logic [AXI_AW-1:0] base;
  logic              aw_sent, w_sent, err_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      idx     <= '0;
      base    <= '0;
      aw_sent <= 1'b0;
      w_sent  <= 1'b0;
      err_q   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          idx     <= '0;
          aw_sent <= 1'b0;
          w_sent  <= 1'b0;
          if (cmd_valid && cmd == XFER_READ) begin
            base  <= in_addr;
            err_q <= 1'b0;
            state <= S_RD_ADDR;
          end else if (cmd_valid && cmd == XFER_WRITE) begin
            base  <= out_addr;
            err_q <= 1'b0;
            state <= S_WR_REQ;
          end
        end
        S_RD_ADDR: if (m_arready) state <= S_RD_DATA;
        S_RD_DATA: if (m_rvalid) begin
          if (m_rresp != RESP_OKAY) err_q <= 1'b1;
          if (idx == IDX_W'(N_IN - 1)) state <= S_DONE;
          else begin
            idx   <= idx + 1'b1;
            state <= S_RD_ADDR;
          end
        end
        S_WR_REQ: begin
          if (m_awready) aw_sent <= 1'b1;
          if (m_wready)  w_sent  <= 1'b1;
          if ((aw_sent || m_awready) && (w_sent || m_wready)) state <= S_WR_RESP;
        end
        S_WR_RESP: if (m_bvalid) begin
          aw_sent <= 1'b0;
          w_sent  <= 1'b0;
          if (m_bresp != RESP_OKAY) err_q <= 1'b1;
          if (idx == IDX_W'(N_OUT - 1)) state <= S_DONE;
          else begin
            idx   <= idx + 1'b1;
            state <= S_WR_REQ;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (state != S_IDLE);
    done      = (state == S_DONE);
    resp_err  = done && err_q;

    m_araddr  = base + AXI_AW'({idx, 2'b00});
    m_arprot  = 3'b000;
    m_arvalid = (state == S_RD_ADDR);
    m_rready  = (state == S_RD_DATA);

    m_awaddr  = base + AXI_AW'({idx, 2'b00});
    m_awprot  = 3'b000;
    m_awvalid = (state == S_WR_REQ) && !aw_sent;
    m_wdata   = buf_rdata;
    m_wstrb   = '1;
    m_wvalid  = (state == S_WR_REQ) && !w_sent;
    m_bready  = (state == S_WR_RESP);

    buf_we    = (state == S_RD_DATA) && m_rvalid;
    buf_widx  = ($clog2(N_IN))'(idx);
    buf_wdata = m_rdata;
    buf_ridx  = ($clog2(N_OUT))'(idx);
  end

  // AXI master rules: a valid, once raised, stays up with a stable payload
  // until it is accepted.
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr));
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_awvalid && !m_awready |=> m_awvalid && $stable(m_awaddr));
  a_w_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_wvalid && !m_wready |=> m_wvalid && $stable(m_wdata));

endmodule
