// axil_mem_model: behavioural model of the memory shared between the
// processor and the programmable logic, seen through an AXI4-Lite slave port.
//
// Not synthesizable; testbenches only. Word-addressed array of DEPTH 32-bit
// words at byte address 0. Each ready and each response is delayed by a
// random number of cycles (0 when STALL_PCT is 0), so the master sees
// back-pressure. Accesses at or above ERR_ADDR answer SLVERR and are not
// performed. The testbench, standing for the processor, reads and writes the
// array directly through mem[]. Counters report how many beats were served
// and how many cycles a valid waited for its ready.
module axil_mem_model #(
  parameter int DEPTH     = 256,
  parameter int STALL_PCT = 0,
  parameter int ERR_ADDR  = 32'h0001_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] awaddr,
  input  logic [2:0]  awprot,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic [31:0] araddr,
  input  logic [2:0]  arprot,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rvalid,
  input  logic        rready
);
  logic [31:0] mem [DEPTH];
  int n_reads = 0, n_writes = 0, n_stalls = 0, n_errors = 0;

  logic        aw_have = 0, w_have = 0;
  logic [31:0] aw_q, w_q;
  logic [3:0]  s_q;

  function automatic bit go();
    return ($urandom_range(0, 99) >= STALL_PCT);
  endfunction

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      awready <= 0; wready <= 0; bvalid <= 0; bresp <= 0;
      arready <= 0; rvalid <= 0; rdata <= 0; rresp <= 0;
      aw_have <= 0; w_have <= 0;
    end else begin
      // write address / data
      if (awvalid && awready) begin aw_q <= awaddr; aw_have <= 1; end
      if (wvalid && wready)   begin w_q <= wdata; s_q <= wstrb; w_have <= 1; end
      awready <= !aw_have && !(awvalid && awready) && go();
      wready  <= !w_have && !(wvalid && wready) && go();
      if (awvalid && !awready) n_stalls++;
      if (wvalid && !wready)   n_stalls++;
      if (aw_have && w_have && !bvalid && go()) begin
        if (aw_q >= ERR_ADDR || aw_q[31:2] >= DEPTH) begin
          bresp <= 2'b10; n_errors++;
        end else begin
          for (int b = 0; b < 4; b++) if (s_q[b]) mem[aw_q[31:2]][8*b +: 8] <= w_q[8*b +: 8];
          bresp <= 2'b00;
        end
        n_writes++;
        bvalid <= 1; aw_have <= 0; w_have <= 0;
      end else if (bvalid && bready) bvalid <= 0;
      // read
      if (arvalid && !arready) n_stalls++;
      if (arvalid && arready) begin
        arready <= 0;
        if (araddr >= ERR_ADDR || araddr[31:2] >= DEPTH) begin
          rdata <= 32'hDEAD_BEEF; rresp <= 2'b10; n_errors++;
        end else begin
          rdata <= mem[araddr[31:2]]; rresp <= 2'b00;
        end
        rvalid <= 1; n_reads++;
      end else begin
        if (rvalid && rready) rvalid <= 0;
        arready <= !rvalid && !arready && go();
      end
    end
  end
endmodule
