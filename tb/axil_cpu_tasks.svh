// axil_cpu_tasks.svh: processor-side AXI4-Lite accesses for testbenches.
//
// Included inside a testbench module that declares the slave-port signals
// s_awaddr ... s_rready and a clock clk. cpu_write and cpu_read perform one
// single-beat access each, holding valid until ready as the protocol demands,
// and return the response code. Signals are driven and sampled on falling
// edges, half a cycle away from the rising edge on which handshakes happen.

task automatic cpu_write(input logic [31:0] addr, input logic [31:0] data,
                         output logic [1:0] resp);
  bit aw_acc, w_acc;
  @(negedge clk);
  s_awaddr = addr; s_awvalid = 1; s_wdata = data; s_wstrb = 4'hF; s_wvalid = 1;
  while (s_awvalid || s_wvalid) begin
    aw_acc = s_awvalid && s_awready;
    w_acc  = s_wvalid && s_wready;
    @(negedge clk);
    if (aw_acc) s_awvalid = 0;
    if (w_acc)  s_wvalid = 0;
  end
  s_bready = 1;
  while (!s_bvalid) @(negedge clk);
  resp = s_bresp;
  @(negedge clk);
  s_bready = 0;
endtask

task automatic cpu_read(input logic [31:0] addr, output logic [31:0] data,
                        output logic [1:0] resp);
  bit ar_acc = 0;
  @(negedge clk);
  s_araddr = addr; s_arvalid = 1;
  while (!ar_acc) begin
    ar_acc = s_arready;
    @(negedge clk);
  end
  s_arvalid = 0;
  s_rready = 1;
  while (!s_rvalid) @(negedge clk);
  data = s_rdata; resp = s_rresp;
  @(negedge clk);
  s_rready = 0;
endtask
