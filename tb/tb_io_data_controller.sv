// tb_io_data_controller: self-checking testbench of the AXI4-Lite master that
// moves controller state between shared memory and the I/O data buffer.
//
// The master talks to a shared-memory model that stalls 40 % of its ready and
// response cycles. Each round fills memory with random words, issues a read
// command at a random word-aligned base and checks that exactly N_IN buffer
// writes arrive, in order, with the memory's words; then it issues a write
// command and checks the N_OUT words that land in memory and that no other
// word changed. Further checks: one done pulse per command, commands while
// busy are ignored, and an access to an unmapped address reports resp_err.
module tb_io_data_controller;
  import hil_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0;
  xfer_cmd_e cmd = XFER_NONE;
  logic [31:0] in_addr = '0, out_addr = '0;
  logic busy, done, resp_err;
  logic buf_we;
  logic [$clog2(N_IN)-1:0] buf_widx;
  logic [31:0] buf_wdata, buf_rdata;
  logic [$clog2(N_OUT)-1:0] buf_ridx;
  logic [31:0] m_awaddr, m_wdata, m_araddr, m_rdata;
  logic [2:0]  m_awprot, m_arprot;
  logic [3:0]  m_wstrb;
  logic [1:0]  m_bresp, m_rresp;
  logic m_awvalid, m_awready, m_wvalid, m_wready, m_bvalid, m_bready;
  logic m_arvalid, m_arready, m_rvalid, m_rready;
  int checks = 0, failures = 0;

  io_data_controller dut (.*);

  axil_mem_model #(.DEPTH(256), .STALL_PCT(40), .ERR_ADDR(32'h400)) mem (
    .clk, .rst_n,
    .awaddr(m_awaddr), .awprot(m_awprot), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .araddr(m_araddr), .arprot(m_arprot), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rvalid(m_rvalid), .rready(m_rready));

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

  // buffer side: output words to send, input words received
  logic [31:0] out_words [N_OUT];
  logic [31:0] got [$];
  int          got_idx [$];
  int          n_done = 0;
  assign buf_rdata = out_words[buf_ridx];
  always @(posedge clk) begin
    if (buf_we) begin got.push_back(buf_wdata); got_idx.push_back(int'(buf_widx)); end
    if (done) n_done++;
  end

  task automatic issue(input xfer_cmd_e c);
    @(negedge clk); cmd_valid = 1; cmd = c;
    @(negedge clk); cmd_valid = 0; cmd = XFER_NONE;
    // a second command while busy must be ignored
    if ($urandom_range(0, 1)) begin
      @(negedge clk); cmd_valid = 1; cmd = XFER_READ;
      @(negedge clk); cmd_valid = 0; cmd = XFER_NONE;
    end
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  logic [31:0] snapshot [256];
  int ib, ob;
  bit err_seen;
  always @(posedge clk) if (done && resp_err) err_seen = 1;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 200; r++) begin
      for (int i = 0; i < 256; i++) mem.mem[i] = $urandom;
      ib = $urandom_range(0, 256 - N_IN);
      ob = $urandom_range(0, 256 - N_OUT);
      in_addr = 32'(ib * 4); out_addr = 32'(ob * 4);
      got.delete(); got_idx.delete(); n_done = 0; err_seen = 0;
      issue(XFER_READ);
      check(got.size() == N_IN, "number of buffer writes");
      for (int i = 0; i < N_IN && i < got.size(); i++)
        check(got[i] == mem.mem[ib + i] && got_idx[i] == i, "input word");
      check(n_done == 1, "one done per read");
      check(!err_seen, "no error on a good read");
      for (int i = 0; i < N_OUT; i++) out_words[i] = $urandom;
      for (int i = 0; i < 256; i++) snapshot[i] = mem.mem[i];
      n_done = 0;
      issue(XFER_WRITE);
      for (int i = 0; i < 256; i++)
        if (i >= ob && i < ob + N_OUT) check(mem.mem[i] == out_words[i - ob], "output word");
        else if (mem.mem[i] != snapshot[i]) check(0, "stray write");
      check(n_done == 1, "one done per write");
      check(!busy, "idle after done");
    end
    // unmapped addresses answer with an error response
    err_seen = 0;
    in_addr = 32'h400; issue(XFER_READ);
    check(err_seen, "read error reported");
    err_seen = 0;
    out_addr = 32'h3FC; issue(XFER_WRITE);
    check(err_seen, "write error reported");
    $display("memory stalls %0d", mem.n_stalls);
    check(mem.n_stalls > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
