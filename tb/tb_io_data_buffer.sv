// tb_io_data_buffer: self-checking testbench of the I/O data buffer.
//
// Random input words are written through the write port and must appear on
// the controller inputs (low bits of words 0 and 1). Random controller outputs
// are presented; they must reach the read port only on a capture strobe, in
// the word layout of hil_pkg, and must hold while the outputs keep changing.
module tb_io_data_buffer;
  import hil_pkg::*;
  localparam int ADC_BITS = 8, DPWM_BITS = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_we = 1'b0, capture = 1'b0;
  logic [$clog2(N_IN)-1:0]  in_idx = '0;
  logic [AXI_DW-1:0]        in_wdata = '0, rd_data;
  logic [$clog2(N_OUT)-1:0] rd_idx = '0;
  logic [ADC_BITS-1:0]      vsens, vref;
  logic d_hs = 0, d_ls = 0, sat = 0;
  logic [DPWM_BITS-1:0] duty = '0, pwm_cnt = '0;
  logic signed [ADC_BITS:0] err = '0;
  int checks = 0, failures = 0;

  io_data_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  logic [31:0] w0, w1, exp_out[N_OUT];
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // after reset everything reads zero
    for (int i = 0; i < N_OUT; i++) begin
      rd_idx = ($clog2(N_OUT))'(i); #1;
      check(rd_data == 0, "reset value");
    end
    check(vsens == 0 && vref == 0, "reset inputs");
    for (int k = 0; k < 500; k++) begin
      w0 = $urandom; w1 = $urandom;
      @(negedge clk); in_we = 1; in_idx = 0; in_wdata = w0;
      @(negedge clk); in_idx = 1; in_wdata = w1;
      @(negedge clk); in_we = 0; in_wdata = $urandom;
      check(vsens == w0[7:0] && vref == w1[7:0], "controller inputs");
      // new controller outputs, captured
      {d_hs, sat} = 2'($urandom); d_ls = !d_hs;
      duty = DPWM_BITS'($urandom); pwm_cnt = DPWM_BITS'($urandom);
      err = (ADC_BITS+1)'($urandom);
      exp_out[0] = {29'd0, sat, d_ls, d_hs};
      exp_out[1] = 32'(duty);
      exp_out[2] = {{23{err[8]}}, err};
      exp_out[3] = 32'(pwm_cnt);
      capture = 1;
      @(negedge clk); capture = 0;
      // outputs move on; the snapshot must not
      duty = DPWM_BITS'($urandom); pwm_cnt = DPWM_BITS'($urandom); err = (ADC_BITS+1)'($urandom);
      d_hs = !d_hs; d_ls = !d_ls;
      @(negedge clk);
      for (int i = 0; i < N_OUT; i++) begin
        rd_idx = ($clog2(N_OUT))'(i); #1;
        check(rd_data == exp_out[i], $sformatf("output word %0d", i));
      end
      check(vsens == w0[7:0] && vref == w1[7:0], "inputs held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
