// io_data_buffer: the registers between the shared-memory transfers and the
// emulated digital controller.
//
// Input side: N_IN 32-bit words, written one at a time by the I/O data
// controller while it fetches the input buffer from shared memory. Their low
// bits drive the digital controller's inputs (word 0 -> Vsens[n], word 1 ->
// Vref[n]) and stay constant while the controller runs, so the controller sees
// the analog state of the last synchronization point for the whole window.
// Output side: on capture the controller's outputs are copied into N_OUT
// 32-bit words (gate and saturation bits, duty, error, DPWM counter; layout in hil_pkg),
// which the I/O data controller then reads word by word (rd_idx -> rd_data,
// combinational) to store them in shared memory. Capturing once, after the
// controller clock has stopped, gives a consistent snapshot.
//
// The block and its place between the two controllers follow the original proposal; the
// word layout, the register implementation and the reset to zero are this
// design's choices.
module io_data_buffer
  import hil_pkg::*;
#(
  parameter int unsigned ADC_BITS  = 8,
  parameter int unsigned DPWM_BITS = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // input words, from the I/O data controller
  input  logic                     in_we,
  input  logic [$clog2(N_IN)-1:0]  in_idx,
  input  logic [AXI_DW-1:0]        in_wdata,
  // output words, to the I/O data controller
  input  logic                     capture,
  input  logic [$clog2(N_OUT)-1:0] rd_idx,
  output logic [AXI_DW-1:0]        rd_data,
  // digital controller side
  output logic [ADC_BITS-1:0]      vsens,
  output logic [ADC_BITS-1:0]      vref,
  input  logic                     d_hs,
  input  logic                     d_ls,
  input  logic                     sat,
  input  logic [DPWM_BITS-1:0]     duty,
  input  logic signed [ADC_BITS:0] err,
  input  logic [DPWM_BITS-1:0]     pwm_cnt
);

  logic [AXI_DW-1:0] in_q  [N_IN];
  logic [AXI_DW-1:0] out_q [N_OUT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_IN; i++) in_q[i] <= '0;
    end else if (in_we) begin
      in_q[in_idx] <= in_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_OUT; i++) out_q[i] <= '0;
    end else if (capture) begin
      out_q[0] <= AXI_DW'({sat, d_ls, d_hs});
      out_q[1] <= AXI_DW'(duty);
      out_q[2] <= AXI_DW'(signed'(err));
      out_q[3] <= AXI_DW'(pwm_cnt);
    end
  end

  assign vsens   = in_q[0][ADC_BITS-1:0];
  assign vref    = in_q[1][ADC_BITS-1:0];
  assign rd_data = out_q[rd_idx];

endmodule
