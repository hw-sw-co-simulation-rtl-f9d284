// digital_controller: the emulated device under test, the digital control loop
// of the synchronous buck converter: summing node and PI compensator
// (pi_controller) feeding a DPWM (dpwm).
//
// The DPWM counter marks the start of each switching period; on that clock the
// compensator samples Vsens[n] and Vref[n] and one clock later presents the new
// duty command, which the DPWM applies from the next period on. So a change of
// Vsens[n] reaches the gate signal after one to two switching periods.
//
// In the emulator this module runs on the gated clock: it advances only while
// the sync controller lets the clock through, and its inputs are held steady by
// the I/O data buffer while it runs. Nothing inside it knows it is emulated.
// Parameter defaults are the first case-study configuration's (8-bit ADC codes, 10-bit DPWM
// of 1000 counts, PI control); the gains are this design's own.
module digital_controller #(
  parameter int unsigned ADC_BITS  = 8,
  parameter int unsigned DPWM_BITS = 10,
  parameter int unsigned PERIOD    = 1000,
  parameter int unsigned FRAC      = 8,
  parameter int signed   KP        = 16,
  parameter int signed   KI        = 2
) (
  input  logic                     clk,        // controller clock (gated)
  input  logic                     rst_n,
  input  logic [ADC_BITS-1:0]      vsens,      // Vsens[n], ADC code
  input  logic [ADC_BITS-1:0]      vref,       // Vref[n], ADC code
  output logic                     d_hs,       // d(t), high-side gate
  output logic                     d_ls,       // low-side gate
  output logic [DPWM_BITS-1:0]     duty,       // duty applied in this period
  output logic signed [ADC_BITS:0] err,        // e[n]
  output logic [DPWM_BITS-1:0]     pwm_cnt,    // DPWM counter
  output logic                     sat         // compensator output saturated
);

  logic                 sample;
  logic [DPWM_BITS-1:0] duty_cmd;
  logic                 sat_hi, sat_lo;

  pi_controller #(
    .ADC_BITS (ADC_BITS),
    .DPWM_BITS(DPWM_BITS),
    .DUTY_MAX (PERIOD - 1),
    .FRAC     (FRAC),
    .KP       (KP),
    .KI       (KI)
  ) u_pi (
    .clk   (clk),
    .rst_n (rst_n),
    .sample(sample),
    .vsens (vsens),
    .vref  (vref),
    .err   (err),
    .duty  (duty_cmd),
    .sat_hi(sat_hi),
    .sat_lo(sat_lo)
  );

  dpwm #(
    .DPWM_BITS(DPWM_BITS),
    .PERIOD   (PERIOD)
  ) u_dpwm (
    .clk    (clk),
    .rst_n  (rst_n),
    .duty_in(duty_cmd),
    .d_hs   (d_hs),
    .d_ls   (d_ls),
    .sample (sample),
    .cnt    (pwm_cnt),
    .duty_q (duty)
  );

  assign sat = sat_hi | sat_lo;

endmodule
