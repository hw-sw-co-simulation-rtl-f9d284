// pi_controller: summing node and proportional-integral compensator H(z) of the
// buck converter controller.
//
// Once per switching period (sample high) it forms the error
//   e[n] = Vref[n] - Vsens[n]                     (ADC codes, signed)
// and updates
//   I[n] = clamp(I[n-1] + KI*e[n], 0, DUTY_MAX*2^FRAC)
//   u[n] = clamp((I[n] + KP*e[n]) >> FRAC, 0, DUTY_MAX)
// where KP and KI are signed fixed-point gains with FRAC fractional bits and
// u[n] is the duty command in DPWM counts. The integrator is clamped to the
// duty range so that it cannot wind up while the output saturates. e[n], u[n]
// and the saturation flags are registered: they change on the clock edge on
// which sample is high and hold until the next sample. Setting KP to 0 gives
// the pure integral control of the second case-study configuration.
//
// The error node, the PI structure, the 8-bit ADC and 10-bit DPWM widths
// follow the original proposal. The gains, the fixed-point format, the parallel
// (position) form, the anti-windup clamp and the reset value (duty 0) are this
// design's choices: the gain values are not given, and the defaults were picked
// to keep the first case-study configuration's power stage (38 uH, 200 uF, 5 ohm, 11 V)
// stable at a 100 kHz sample rate.
module pi_controller #(
  parameter int unsigned ADC_BITS  = 8,     // width of Vsens[n] and Vref[n]
  parameter int unsigned DPWM_BITS = 10,    // width of the duty command
  parameter int unsigned DUTY_MAX  = 999,   // largest duty command
  parameter int unsigned GAIN_BITS = 16,    // width of the signed gains
  parameter int unsigned FRAC      = 8,     // fractional bits of the gains
  parameter int signed   KP        = 16,    // proportional gain * 2^FRAC
  parameter int signed   KI        = 2      // integral gain * 2^FRAC (per sample)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        sample,   // update strobe, once per period
  input  logic [ADC_BITS-1:0]         vsens,    // Vsens[n], ADC code
  input  logic [ADC_BITS-1:0]         vref,     // Vref[n], ADC code
  output logic signed [ADC_BITS:0]    err,      // e[n] of the last update
  output logic [DPWM_BITS-1:0]        duty,     // u[n], duty command
  output logic                        sat_hi,   // u[n] clamped at DUTY_MAX
  output logic                        sat_lo    // u[n] clamped at 0
);

  localparam int unsigned ACC_W = GAIN_BITS + ADC_BITS + DPWM_BITS + FRAC + 2;

  typedef logic signed [ACC_W-1:0] acc_t;

  localparam acc_t I_MAX = acc_t'(DUTY_MAX) <<< FRAC;
  localparam acc_t U_MAX = acc_t'(DUTY_MAX);

  initial begin
    assert (DUTY_MAX < (1 << DPWM_BITS))
      else $fatal(1, "pi_controller: DUTY_MAX must fit in DPWM_BITS");
  end

  acc_t integ_q;
  acc_t e_ext, i_sum, i_next, u_full, u_int;
  logic signed [GAIN_BITS-1:0] kp_c, ki_c;

  always_comb begin
    kp_c   = GAIN_BITS'(KP);
    ki_c   = GAIN_BITS'(KI);
    e_ext  = acc_t'($signed({1'b0, vref})) - acc_t'($signed({1'b0, vsens}));
    i_sum  = integ_q + acc_t'(ki_c) * e_ext;
    if (i_sum < 0)          i_next = '0;
    else if (i_sum > I_MAX) i_next = I_MAX;
    else                    i_next = i_sum;
    u_full = i_next + acc_t'(kp_c) * e_ext;
    u_int  = u_full >>> FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ_q <= '0;
      err     <= '0;
      duty    <= '0;
      sat_hi  <= 1'b0;
      sat_lo  <= 1'b0;
    end else if (sample) begin
      integ_q <= i_next;
      err     <= (ADC_BITS+1)'(e_ext);
      sat_hi  <= (u_int > U_MAX);
      sat_lo  <= (u_int < 0);
      if (u_int < 0)          duty <= '0;
      else if (u_int > U_MAX) duty <= DPWM_BITS'(DUTY_MAX);
      else                    duty <= DPWM_BITS'(u_int);
    end
  end

endmodule
