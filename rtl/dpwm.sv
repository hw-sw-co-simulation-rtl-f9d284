// dpwm: counter-based digital pulse width modulator of the buck converter
// controller.
//
// A counter runs from 0 to PERIOD-1 on every clock, so the switching frequency
// is f_clk / PERIOD (100 MHz / 1000 = 100 kHz with the defaults, the switching
// frequency and 1000-count resolution of the first case-study configuration). The
// high-side gate d_hs is on while the counter is below the duty value; the
// low-side gate d_ls is its complement, as in a synchronous buck whose
// low-side switch is driven through an inverter. The duty command is taken
// from duty_in only on the last count of a period, so it never changes within
// a period (no glitches or double pulses). sample pulses on count 0 and tells
// the compensator that a new period, and with it a new sample Vsens[n],
// begins. A command of PERIOD or more gives a gate that stays on.
//
// The counter-comparator structure, the update at the period boundary, the
// absence of dead time and the reset to duty 0 (both gates: high-side off,
// low-side on) are this design's choices; the resolution, period and clock
// rate follow the first case-study configuration.
module dpwm #(
  parameter int unsigned DPWM_BITS = 10,    // duty / counter width
  parameter int unsigned PERIOD    = 1000   // counts per switching period
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DPWM_BITS-1:0] duty_in,     // requested on-time in counts
  output logic                 d_hs,        // high-side switch gate, d(t)
  output logic                 d_ls,        // low-side switch gate
  output logic                 sample,      // first count of a period
  output logic [DPWM_BITS-1:0] cnt,         // position inside the period
  output logic [DPWM_BITS-1:0] duty_q       // duty applied in this period
);

  initial begin
    assert (PERIOD >= 2 && PERIOD <= (1 << DPWM_BITS))
      else $fatal(1, "dpwm: PERIOD must fit in DPWM_BITS");
  end

  localparam logic [DPWM_BITS-1:0] LAST = DPWM_BITS'(PERIOD - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      duty_q <= '0;
    end else if (cnt == LAST) begin
      cnt    <= '0;
      duty_q <= duty_in;
    end else begin
      cnt    <= cnt + 1'b1;
    end
  end

  always_comb begin
    d_hs   = (cnt < duty_q);
    d_ls   = !d_hs;
    sample = (cnt == '0);
  end

endmodule
