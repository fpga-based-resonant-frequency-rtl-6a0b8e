// rft_pkg: types and constants shared by the resonant-frequency-tracking
// amplifier controller.
//
// The controller drives a full (H) bridge of four NMOS switches that produces a
// three-level voltage: +Vdd, 0 or -Vdd across the output filter. The level the
// PWM asks for is carried as level_t; the four gate commands as gate_cmd_t.
//
// Frequency arithmetic: the triangle wave x runs between 0 and XMAX = 2^X_W-1
// and moves by dx every clock, so one full up-and-down sweep takes
// 2*XMAX/dx clocks and the driving frequency is f = CLK_HZ*dx/(2*XMAX).
// dx_from_hz() inverts that. The switching points for the one-pulse PWM follow
// from the switching time tau (radians, period normalised to 2*pi): the
// triangle's midpoint marks the zero crossing of the fundamental, and the
// pulse edges lie tau/pi of a half sweep either side of it, see one_pulse_pwm.
// Both helpers are only evaluated at elaboration time, to set parameter
// defaults.
package rft_pkg;

  // Width of the triangle-wave counter x (this design's choice).
  localparam int unsigned X_W  = 24;
  // Width of the frequency word dx; 16 bits cover up to 97 kHz at 50 MHz.
  localparam int unsigned DX_W = 16;

  // Output level requested from the bridge.
  typedef enum logic [1:0] {
    LVL_ZERO = 2'd0,   // both low-side switches on, output shorted
    LVL_POS  = 2'd1,   // leg A high, leg B low: +Vdd
    LVL_NEG  = 2'd2    // leg A low, leg B high: -Vdd
  } level_t;

  // Gate commands of the four bridge switches (1 = switch on).
  typedef struct packed {
    logic a_hi;
    logic a_lo;
    logic b_hi;
    logic b_lo;
  } gate_cmd_t;

  localparam gate_cmd_t GATES_OFF = '{a_hi: 1'b0, a_lo: 1'b0, b_hi: 1'b0, b_lo: 1'b0};

  // Frequency word giving f_hz at clock clk_hz with an xw-bit triangle counter.
  function automatic int unsigned dx_from_hz(real f_hz, real clk_hz, int unsigned xw);
    real xmax;
    xmax = real'((64'd1 << xw) - 64'd1);
    return int'($rtoi(f_hz * 2.0 * xmax / clk_hz + 0.5));
  endfunction

  // Switching point k (1, 2 or 3) of the one-pulse PWM for switching time tau.
  //   x1 = XMAX*(1/2 - tau/pi), x2 = XMAX/2, x3 = XMAX*(1/2 + tau/pi)
  function automatic int unsigned x_point(real tau, int unsigned xw, int k);
    real xmax;
    real frac;
    xmax = real'((64'd1 << xw) - 64'd1);
    case (k)
      1:       frac = 0.5 - tau / 3.14159265358979;
      3:       frac = 0.5 + tau / 3.14159265358979;
      default: frac = 0.5;
    endcase
    if (frac < 0.0) frac = 0.0;
    if (frac > 1.0) frac = 1.0;
    return int'($rtoi(xmax * frac + 0.5));
  endfunction

endpackage
