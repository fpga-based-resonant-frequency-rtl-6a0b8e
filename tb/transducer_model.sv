// transducer_model: behavioural model (not synthesizable) of everything
// between the bridge's gate commands and the controller's comparator inputs:
// power stage, output filter, transducer, sensing amplifiers and comparators.
//
// The transducer is the usual Butterworth-Van Dyke circuit: a motional series
// RLC branch with series resonance f0_hz and quality factor Q_FACTOR, in
// parallel with the electrode capacitance C0 = C0_RATIO * C. With R = 1 and
// x = Q*(f/f0 - f0/f) the admittance is
//   Y = j*C0_RATIO*(f/f0)/Q + (1 - j*x)/(1 + x*x),
// and the current leads the voltage by phi = arg(Y): leading below resonance,
// lagging above. Because of C0 the zero-phase frequency lies slightly above
// f0, by about f0*C0_RATIO/(2*Q^2). The filtered driving voltage is
// taken to be in phase with the fundamental of the bridge voltage, whose
// positive zero crossing lies a quarter period before the centre of each +1
// pulse.
//
// Each clock the model samples the bridge voltage (+1 when A-high and B-low
// are on, -1 when B-high and A-low are on, else 0). At the end of every +1
// pulse it updates its estimate of the pulse centre and of the period T (the
// distance between two centres, averaged over about two periods because
// each centre is only known to half a clock). From those it produces the comparator
// outputs: v_cmp is high in the positive half of the voltage fundamental and
// i_cmp the same square wave shifted earlier by phi/(2*pi)*T. Both stay low
// until two pulses have been seen. The measured drive frequency and phase are
// given out as f_meas_hz and phi_deg for the testbench.
module transducer_model #(
  parameter real CLK_HZ   = 50.0e6,
  parameter real Q_FACTOR = 200.0,
  parameter real C0_RATIO = 4.0
) (
  input  logic               clk,
  input  rft_pkg::gate_cmd_t gates,
  input  real                f0_hz,
  output logic               v_cmp,
  output logic               i_cmp,
  output real                f_meas_hz,
  output real                phi_deg
);

  localparam real PI = 3.14159265358979;

  longint cyc = 0;
  logic   pos_q = 1'b0;
  longint rise_c = 0;
  real    centre = 0.0, prev_centre = 0.0, period = 0.0;
  int     n_pulses = 0;
  real    phi = 0.0;

  initial begin
    v_cmp = 1'b0;
    i_cmp = 1'b0;
    f_meas_hz = 0.0;
    phi_deg = 0.0;
  end

  function automatic logic sq(real t, real t0, real per);
    real r;
    r = (t - t0) / per;
    r = r - $floor(r);
    return r < 0.5;
  endfunction

  always @(posedge clk) begin
    logic pos;
    real  f, dv;
    cyc <= cyc + 1;
    pos = gates.a_hi && gates.b_lo;
    if (pos && !pos_q) rise_c = cyc;
    if (!pos && pos_q) begin
      prev_centre = centre;
      centre = (real'(rise_c) + real'(cyc)) / 2.0;
      n_pulses++;
      if (n_pulses == 2) period = centre - prev_centre;
      // centres are known to half a clock, so the period is averaged
      if (n_pulses > 2) period = period + (centre - prev_centre - period) / 2.0;
      if (n_pulses >= 2) begin
        f = CLK_HZ / period;
        dv = Q_FACTOR * (f / f0_hz - f0_hz / f);
        phi = $atan2(C0_RATIO * (f / f0_hz) / Q_FACTOR - dv / (1.0 + dv * dv),
                     1.0 / (1.0 + dv * dv));
        f_meas_hz = f;
        phi_deg = phi * 180.0 / PI;
      end
    end
    pos_q <= pos;
    if (n_pulses >= 2 && period > 0.0) begin
      // voltage zero crossing a quarter period before the pulse centre
      v_cmp <= sq(real'(cyc), centre - period / 4.0, period);
      i_cmp <= sq(real'(cyc), centre - period / 4.0 - phi / (2.0 * PI) * period, period);
    end else begin
      v_cmp <= 1'b0;
      i_cmp <= 1'b0;
    end
  end

endmodule
