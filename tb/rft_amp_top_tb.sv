// rft_amp_top_tb: end-to-end test of the resonant-frequency-tracking
// controller in closed loop with a behavioural transducer.
//
// The controller runs at its default clock, resolution and switching time,
// with the tuning range narrowed to 34.0..35.8 kHz so that both limits can be
// reached in a short run. Phases:
//   1. bridge disabled: all four switches must stay off and dx must not move;
//   2. transducer resonance 34.97 kHz, start at 35 kHz: the loop must settle
//      within a few resolution steps of resonance and dither there;
//   3. resonance drifts to 34.5 kHz, then to 35.3 kHz: the loop follows;
//   4. resonance moved outside the range (36.5 kHz, then 33.5 kHz): dx must
//      stop at the upper, then the lower limit;
//   5. bridge disabled again: switches off, dx frozen.
// While locked it also checks the drive waveform: the measured period against
// f = f_clk*dx/(2*XMAX), and the width of the +1 and -1 pulses against
// (pi - 2*tau)/(2*pi) of the period for tau = 0.517 rad.
// Every mechanism is counted: current-lead and current-lag decisions,
// triangle overflow and underflow toggles, both dx limits, dead times, the
// three output levels and the disabled state; one that never happens counts
// as a failure.
module rft_amp_top_tb;

  import rft_pkg::*;

  localparam real CLK_HZ = 50.0e6;
  localparam real XMAX   = 16777215.0;
  localparam real PI     = 3.14159265358979;
  localparam real TAU    = 0.517;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic v_cmp, i_cmp;
  gate_cmd_t gates;
  logic [DX_W-1:0] dx;
  logic [X_W-1:0]  x;
  level_t level;
  logic fund_pos, pd_sample, pd_lead, dx_at_min, dx_at_max, x_down, x_top, x_bottom, dead;
  real  f0 = 34970.0;
  real  f_meas, phi_deg;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_lead = 0, n_lag = 0, n_top = 0, n_bot = 0, n_max = 0, n_min = 0, n_dead = 0;
  int n_pos = 0, n_neg = 0, n_zero = 0, n_off = 0;

  always #10 clk = ~clk;   // 50 MHz

  rft_amp_top #(
    .F_MIN_HZ (34_000),
    .F_MAX_HZ (35_800)
  ) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .v_cmp(v_cmp), .i_cmp(i_cmp),
    .gates(gates), .dx(dx), .x(x), .level(level), .fund_pos(fund_pos),
    .pd_sample(pd_sample), .pd_lead(pd_lead), .dx_at_min(dx_at_min), .dx_at_max(dx_at_max),
    .x_down(x_down), .x_top(x_top), .x_bottom(x_bottom), .dead(dead)
  );

  transducer_model #(.CLK_HZ(CLK_HZ), .Q_FACTOR(200.0), .C0_RATIO(4.0)) u_xdcr (
    .clk(clk), .gates(gates), .f0_hz(f0), .v_cmp(v_cmp), .i_cmp(i_cmp),
    .f_meas_hz(f_meas), .phi_deg(phi_deg)
  );

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (pd_sample && en) begin
        if (pd_lead) n_lead++; else n_lag++;
      end
      if (x_top) n_top++;
      if (x_bottom) n_bot++;
      if (dx_at_max) n_max++;
      if (dx_at_min) n_min++;
      if (dead) n_dead++;
      if (gates == '{1'b1, 1'b0, 1'b0, 1'b1}) n_pos++;
      if (gates == '{1'b0, 1'b1, 1'b1, 1'b0}) n_neg++;
      if (gates == '{1'b0, 1'b1, 1'b0, 1'b1}) n_zero++;
      if (gates == GATES_OFF) n_off++;
    end
  end

  function automatic real dx_to_hz(logic [DX_W-1:0] d);
    return CLK_HZ * real'(d) / (2.0 * XMAX);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Run `periods` driving periods (at about 35 kHz) of closed loop.
  task automatic run_periods(int periods);
    repeat (periods * 1430) @(posedge clk);
  endtask

  // Measure pulse widths and period over a few periods and check them.
  task automatic check_waveform();
    longint t_rise [3];
    int     w_pos, w_neg, k;
    real    per, exp_per, frac;
    k = 0; w_pos = 0; w_neg = 0;
    // rising edges of the +1 pulse
    @(posedge clk iff (gates.a_hi && gates.b_lo));
    t_rise[0] = cyc;
    for (k = 1; k < 3; k++) begin
      @(posedge clk iff !(gates.a_hi && gates.b_lo));
      @(posedge clk iff (gates.a_hi && gates.b_lo));
      t_rise[k] = cyc;
    end
    // widths in the following period
    repeat (1) begin
      while (!(gates.a_hi && gates.b_lo)) @(posedge clk);
      while (gates.a_hi && gates.b_lo) begin w_pos++; @(posedge clk); end
      while (!(gates.b_hi && gates.a_lo)) @(posedge clk);
      while (gates.b_hi && gates.a_lo) begin w_neg++; @(posedge clk); end
    end
    per = real'(t_rise[2] - t_rise[0]) / 2.0;
    exp_per = 2.0 * XMAX / real'(dx);
    check(per > exp_per - 2.0 && per < exp_per + 2.0,
          $sformatf("drive period %f clocks, dx %0d predicts %f", per, dx, exp_per));
    frac = (PI - 2.0 * TAU) / (2.0 * PI);
    // the dead time shortens each pulse by DEAD_CYC = 10 clocks
    check(real'(w_pos + 10) > frac * per - 3.0 && real'(w_pos + 10) < frac * per + 3.0,
          $sformatf("+1 pulse %0d clocks, expected %f - 10", w_pos, frac * per));
    check(w_neg - w_pos <= 2 && w_pos - w_neg <= 2,
          $sformatf("pulse widths differ: +1 %0d, -1 %0d", w_pos, w_neg));
  endtask

  // The loop locks where voltage and current are in phase, which the
  // electrode capacitance of the model puts f0*C0_RATIO/(2*Q^2) above f0.
  // Over the next 100 decisions the mean drive frequency must be within
  // tol_hz of that point and dx must dither over at most 6 steps.
  task automatic check_lock(real tol_hz);
    real fz, sum, fmean;
    int unsigned dmin, dmax;
    fz = f0 * (1.0 + 4.0 / (2.0 * 200.0 * 200.0));
    sum = 0.0; dmin = 32'hffff_ffff; dmax = 0;
    for (int k = 0; k < 100; k++) begin
      @(posedge clk iff pd_sample);
      sum += dx_to_hz(dx);
      if (32'(dx) < dmin) dmin = 32'(dx);
      if (32'(dx) > dmax) dmax = 32'(dx);
    end
    fmean = sum / 100.0;
    $display("  resonance %8.2f Hz, zero phase %8.2f Hz, mean drive %8.2f Hz, dx %0d..%0d, phase %6.2f deg",
             f0, fz, fmean, dmin, dmax, phi_deg);
    check(fmean > fz - tol_hz && fmean < fz + tol_hz,
          $sformatf("not locked: mean drive %f Hz, zero-phase frequency %f Hz", fmean, fz));
    check(dmax - dmin <= 6, $sformatf("dx dithers over %0d steps", dmax - dmin));
  endtask

  initial begin
    logic [DX_W-1:0] dx0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // 1. disabled
    dx0 = dx;
    repeat (20000) @(posedge clk);
    check(gates == GATES_OFF, "switches on while disabled");
    check(dx == dx0, "dx moved while disabled");
    check(dx_to_hz(dx) > 34999.0 && dx_to_hz(dx) < 35001.0, "start frequency is not 35 kHz");

    // 2. lock to 34.97 kHz
    en = 1'b1;
    f0 = 34970.0;
    run_periods(150);
    check_lock(2.0);
    check_waveform();

    // 3. drift down and up
    f0 = 34500.0;
    run_periods(500);
    check_lock(2.0);
    f0 = 35300.0;
    run_periods(700);
    check_lock(2.0);
    check_waveform();

    // 4. beyond the range
    f0 = 36500.0;
    run_periods(500);
    check(dx == DX_W'(dx_from_hz(35800.0, CLK_HZ, X_W)), $sformatf("dx %0d not at upper limit", dx));
    f0 = 33500.0;
    run_periods(1400);
    check(dx == DX_W'(dx_from_hz(34000.0, CLK_HZ, X_W)), $sformatf("dx %0d not at lower limit", dx));

    // 5. disabled again
    en = 1'b0;
    dx0 = dx;
    repeat (100) @(posedge clk);
    f0 = 35000.0;
    repeat (20000) @(posedge clk);
    check(gates == GATES_OFF, "switches on after disable");
    check(dx == dx0, "dx moved while disabled");

    $display("mechanisms: lead=%0d lag=%0d top=%0d bottom=%0d at_max=%0d at_min=%0d dead=%0d",
             n_lead, n_lag, n_top, n_bot, n_max, n_min, n_dead);
    $display("levels: +1=%0d -1=%0d 0=%0d off=%0d", n_pos, n_neg, n_zero, n_off);
    check(n_lead > 0, "current never led");
    check(n_lag > 0, "current never lagged");
    check(n_top > 0 && n_bot > 0, "triangle never toggled");
    check(n_max > 0, "upper dx limit never reached");
    check(n_min > 0, "lower dx limit never reached");
    check(n_dead > 0, "no dead time");
    check(n_pos > 0 && n_neg > 0 && n_zero > 0 && n_off > 0, "an output state never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
