// pwm_spectrum_tb: harmonic content of the generated one-pulse PWM.
//
// toggle_counter and one_pulse_pwm at their default widths produce the drive
// waveform at 35 kHz, 20 kHz and 80 kHz (dx = 23488, 13422, 53687 at 50 MHz)
// for the optimal switching time tau = 0.517 rad, and at 35 kHz for tau = 0.
// Over one period, taken between two rising edges of the fundamental
// reference fund_pos, the testbench computes the Fourier coefficients of the
// level (+1/0/-1) and compares them with the closed form of the one-pulse
// waveform:
//   sine terms    a_n = 4/(n*pi)*cos(n*tau) for odd n, 0 for even n,
//   cosine terms  0 (odd symmetry about the reference),
// for n = 1..9, so a_1 is the modulation index 1.107 (tau = 0.517) or
// 4/pi (tau = 0). The tolerance, 0.012, covers the one-clock quantisation of
// the switching instants.
module pwm_spectrum_tb;

  import rft_pkg::*;

  localparam real PI  = 3.14159265358979;
  localparam real TOL = 0.012;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [DX_W-1:0] dx = DX_W'(23488);
  logic [X_W-1:0]  x, x1, x2, x3;
  logic down, top, bottom;
  level_t level;
  logic fund_pos, fund_q;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  toggle_counter u_tri (
    .clk(clk), .rst_n(rst_n), .dx(dx), .x(x), .down(down), .top(top), .bottom(bottom)
  );

  one_pulse_pwm u_pwm (
    .clk(clk), .rst_n(rst_n), .x(x), .x1(x1), .x2(x2), .x3(x3), .level(level), .fund_pos(fund_pos)
  );

  task automatic set_tau(real tau);
    x1 = X_W'(x_point(tau, X_W, 1));
    x2 = X_W'(x_point(tau, X_W, 2));
    x3 = X_W'(x_point(tau, X_W, 3));
  endtask

  task automatic analyse(int unsigned dxv, real tau);
    real lv [$];
    real a, b, ex, n_s, thd_num, a1;
    dx = DX_W'(dxv);
    set_tau(tau);
    // let the new step settle, then align to a rising edge of fund_pos
    repeat (3000) @(posedge clk);
    fund_q = fund_pos;
    while (1) begin
      @(posedge clk);
      if (fund_pos && !fund_q) break;
      fund_q = fund_pos;
    end
    lv.delete();
    fund_q = fund_pos;
    while (1) begin
      lv.push_back(level == LVL_POS ? 1.0 : level == LVL_NEG ? -1.0 : 0.0);
      @(posedge clk);
      if (fund_pos && !fund_q) break;
      fund_q = fund_pos;
    end
    n_s = real'(lv.size());
    thd_num = 0.0;
    for (int n = 1; n <= 9; n++) begin
      a = 0.0; b = 0.0;
      for (int k = 0; k < lv.size(); k++) begin
        // sample k covers phase (k+0.5)/N of the period after the reference
        a += lv[k] * $sin(2.0 * PI * n * (real'(k) + 0.5) / n_s);
        b += lv[k] * $cos(2.0 * PI * n * (real'(k) + 0.5) / n_s);
      end
      a = 2.0 * a / n_s;
      b = 2.0 * b / n_s;
      ex = (n % 2 == 1) ? 4.0 / (n * PI) * $cos(n * tau) : 0.0;
      if (n > 1) thd_num += a * a;
      if (n == 1) a1 = a;
      checks++;
      if (a - ex > TOL || ex - a > TOL || b > TOL || b < -TOL) begin
        failures++;
        $display("FAIL dx=%0d tau=%0.3f n=%0d: sine %0.4f (expected %0.4f), cosine %0.4f",
                 dxv, tau, n, a, ex, b);
      end
      if (n == 1)
        $display("dx=%0d (%0d clocks/period) tau=%0.3f: modulation index %0.4f, expected %0.4f",
                 dxv, lv.size(), tau, a, ex);
    end
    $display("  unfiltered harmonics 2..9 relative to the fundamental: %0.1f %%", 100.0 * $sqrt(thd_num) / a1);
    checks++;
    if (lv.size() < int'(2.0 * 16777215.0 / real'(dxv)) - 1 || lv.size() > int'(2.0 * 16777215.0 / real'(dxv)) + 1) begin
      failures++;
      $display("FAIL period %0d clocks", lv.size());
    end
  endtask

  initial begin
    set_tau(0.517);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    analyse(23488, 0.517);   // 35 kHz
    analyse(13422, 0.517);   // 20 kHz
    analyse(53687, 0.517);   // 80 kHz
    analyse(23488, 0.0);     // square wave
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
