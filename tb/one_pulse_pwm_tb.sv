// one_pulse_pwm_tb: self-checking test of the one-pulse PWM comparator.
//
// Part 1 feeds random triangle values and compares level and fund_pos, one
// clock later, with thresholds computed here from tau:
//   x1 = XMAX*(1/2 - tau/pi), x3 = XMAX*(1/2 + tau/pi), x2 = XMAX/2.
// Part 2 runs a full triangle through the comparator and checks the
// waveform's shape: the +1 pulse and the -1 pulse each last (pi - 2*tau)/(2*pi)
// of the period, they are centred on the triangle's peak and trough, and the
// fundamental reference is high for half a period. It is run for the optimal
// tau = 0.517 rad and for tau = 0, the square wave.
module one_pulse_pwm_tb;

  import rft_pkg::*;

  localparam int  XW   = 12;
  localparam int  XMAX = (1 << XW) - 1;
  localparam real PI   = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [XW-1:0] x = '0, x1, x2, x3;
  level_t level;
  logic fund_pos;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  one_pulse_pwm #(.X_W(XW)) dut (
    .clk(clk), .rst_n(rst_n), .x(x), .x1(x1), .x2(x2), .x3(x3), .level(level), .fund_pos(fund_pos)
  );

  task automatic set_tau(real tau);
    x1 = XW'($rtoi(real'(XMAX) * (0.5 - tau / PI) + 0.5));
    x2 = XW'($rtoi(real'(XMAX) * 0.5 + 0.5));
    x3 = XW'($rtoi(real'(XMAX) * (0.5 + tau / PI) + 0.5));
  endtask

  task automatic random_part(int n);
    level_t exp_l;
    logic   exp_f;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: x = x1 + XW'($urandom_range(0, 2)) - 1'b1;   // near the edges
        1: x = x3 + XW'($urandom_range(0, 2)) - 1'b1;
        default: x = XW'($urandom_range(0, XMAX));
      endcase
      exp_l = (x > x3) ? LVL_POS : (x < x1) ? LVL_NEG : LVL_ZERO;
      exp_f = (x > x2);
      @(posedge clk); #1;
      checks++;
      if (level != exp_l || fund_pos != exp_f) begin
        failures++;
        $display("FAIL x=%0d level=%0d/%0d fund=%0b/%0b", x, level, exp_l, fund_pos, exp_f);
      end
    end
  endtask

  // One triangle period of 2*XMAX/d clocks starting at the midpoint, rising.
  task automatic triangle_part(real tau, int d);
    int xi, dir, n, n_pos, n_neg, n_f, pos_c, neg_c, peak_c, trough_c;
    real frac_exp;
    xi = XMAX / 2; dir = 1;
    n = 0; n_pos = 0; n_neg = 0; n_f = 0; pos_c = 0; neg_c = 0; peak_c = 0; trough_c = 0;
    for (int i = 0; i < 2 * XMAX / d; i++) begin
      @(negedge clk);
      x = XW'(xi);
      if (xi + d * dir > XMAX) begin dir = -1; peak_c = i; end
      else if (xi + d * dir < 0) begin dir = 1; trough_c = i; end
      xi = xi + d * dir;
      @(posedge clk); #1;
      n++;
      if (level == LVL_POS) begin n_pos++; pos_c += i; end
      if (level == LVL_NEG) begin n_neg++; neg_c += i; end
      if (fund_pos) n_f++;
    end
    frac_exp = (PI - 2.0 * tau) / (2.0 * PI);
    checks++;
    if ($rtoi(real'(n_pos) - frac_exp * n + 2.5) > 4 || $rtoi(frac_exp * n - real'(n_pos) + 2.5) > 4 ||
        n_pos - n_neg > 2 || n_neg - n_pos > 2) begin
      failures++;
      $display("FAIL tau=%f pulse widths %0d/%0d of %0d, expected %f", tau, n_pos, n_neg, n, frac_exp * n);
    end
    checks++;
    if (n_f - n / 2 > 2 || n / 2 - n_f > 2) begin
      failures++;
      $display("FAIL fundamental high for %0d of %0d", n_f, n);
    end
    // centres: the +1 pulse around the peak, the -1 pulse around the trough
    checks++;
    if (n_pos > 0 && n_neg > 0 &&
        ((pos_c / n_pos - peak_c > 2) || (peak_c - pos_c / n_pos > 2) ||
         (neg_c / n_neg - trough_c > 2) || (trough_c - neg_c / n_neg > 2))) begin
      failures++;
      $display("FAIL pulse centres %0d/%0d, peak %0d trough %0d", pos_c / n_pos, neg_c / n_neg, peak_c, trough_c);
    end
  endtask

  initial begin
    set_tau(0.517);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    random_part(3000);
    triangle_part(0.517, 3);
    triangle_part(0.517, 7);
    set_tau(0.0);
    random_part(1000);
    triangle_part(0.0, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
