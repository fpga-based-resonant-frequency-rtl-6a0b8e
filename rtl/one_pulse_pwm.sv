// one_pulse_pwm: optimal one-pulse three-level PWM from the triangle wave.
//
// With the driving period normalised to 2*pi, the one-pulse waveform is 0 up
// to the switching time tau, +1 from tau to pi-tau, 0 again to pi+tau, -1 from
// pi+tau to 2*pi-tau and 0 to the end of the period. It has odd, quarter-wave
// symmetry, its odd harmonics are a_n = 4/(n*pi)*cos(n*tau), and the
// modulation index is m = a_1 = 4/pi*cos(tau). The switching time that
// minimises the distortion after the output filter is tau = 0.517 rad
// (m = 1.107, about 2.43 % THD against 15.3 % for a square wave, tau = 0).
//
// The waveform is made by comparing the triangle x with three prescribed
// levels x1 <= x2 <= x3. x2 = XMAX/2 is the triangle's midpoint; taking its
// rising crossing as t = 0 puts the triangle peak at pi/2 and the trough at
// 3*pi/2, so
//   x > x3 = XMAX*(1/2 + tau/pi)  ->  +1   (pulse centred on pi/2)
//   x < x1 = XMAX*(1/2 - tau/pi)  ->  -1   (pulse centred on 3*pi/2)
//   otherwise                      ->   0
// and x > x2 is the positive half of the fundamental, given out as fund_pos.
// rft_pkg::x_point() computes the three levels from tau. Comparing the
// triangle with x1, x2 and x3 is the document's method; which phase of the
// triangle is t = 0, and the use of x2 as the fundamental's zero crossing, are
// this design's reading of it.
//
// Interface: x1..x3 are static settings (x1 <= x2 <= x3). level and fund_pos
// are registered, one clock after x.
module one_pulse_pwm #(
  parameter int unsigned X_W = rft_pkg::X_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [X_W-1:0] x,
  input  logic [X_W-1:0] x1,
  input  logic [X_W-1:0] x2,
  input  logic [X_W-1:0] x3,
  output rft_pkg::level_t level,
  output logic           fund_pos
);

  import rft_pkg::*;

  level_t level_d;

  always_comb begin
    if (x > x3)      level_d = LVL_POS;
    else if (x < x1) level_d = LVL_NEG;
    else             level_d = LVL_ZERO;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level    <= LVL_ZERO;
      fund_pos <= 1'b0;
    end else begin
      level    <= level_d;
      fund_pos <= (x > x2);
    end
  end

  a_points_ordered: assert property (@(posedge clk) disable iff (!rst_n) x1 <= x2 && x2 <= x3)
    else $error("one_pulse_pwm: switching points out of order");

endmodule
