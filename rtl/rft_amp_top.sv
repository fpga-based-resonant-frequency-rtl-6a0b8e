// rft_amp_top: digital controller of a resonant-frequency-tracking class-D
// amplifier for an ultrasonic transducer.
//
// Loop: the sensing comparators deliver the driving voltage and transducer
// current as square waves (v_cmp, i_cmp). phase_detector compares them once
// per voltage period and reports whether the current leads (+1) or lags (-1).
// dx_updown_counter adds or subtracts one from the frequency word dx
// accordingly. toggle_counter, the loop's oscillator, turns dx into a triangle
// wave x at f = CLK_HZ*dx/(2*XMAX). one_pulse_pwm compares x with the
// switching points x1 < x2 < x3 to form the optimal one-pulse three-level
// waveform, and bridge_driver turns the level into the four gate commands of
// the H-bridge, with dead time. Current leading means the drive is below the
// transducer's zero-phase (resonant) frequency, so the loop raises it, and
// vice versa; it settles dithering by one step around resonance.
//
// The loop structure, the +1/-1 tuning rule, the start at the nominal
// frequency, the triangle comparison with three points and the optimal
// switching time tau = 0.517 rad follow the document. Clock frequency, counter
// widths, the 20..80 kHz clamp of dx, dead time and the synchroniser are this
// design's choices (see each module).
//
// Parameters: CLK_HZ clock frequency; F_NOM_HZ start frequency; F_MIN_HZ and
// F_MAX_HZ the tuning range; TAU_RAD switching time; DEAD_CYC dead time in
// clocks; SYNC_STAGES and SAMPLE_DIV of the phase detector.
// Resolution at the defaults: 50e6/(2*(2^24-1)) = 1.49 Hz per dx step.
//
// Interface: en starts and stops the bridge; while en is low all switches are
// off and dx is frozen. gates are the switching commands. dx, x, level,
// fund_pos, pd_sample, pd_lead, dx_at_min, dx_at_max, x_down, x_top,
// x_bottom and dead are observation outputs of the blocks below (fund_pos is
// high during the positive half of the driven fundamental).
module rft_amp_top #(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned F_NOM_HZ    = 35_000,
  parameter int unsigned F_MIN_HZ    = 20_000,
  parameter int unsigned F_MAX_HZ    = 80_000,
  parameter real         TAU_RAD     = 0.517,
  parameter int unsigned DEAD_CYC    = 10,
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned SAMPLE_DIV  = 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      v_cmp,
  input  logic                      i_cmp,
  output rft_pkg::gate_cmd_t        gates,
  output logic [rft_pkg::DX_W-1:0]  dx,
  output logic [rft_pkg::X_W-1:0]   x,
  output rft_pkg::level_t           level,
  output logic                      fund_pos,
  output logic                      pd_sample,
  output logic                      pd_lead,
  output logic                      dx_at_min,
  output logic                      dx_at_max,
  output logic                      x_down,
  output logic                      x_top,
  output logic                      x_bottom,
  output logic                      dead
);

  import rft_pkg::*;

  localparam int unsigned DX_INIT = dx_from_hz(real'(F_NOM_HZ), real'(CLK_HZ), X_W);
  localparam int unsigned DX_MIN  = dx_from_hz(real'(F_MIN_HZ), real'(CLK_HZ), X_W);
  localparam int unsigned DX_MAX  = dx_from_hz(real'(F_MAX_HZ), real'(CLK_HZ), X_W);
  localparam logic [X_W-1:0] X1   = X_W'(x_point(TAU_RAD, X_W, 1));
  localparam logic [X_W-1:0] X2   = X_W'(x_point(TAU_RAD, X_W, 2));
  localparam logic [X_W-1:0] X3   = X_W'(x_point(TAU_RAD, X_W, 3));

  phase_detector #(
    .SYNC_STAGES (SYNC_STAGES),
    .SAMPLE_DIV  (SAMPLE_DIV)
  ) u_pd (
    .clk    (clk),
    .rst_n  (rst_n),
    .v_cmp  (v_cmp),
    .i_cmp  (i_cmp),
    .sample (pd_sample),
    .lead   (pd_lead)
  );

  dx_updown_counter #(
    .DX_W    (DX_W),
    .DX_INIT (DX_INIT),
    .DX_MIN  (DX_MIN),
    .DX_MAX  (DX_MAX)
  ) u_dx (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (en),
    .step   (pd_sample),
    .up     (pd_lead),
    .dx     (dx),
    .at_min (dx_at_min),
    .at_max (dx_at_max)
  );

  toggle_counter #(
    .X_W  (X_W),
    .DX_W (DX_W)
  ) u_tri (
    .clk    (clk),
    .rst_n  (rst_n),
    .dx     (dx),
    .x      (x),
    .down   (x_down),
    .top    (x_top),
    .bottom (x_bottom)
  );

  one_pulse_pwm #(
    .X_W (X_W)
  ) u_pwm (
    .clk      (clk),
    .rst_n    (rst_n),
    .x        (x),
    .x1       (X1),
    .x2       (X2),
    .x3       (X3),
    .level    (level),
    .fund_pos (fund_pos)
  );

  bridge_driver #(
    .DEAD_CYC (DEAD_CYC)
  ) u_bridge (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .level (level),
    .gates (gates),
    .dead  (dead)
  );

endmodule
