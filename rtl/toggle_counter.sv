// toggle_counter: the digitally controlled oscillator of the tracking loop.
//
// x counts up by dx every clock until the next step would overflow past
// XMAX = 2^X_W-1; then the counting mode toggles to down. Counting down, it
// toggles back to up when the next step would underflow below 0. The result is
// a triangle wave x whose frequency is proportional to dx:
//   f = CLK_HZ * dx / (2 * XMAX).
// On a toggle the part of the step that overshoots is reflected back from the
// limit (x = 2*XMAX - (x+dx) at the top, x = dx - x at the bottom), so that
// every sweep covers exactly 2*XMAX and the average frequency follows the
// formula above without a bias from truncated steps. This reflection is this
// design's choice; the up/down toggle on overflow and underflow is the
// document's.
//
// Interface: dx may change at any clock and is used from the next step on; it
// must be at most XMAX. x and down are registered. top/bottom pulse for one
// clock in the clock the mode toggles (overflow and underflow events).
// After reset x = 0, counting up.
module toggle_counter #(
  parameter int unsigned X_W  = rft_pkg::X_W,
  parameter int unsigned DX_W = rft_pkg::DX_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [DX_W-1:0] dx,
  output logic [X_W-1:0]  x,
  output logic            down,     // current counting mode
  output logic            top,      // overflow: mode toggled to down
  output logic            bottom    // underflow: mode toggled to up
);

  localparam logic [X_W:0] XMAX = {1'b0, {X_W{1'b1}}};

  logic [X_W:0] step_w;   // dx zero-extended to X_W+1 bits
  logic [X_W:0] sum;      // x + dx, one bit wider to see the overflow

  assign step_w = (X_W + 1)'(dx);
  assign sum    = {1'b0, x} + step_w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x      <= '0;
      down   <= 1'b0;
      top    <= 1'b0;
      bottom <= 1'b0;
    end else begin
      top    <= 1'b0;
      bottom <= 1'b0;
      if (!down) begin
        if (sum > XMAX) begin
          x    <= X_W'((XMAX << 1) - sum);
          down <= 1'b1;
          top  <= 1'b1;
        end else begin
          x <= X_W'(sum);
        end
      end else begin
        if ({1'b0, x} < step_w) begin
          x      <= X_W'(step_w - {1'b0, x});
          down   <= 1'b0;
          bottom <= 1'b1;
        end else begin
          x <= X_W'({1'b0, x} - step_w);
        end
      end
    end
  end

  initial begin
    assert (DX_W <= X_W) else $error("toggle_counter: DX_W must not exceed X_W");
  end

endmodule
