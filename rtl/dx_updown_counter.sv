// dx_updown_counter: the frequency word of the tracking loop.
//
// dx is the step of the toggle counter, so it sets the driving frequency
// (f = CLK_HZ*dx/(2*XMAX), see rft_pkg). At each sampling time of the phase
// detector the counter adds 1 to dx when the current leads the voltage and
// subtracts 1 when it lags, which raises or lowers the driving frequency by
// one resolution step. Repeated every sampling time this walks the frequency
// to the zero-phase point of the transducer and then dithers around it.
//
// The counting rule is the document's. The reset value DX_INIT (the nominal
// resonant frequency) follows its start-up rule, "initially set the driving
// frequency near the nominal resonant frequency". The saturation at DX_MIN and
// DX_MAX, which keep the drive inside the amplifier's target band, and the
// en input, which freezes dx while the bridge is off, are this design's
// choices.
//
// Interface: step is a one-clock request, up selects its direction. dx
// changes in the clock after step. at_min/at_max flag a request that was
// refused because dx is at a limit (one-clock pulse).
module dx_updown_counter #(
  parameter int unsigned DX_W    = rft_pkg::DX_W,
  parameter int unsigned DX_INIT = 23488,   // 35 kHz at 50 MHz, X_W = 24
  parameter int unsigned DX_MIN  = 13422,   // 20 kHz
  parameter int unsigned DX_MAX  = 53687    // 80 kHz
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            step,    // sampling time
  input  logic            up,      // 1: +1 (current leads), 0: -1 (lags)
  output logic [DX_W-1:0] dx,
  output logic            at_min,
  output logic            at_max
);

  localparam logic [DX_W-1:0] MIN_V  = DX_W'(DX_MIN);
  localparam logic [DX_W-1:0] MAX_V  = DX_W'(DX_MAX);
  localparam logic [DX_W-1:0] INIT_V = DX_W'(DX_INIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dx     <= INIT_V;
      at_min <= 1'b0;
      at_max <= 1'b0;
    end else begin
      at_min <= 1'b0;
      at_max <= 1'b0;
      if (en && step) begin
        if (up) begin
          if (dx >= MAX_V) at_max <= 1'b1;
          else             dx <= dx + 1'b1;
        end else begin
          if (dx <= MIN_V) at_min <= 1'b1;
          else             dx <= dx - 1'b1;
        end
      end
    end
  end

  initial begin
    assert (DX_MIN >= 1 && DX_MIN <= DX_INIT && DX_INIT <= DX_MAX && DX_MAX < (1 << DX_W))
      else $error("dx_updown_counter: need 1 <= DX_MIN <= DX_INIT <= DX_MAX < 2^DX_W");
  end

  a_dx_range: assert property (@(posedge clk) disable iff (!rst_n) dx >= MIN_V && dx <= MAX_V)
    else $error("dx_updown_counter: dx %0d left [%0d, %0d]", dx, DX_MIN, DX_MAX);

endmodule
