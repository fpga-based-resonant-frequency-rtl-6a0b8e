// phase_detector: bang-bang phase comparison of the transducer's driving
// voltage and current.
//
// The sensing comparators turn the driving voltage and the transducer current
// into square waves (v_cmp, i_cmp). Both are asynchronous to clk, so each first
// passes a SYNC_STAGES flip-flop synchroniser; the two paths have equal delay,
// so their relative phase is kept. The sampling time is the rising edge of the
// voltage square wave, once every SAMPLE_DIV voltage periods. At that instant
// the synchronised current square wave is looked at: if it is already high, the
// current crossed zero first and leads the voltage, and the detector reports
// +1 (lead = 1); if it is still low the current lags and it reports -1
// (lead = 0). A current edge in the same clock as the voltage edge counts as
// leading.
//
// That +1/-1 rule is the document's. Taking the voltage rising edge as the
// sampling time, the synchroniser, and the optional divider are this design's
// choices; the rule is exact for phase differences within +-180 degrees and
// for high-Q transducers, whose phase near resonance is small.
//
// Interface: sample pulses high for one clock per sampling time, lead is
// valid in that clock and holds its value until the next sample.
// Timing: sample comes SYNC_STAGES+1 clocks after the voltage edge at v_cmp.
module phase_detector #(
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned SAMPLE_DIV  = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic v_cmp,     // squared driving voltage (asynchronous)
  input  logic i_cmp,     // squared transducer current (asynchronous)
  output logic sample,    // one-clock pulse at each sampling time
  output logic lead       // 1: current leads (+1), 0: current lags (-1)
);

  localparam int unsigned DIV_W = (SAMPLE_DIV > 1) ? $clog2(SAMPLE_DIV) : 1;

  logic [SYNC_STAGES-1:0] v_sync, i_sync;
  logic                   v_prev;
  logic [DIV_W-1:0]       div_cnt;

  wire v_s   = v_sync[SYNC_STAGES-1];
  wire i_s   = i_sync[SYNC_STAGES-1];
  wire v_rise = v_s & ~v_prev;
  wire div_hit = (div_cnt == DIV_W'(SAMPLE_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_sync  <= '0;
      i_sync  <= '0;
      v_prev  <= 1'b0;
      div_cnt <= '0;
      sample  <= 1'b0;
      lead    <= 1'b0;
    end else begin
      v_sync <= {v_sync[SYNC_STAGES-2:0], v_cmp};
      i_sync <= {i_sync[SYNC_STAGES-2:0], i_cmp};
      v_prev <= v_s;
      sample <= 1'b0;
      if (v_rise) begin
        div_cnt <= div_hit ? '0 : div_cnt + 1'b1;
        if (div_hit) begin
          sample <= 1'b1;
          lead   <= i_s;
        end
      end
    end
  end

  initial begin
    assert (SYNC_STAGES >= 2) else $error("phase_detector: SYNC_STAGES must be at least 2");
    assert (SAMPLE_DIV >= 1)  else $error("phase_detector: SAMPLE_DIV must be at least 1");
  end

endmodule
