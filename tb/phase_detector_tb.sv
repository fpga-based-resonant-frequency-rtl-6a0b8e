// phase_detector_tb: self-checking test of the bang-bang phase detector.
//
// Drives voltage and current square waves of period P clocks with a chosen
// current offset (negative = current edge earlier = current leads), and checks
// for every voltage period that exactly one sample pulse appears, SYNC+1
// clocks after the voltage rising edge, with lead equal to the sign expected
// from the offset. Offsets sweep both signs, zero and large values. Each
// offset is held for three periods; a second instance with SAMPLE_DIV = 3
// must decide once per group, on its third period, with the same sign.
module phase_detector_tb;

  localparam int P    = 40;   // period in clocks
  localparam int SYNC = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic v_cmp = 1'b0, i_cmp = 1'b0;
  logic sample, lead;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  int   last_v_rise = -1000;
  int   n_samples = 0, n_lead = 0, n_lag = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  phase_detector #(.SYNC_STAGES(SYNC), .SAMPLE_DIV(1)) dut (
    .clk(clk), .rst_n(rst_n), .v_cmp(v_cmp), .i_cmp(i_cmp), .sample(sample), .lead(lead)
  );

  // second instance deciding only every third voltage period
  logic sample3, lead3;
  int   n_samples3 = 0;

  phase_detector #(.SYNC_STAGES(SYNC), .SAMPLE_DIV(3)) dut3 (
    .clk(clk), .rst_n(rst_n), .v_cmp(v_cmp), .i_cmp(i_cmp), .sample(sample3), .lead(lead3)
  );

  logic exp_lead;

  // Checker: each sample must come SYNC+1 clocks after the last voltage edge.
  always @(posedge clk) begin
    if (rst_n && sample) begin
      n_samples++;
      checks++;
      if (cyc - last_v_rise != SYNC + 1) begin
        failures++;
        $display("FAIL latency %0d (expected %0d)", cyc - last_v_rise, SYNC + 1);
      end
      checks++;
      if (lead !== exp_lead) begin
        failures++;
        $display("FAIL lead=%0b expected %0b at cycle %0d", lead, exp_lead, cyc);
      end
      if (lead) n_lead++; else n_lag++;
    end
    if (rst_n && sample3) begin
      n_samples3++;
      checks++;
      if (lead3 !== exp_lead || !sample) begin
        failures++;
        $display("FAIL divided detector: lead=%0b expected %0b, sample=%0b", lead3, exp_lead, sample);
      end
    end
  end

  // One period of square waves; off < 0 means the current rises earlier.
  task automatic run_period(int off);
    for (int t = 0; t < P; t++) begin
      @(negedge clk);
      v_cmp = (t < P / 2);
      i_cmp = (((t - off) % P + P) % P) < P / 2;
      if (t == 0) last_v_rise = cyc;
    end
  endtask

  int offs[] = '{-1, 1, -5, 5, 0, -15, 15, -19, 19, -3, 3};
  int n_expected = 0;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    foreach (offs[k]) begin
      // the sign seen at a sample belongs to the offset of the period that
      // starts with that voltage edge, so set it before the period begins
      exp_lead = (offs[k] <= 0);
      for (int r = 0; r < 3; r++) begin
        run_period(offs[k]);
        n_expected++;
      end
    end
    repeat (SYNC + 4) @(posedge clk);
    checks++;
    if (n_samples != n_expected) begin
      failures++;
      $display("FAIL %0d samples for %0d voltage periods", n_samples, n_expected);
    end
    checks++;
    if (n_samples3 != n_expected / 3) begin
      failures++;
      $display("FAIL divided detector gave %0d samples for %0d periods", n_samples3, n_expected);
    end
    checks++;
    if (n_lead == 0 || n_lag == 0) begin
      failures++;
      $display("FAIL lead and lag were not both seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
