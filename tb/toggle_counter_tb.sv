// toggle_counter_tb: self-checking test of the triangle-wave oscillator.
//
// An independent model steps a wide integer by dx and folds it back at 0 and
// XMAX; x, the counting mode and the top/bottom pulses are compared with it
// every clock. The test is run with a 10-bit counter for several dx values,
// including dx changes in mid-sweep, and checks the period: over N full
// sweeps the number of clocks must be N*2*XMAX/dx to within one clock per
// sweep, which is the frequency law f = f_clk*dx/(2*XMAX).
module toggle_counter_tb;

  localparam int XW = 10, DW = 8;
  localparam int XMAX = (1 << XW) - 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [DW-1:0] dx = '0;
  logic [XW-1:0] x;
  logic down, top, bottom;
  int checks = 0, failures = 0;
  int mx = 0, mdown = 0, mtop = 0, mbot = 0;
  int n_top = 0, n_bot = 0;

  always #5 clk = ~clk;

  toggle_counter #(.X_W(XW), .DX_W(DW)) dut (
    .clk(clk), .rst_n(rst_n), .dx(dx), .x(x), .down(down), .top(top), .bottom(bottom)
  );

  task automatic model_step(int d);
    int s;
    mtop = 0; mbot = 0;
    if (!mdown) begin
      s = mx + d;
      if (s > XMAX) begin mx = 2 * XMAX - s; mdown = 1; mtop = 1; end
      else mx = s;
    end else begin
      s = mx - d;
      if (s < 0) begin mx = -s; mdown = 0; mbot = 1; end
      else mx = s;
    end
  endtask

  task automatic run(int d, int cycles);
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      dx = DW'(d);
      model_step(d);
      @(posedge clk);
      #1;
      checks++;
      if (x != XW'(mx) || down != mdown[0] || top != mtop[0] || bottom != mbot[0]) begin
        failures++;
        if (failures < 10)
          $display("FAIL d=%0d x=%0d/%0d down=%0b/%0d top=%0b/%0d bot=%0b/%0d",
                   d, x, mx, down, mdown, top, mtop, bottom, mbot);
      end
      if (top) n_top++;
      if (bottom) n_bot++;
    end
  endtask

  // Count clocks between bottom pulses over `sweeps` periods at step d.
  task automatic check_period(int d, int sweeps);
    int start, stop, cyc, got;
    real expect_c;
    // align to a bottom event
    cyc = 0;
    while (1) begin
      run(d, 1);
      if (bottom) break;
    end
    got = 0; cyc = 0;
    while (got < sweeps) begin
      run(d, 1);
      cyc++;
      if (bottom) got++;
    end
    expect_c = real'(sweeps) * 2.0 * real'(XMAX) / real'(d);
    checks++;
    if (real'(cyc) - expect_c > real'(sweeps) || expect_c - real'(cyc) > real'(sweeps)) begin
      failures++;
      $display("FAIL period d=%0d: %0d clocks for %0d sweeps, expected %f", d, cyc, sweeps, expect_c);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if (x != '0 || down) begin failures++; $display("FAIL reset state"); end
    run(37, 200);
    run(255, 50);
    run(1, 40);
    for (int k = 0; k < 40; k++) run($urandom_range(1, 255), $urandom_range(1, 60));
    check_period(37, 20);
    check_period(100, 30);
    check_period(3, 3);
    check_period(255, 50);
    checks++;
    if (n_top == 0 || n_bot == 0) begin failures++; $display("FAIL no toggles"); end
    $display("toggles: top=%0d bottom=%0d", n_top, n_bot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
