// dx_updown_counter_tb: self-checking test of the frequency-word counter.
//
// Uses a narrow range (init 10, limits 5..15) so that random +1/-1 requests
// reach both limits often. A reference model tracks the expected dx; every
// clock the DUT's dx and its limit flags are compared with it. Requests with
// en low must leave dx unchanged. The test counts how often each limit was hit.
module dx_updown_counter_tb;

  localparam int W = 8, INIT = 10, LO = 5, HI = 15;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0, step = 1'b0, up = 1'b0;
  logic [W-1:0] dx;
  logic at_min, at_max;
  int checks = 0, failures = 0;
  int model = INIT;
  int exp_min = 0, exp_max = 0;
  int n_min = 0, n_max = 0, n_frozen = 0;

  always #5 clk = ~clk;

  dx_updown_counter #(.DX_W(W), .DX_INIT(INIT), .DX_MIN(LO), .DX_MAX(HI)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .step(step), .up(up),
    .dx(dx), .at_min(at_min), .at_max(at_max)
  );

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if (dx != W'(INIT)) begin
      failures++; $display("FAIL reset value %0d", dx);
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // inputs for the coming edge
      en   = ($urandom_range(0, 9) != 0);
      step = ($urandom_range(0, 2) != 0);
      // biased walks so that both limits are reached
      up   = ((i / 200) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      exp_min = 0; exp_max = 0;
      if (en && step) begin
        if (up) begin
          if (model >= HI) exp_max = 1; else model++;
        end else begin
          if (model <= LO) exp_min = 1; else model--;
        end
      end else if (!en && step) n_frozen++;
      @(posedge clk);
      #1;
      checks++;
      if (dx != W'(model) || at_min != exp_min[0] || at_max != exp_max[0]) begin
        failures++;
        $display("FAIL i=%0d dx=%0d model=%0d min=%0b/%0d max=%0b/%0d", i, dx, model, at_min, exp_min, at_max, exp_max);
      end
      if (at_min) n_min++;
      if (at_max) n_max++;
    end
    checks++;
    if (n_min == 0 || n_max == 0 || n_frozen == 0) begin
      failures++; $display("FAIL limits min=%0d max=%0d frozen=%0d", n_min, n_max, n_frozen);
    end
    $display("limit hits: min=%0d max=%0d, frozen requests=%0d", n_min, n_max, n_frozen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
