// bridge_driver_tb: self-checking test of the H-bridge switching commands.
//
// Random level sequences, held for random times, with en dropped now and
// then. The expected gates are derived from the rule, not from the design:
// a leg's switch is on at a clock edge when the bridge was enabled at the
// previous edge and the leg's requested state (A high for +1, B high for -1,
// else low) has been unchanged, and the bridge enabled, for at least DEAD_CYC
// edges before that. A leg must never have both switches on, and every
// change-over must leave both switches off for DEAD_CYC clocks. Run with
// DEAD_CYC = 3.
module bridge_driver_tb;

  import rft_pkg::*;

  localparam int DEAD = 3;
  localparam int N    = 4000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  level_t level = LVL_ZERO;
  gate_cmd_t gates;
  logic dead;
  int checks = 0, failures = 0;
  int n_dead = 0, n_pos = 0, n_neg = 0, n_zero = 0, n_off = 0;

  always #5 clk = ~clk;

  bridge_driver #(.DEAD_CYC(DEAD)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .level(level), .gates(gates), .dead(dead)
  );

  // history of sampled inputs, one entry per edge
  logic [1:0] want_h [N];
  logic       en_h   [N];

  initial begin
    int hold;
    logic [1:0] w;
    logic [3:0] exp_g;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    hold = 0;
    // edge 0 is the one clock after reset with en still low
    want_h[0] = 2'b00;
    en_h[0]   = 1'b0;
    for (int e = 1; e < N; e++) begin
      @(negedge clk);
      if (hold == 0) begin
        level = level_t'($urandom_range(0, 2));
        en    = ($urandom_range(0, 15) != 0);
        hold  = $urandom_range(1, 12);
      end
      hold--;
      w = {level == LVL_NEG, level == LVL_POS};
      want_h[e] = w;
      en_h[e]   = en;
      @(posedge clk); #1;
      // gates now reflect the state left by edge e-1
      begin
        exp_g = '0;
        if (en_h[e-1]) begin
          for (int g = 0; g < 2; g++) begin
            // edge of the last change at or before e-1
            int c;
            c = e - 1;
            while (c > 0 && en_h[c] && want_h[c][g] == want_h[c-1][g]) c--;
            if (e - 1 - c >= DEAD) begin
              if (g == 0) exp_g[3:2] = want_h[e-1][0] ? 2'b10 : 2'b01;
              else        exp_g[1:0] = want_h[e-1][1] ? 2'b10 : 2'b01;
            end
          end
        end
        checks++;
        if (gates != gate_cmd_t'(exp_g)) begin
          failures++;
          if (failures < 10) $display("FAIL edge %0d gates=%b expected %b", e, gates, exp_g);
        end
      end
      checks++;
      if ((gates.a_hi && gates.a_lo) || (gates.b_hi && gates.b_lo)) begin
        failures++;
        $display("FAIL shoot-through at edge %0d", e);
      end
      if (dead) n_dead++;
      if (gates == '{1'b1, 1'b0, 1'b0, 1'b1}) n_pos++;
      if (gates == '{1'b0, 1'b1, 1'b1, 1'b0}) n_neg++;
      if (gates == '{1'b0, 1'b1, 1'b0, 1'b1}) n_zero++;
      if (gates == GATES_OFF) n_off++;
    end
    checks++;
    if (n_dead == 0 || n_pos == 0 || n_neg == 0 || n_zero == 0 || n_off == 0) begin
      failures++;
      $display("FAIL states not all seen: dead=%0d pos=%0d neg=%0d zero=%0d off=%0d", n_dead, n_pos, n_neg, n_zero, n_off);
    end
    $display("clocks in state: +1=%0d -1=%0d 0=%0d off=%0d dead=%0d", n_pos, n_neg, n_zero, n_off, n_dead);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
