// bridge_driver: switching commands for the four NMOS switches of the H-bridge.
//
// The bridge has two legs, A and B, each a high-side and a low-side switch.
// The requested three-level output maps onto the legs as
//   LVL_POS  : A high, B low   -> +Vdd
//   LVL_NEG  : A low,  B high  -> -Vdd
//   LVL_ZERO : A low,  B low   ->  0 (both low-side switches on)
// A leg never has both switches on. Whenever a leg changes over, both of its
// switches are first held off for DEAD_CYC clocks (dead time), then the new
// switch is turned on. While en is low all four switches are off; after en
// rises every leg waits one dead time before its first switch turns on.
//
// The level-to-switch mapping follows the three-level H-bridge of the
// document. The zero state on the two low-side switches, the dead time and its
// length are this design's choices (the document does not say whether the
// dead time is made in the FPGA or in the pre-drivers).
//
// Interface: level and en are sampled every clock. gates is registered. When
// a clock edge samples a new level, the leg that changes over turns its old
// switch off at the next edge and its new switch on DEAD_CYC+1 edges after
// the sampling edge (1 edge when DEAD_CYC = 0). dead is high while an enabled
// leg is in its dead time.
module bridge_driver #(
  parameter int unsigned DEAD_CYC = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  rft_pkg::level_t    level,
  output rft_pkg::gate_cmd_t gates,
  output logic               dead
);

  import rft_pkg::*;

  localparam int unsigned CNT_W = (DEAD_CYC > 0) ? $clog2(DEAD_CYC + 1) : 1;
  localparam logic [CNT_W-1:0] DEAD_V = CNT_W'(DEAD_CYC);

  logic [1:0]       want;      // requested leg state, 1 = high switch
  logic [1:0]       leg_hi;    // applied leg state
  logic [CNT_W-1:0] cnt [2];   // remaining dead-time clocks per leg
  logic [1:0]       leg_ok;    // leg out of its dead time and enabled
  logic             en_q;

  assign want = {level == LVL_NEG, level == LVL_POS};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      leg_hi <= '0;
      cnt    <= '{DEAD_V, DEAD_V};
    end else begin
      for (int g = 0; g < 2; g++) begin
        if (!en || want[g] != leg_hi[g]) begin
          leg_hi[g] <= want[g];
          cnt[g]    <= DEAD_V;
        end else if (cnt[g] != '0) begin
          cnt[g] <= cnt[g] - 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int g = 0; g < 2; g++) leg_ok[g] = en_q && (cnt[g] == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q  <= 1'b0;
      gates <= GATES_OFF;
      dead  <= 1'b0;
    end else begin
      en_q       <= en;
      gates.a_hi <= leg_ok[0] &&  leg_hi[0];
      gates.a_lo <= leg_ok[0] && !leg_hi[0];
      gates.b_hi <= leg_ok[1] &&  leg_hi[1];
      gates.b_lo <= leg_ok[1] && !leg_hi[1];
      dead       <= en_q && (leg_ok != 2'b11);
    end
  end

  // No leg may ever conduct through both of its switches.
  a_no_shoot_a: assert property (@(posedge clk) disable iff (!rst_n) !(gates.a_hi && gates.a_lo))
    else $error("bridge_driver: leg A shoot-through");
  a_no_shoot_b: assert property (@(posedge clk) disable iff (!rst_n) !(gates.b_hi && gates.b_lo))
    else $error("bridge_driver: leg B shoot-through");

endmodule
