// cme_deadtime_leg: complementary gate pair of one inverter leg with
// dead-time insertion.
//
// `want` is the requested leg state (1 = upper switch on, 0 = lower switch
// on). When it differs from the state currently applied, both gates are
// turned off and a counter runs for DEAD clocks; only then is the new state
// applied. The two gates are therefore never on together, and every change
// of state leaves both off for DEAD clocks. If the request returns to the
// applied state during the dead time, the applied state is simply resumed
// (its complement was never turned on).
//
// Interface: want sampled on a rising clk; g_hi/g_lo are registered. After
// reset the leg is in the lower state. dead_active is high while both gates
// are held off. An assertion checks that both gates are never on
// together. The dead time value follows the drive's setup; the
// mechanism is this design's own.
module cme_deadtime_leg #(
  parameter int unsigned DEAD = cme_pkg::DEAD,
  parameter int unsigned DW   = $clog2(DEAD + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic want,
  output logic g_hi,
  output logic g_lo,
  output logic dead_active
);

  logic          cur;
  logic [DW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur  <= 1'b0;
      cnt  <= '0;
      g_hi <= 1'b0;
      g_lo <= 1'b0;
    end else if (want != cur) begin
      g_hi <= 1'b0;
      g_lo <= 1'b0;
      if (cnt >= DW'(DEAD - 1)) begin
        cur <= want;
        cnt <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end else begin
      cnt  <= '0;
      g_hi <= cur;
      g_lo <= ~cur;
    end
  end

  assign dead_active = ~(g_hi | g_lo);

  // the two switches of a leg are never on together
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(g_hi && g_lo));

endmodule
