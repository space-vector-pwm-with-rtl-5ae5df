// cme_gate_driver: trigger signals of one phase of a cascaded full-bridge
// inverter with NCELL = (N_LEVELS-1)/2 series H-bridge cells per phase.
//
// The phase level L (-NCELL..+NCELL, in units of the cell voltage Vdc) is
// split over the cells: for L > 0 cells 0..L-1 output +Vdc, for L < 0 cells
// 0..|L|-1 output -Vdc, the others 0. A cell has two legs A and B; it outputs
// +Vdc with A up / B down, -Vdc with A down / B up, and 0 with both down.
// So a one-step level change moves exactly one leg of one cell. Each leg
// drives its complementary gate pair through cme_deadtime_leg.
//
// Interface: level sampled on a rising clk; gates g_hi[c][l]/g_lo[c][l]
// (cell c, leg l: 0 = A, 1 = B) are registered, delayed one clock, and
// both off during a dead time. dead_active is high while any leg of the
// phase is in a dead time.
// The mapping of levels to switches depends on the inverter topology and is
// this design's own choice; the five-level cascaded full-bridge topology
// and the dead time follow the drive it was made for.
module cme_gate_driver #(
  parameter int unsigned N_LEVELS = cme_pkg::N_LEVELS,
  parameter int unsigned LVL_W    = cme_pkg::LVL_W,
  parameter int unsigned DEAD     = cme_pkg::DEAD,
  parameter int unsigned NCELL    = (N_LEVELS - 1) / 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [LVL_W-1:0] level,
  output logic                    g_hi [NCELL][2],
  output logic                    g_lo [NCELL][2],
  output logic                    dead_active
);

  logic want [NCELL][2];
  logic dact [NCELL][2];

  always_comb begin
    for (int c = 0; c < int'(NCELL); c++) begin
      want[c][0] = (int'(level) > c);      // cell at +Vdc: leg A up
      want[c][1] = (int'(level) < -c);     // cell at -Vdc: leg B up
    end
  end

  for (genvar c = 0; c < int'(NCELL); c++) begin : g_cell
    for (genvar l = 0; l < 2; l++) begin : g_leg
      cme_deadtime_leg #(.DEAD(DEAD)) u_leg (
        .clk         (clk),
        .rst_n       (rst_n),
        .want        (want[c][l]),
        .g_hi        (g_hi[c][l]),
        .g_lo        (g_lo[c][l]),
        .dead_active (dact[c][l])
      );
    end
  end

  always_comb begin
    dead_active = 1'b0;
    for (int c = 0; c < int'(NCELL); c++)
      for (int l = 0; l < 2; l++) dead_active |= dact[c][l];
  end

endmodule
