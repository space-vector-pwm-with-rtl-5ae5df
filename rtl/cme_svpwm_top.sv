// cme_svpwm_top: space-vector PWM with common-mode voltage elimination
// (CME-SVPWM) for a P-phase, N_LEVELS-level inverter.
//
// Only switching vectors whose phase levels add up to zero are used, so the
// inverter's common-mode (neutral) voltage stays at zero in every state.
// The reference voltages are first normalized to the voltage step Vdc
// (cme_normalize, one shared multiplier), then reduced to P-1 dimensions (w_r = R v_r, block R),
// the basic multilevel SVPWM algorithm then finds the P nearest reduced
// vectors and their dwell times (B-SVPWM: floor, sort of the fractional
// parts, differences), and block Q maps each reduced vector back to a
// P-phase vector that is a sum of "one leg up, one leg down" steps. The
// sequence is applied in sorted order in every switching period: each step,
// including the return to the first vector, moves one leg up and one leg
// down by one level, so each period has exactly 2P level changes.
//
// Pipeline: ref_valid/ref_v -> cme_normalize (P+1 clk) -> cme_ref_reduce
// (1 clk) -> cme_bsvpwm (1 clk) -> cme_q_expand (1 clk) -> shadow of
// cme_vector_sequencer. seq_valid pulses P+4 clocks after ref_valid (9 for
// five phases); the sequence is used from the next period boundary (swap).
// A reference is accepted when ref_ready is high, i.e. at most one every
// P+1 clocks; the last one before a boundary wins. period_start tells the reference source when
// a period begins. The phase levels drive one cme_gate_driver per phase
// (cascaded full-bridge cells, dead-time insertion).
//
// Defaults: P = 5, N_LEVELS = 5, 50 MHz clock, PERIOD = 5102 clocks
// (9.8 kHz), DEAD = 200 clocks (4 us). The algorithm, the sizes and timing
// follow the reference drive; the fixed-point formats, the pipeline
// structure and handshake, the double-buffered sequence and the gate
// mapping are this design's choices.
module cme_svpwm_top #(
  parameter int unsigned P        = cme_pkg::P,
  parameter int unsigned N_LEVELS = cme_pkg::N_LEVELS,
  parameter int unsigned VIN_W    = cme_pkg::VIN_W,
  parameter int unsigned VIN_FRAC = cme_pkg::VIN_FRAC,
  parameter int unsigned INV_W    = cme_pkg::INV_W,
  parameter int unsigned INV_FRAC = cme_pkg::INV_FRAC,
  parameter int unsigned REF_W    = cme_pkg::REF_W,
  parameter int unsigned FRAC     = cme_pkg::FRAC,
  parameter int unsigned LVL_W    = cme_pkg::LVL_W,
  parameter int unsigned PERIOD   = cme_pkg::PERIOD,
  parameter int unsigned DEAD     = cme_pkg::DEAD,
  parameter int unsigned NCELL    = (N_LEVELS - 1) / 2,
  parameter int unsigned CW       = $clog2(PERIOD + 1),
  parameter int unsigned IW       = $clog2(P)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // reference voltages (volts, VIN_FRAC fractional bits) and 1/Vdc
  input  logic                    ref_valid,
  output logic                    ref_ready,
  input  logic signed [VIN_W-1:0] ref_v [P],
  input  logic        [INV_W-1:0] vdc_inv,
  // computed sequence (for monitoring)
  output logic                    seq_valid,
  output logic                    seq_overmod,
  // modulator output
  output logic signed [LVL_W-1:0] level [P],
  output logic        [IW-1:0]    seq_idx,
  output logic        [CW-1:0]    count,
  output logic                    period_start,
  output logic                    swap,
  // trigger signals: phase, cell, leg (0 = A, 1 = B)
  output logic                    gate_hi [P][NCELL][2],
  output logic                    gate_lo [P][NCELL][2],
  output logic                    dead_active [P]
);

  localparam int unsigned RED_W = REF_W + $clog2(P) + 1;
  localparam int unsigned INT_W = RED_W - FRAC + 1;

  logic                    norm_valid;
  logic signed [REF_W-1:0] v_r [P];
  logic                    red_valid;
  logic signed [RED_W-1:0] w_r [P-1];
  logic                    bs_valid;
  logic signed [INT_W-1:0] ws  [P][P-1];
  logic        [FRAC:0]    t_bs [P];
  logic        [FRAC:0]    t_q  [P];
  logic signed [LVL_W-1:0] vs  [P][P];

  cme_normalize #(.P(P), .VIN_W(VIN_W), .VIN_FRAC(VIN_FRAC), .INV_W(INV_W),
                  .INV_FRAC(INV_FRAC), .REF_W(REF_W), .FRAC(FRAC)) u_norm (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ref_valid),
    .in_ready  (ref_ready),
    .v_in      (ref_v),
    .inv_vdc   (vdc_inv),
    .out_valid (norm_valid),
    .v_r       (v_r)
  );

  cme_ref_reduce #(.P(P), .REF_W(REF_W), .OUT_W(RED_W)) u_r (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (norm_valid),
    .v_r       (v_r),
    .out_valid (red_valid),
    .w_r       (w_r)
  );

  cme_bsvpwm #(.D(P - 1), .FRAC(FRAC), .IN_W(RED_W), .INT_W(INT_W)) u_bsvpwm (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (red_valid),
    .w_r       (w_r),
    .out_valid (bs_valid),
    .ws        (ws),
    .t         (t_bs)
  );

  cme_q_expand #(.P(P), .N_LEVELS(N_LEVELS), .INT_W(INT_W), .LVL_W(LVL_W)) u_q (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (bs_valid),
    .ws        (ws),
    .out_valid (seq_valid),
    .vs        (vs),
    .overmod   (seq_overmod)
  );

  // Dwell times wait one clock to line up with the Q stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(P); j++) t_q[j] <= '0;
    end else if (bs_valid) begin
      t_q <= t_bs;
    end
  end

  cme_vector_sequencer #(.P(P), .LVL_W(LVL_W), .FRAC(FRAC), .PERIOD(PERIOD)) u_seq (
    .clk          (clk),
    .rst_n        (rst_n),
    .load         (seq_valid),
    .vs_in        (vs),
    .t_in         (t_q),
    .level        (level),
    .seq_idx      (seq_idx),
    .count        (count),
    .period_start (period_start),
    .swap         (swap)
  );

  for (genvar k = 0; k < int'(P); k++) begin : g_phase
    cme_gate_driver #(.N_LEVELS(N_LEVELS), .LVL_W(LVL_W), .DEAD(DEAD)) u_gate (
      .clk         (clk),
      .rst_n       (rst_n),
      .level       (level[k]),
      .g_hi        (gate_hi[k]),
      .g_lo        (gate_lo[k]),
      .dead_active (dead_active[k])
    );
  end

endmodule
