// cme_vector_sequencer: applies a sequence of P switching vectors over each
// switching period of PERIOD clocks, vector j for its dwell time t_j.
//
// A period counter runs from 0 to PERIOD-1. The switching instants are the
// cumulative dwell times scaled to clocks, b_j = round((t_0+..+t_j)*PERIOD)
// for j = 0..P-2; the vector in use is the number of instants already
// reached, so vectors with a zero dwell time are skipped. The sequence is
// applied in sorted order only (v_0 .. v_{P-1}, then back to v_0 in the next
// period): the step from the last vector back to the first changes the same
// number of legs as any other step, so no symmetric arrangement is needed.
//
// A new sequence (load) goes into a shadow register and takes effect at the
// next period boundary, so a period always uses one consistent sequence.
// Until the first sequence arrives the output is the all-zero vector.
//
// Interface: load/vs_in/t_in sampled on a rising clk (t_in unsigned, FRAC
// fractional bits, summing to 2^FRAC). level is vector seq_idx of the active
// sequence and changes on the clock edge where the counter reaches an
// instant. period_start pulses in the first clock of every period; swap
// pulses in the first clock of a period that uses a newly loaded sequence.
// The timing of vectors within the period follows the modulator's
// definition; the double buffering and the rounding are this design's choices.
module cme_vector_sequencer #(
  parameter int unsigned P      = cme_pkg::P,
  parameter int unsigned LVL_W  = cme_pkg::LVL_W,
  parameter int unsigned FRAC   = cme_pkg::FRAC,
  parameter int unsigned PERIOD = cme_pkg::PERIOD,
  parameter int unsigned CW     = $clog2(PERIOD + 1),
  parameter int unsigned IW     = $clog2(P)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic signed [LVL_W-1:0] vs_in  [P][P],
  input  logic        [FRAC:0]    t_in   [P],
  output logic signed [LVL_W-1:0] level  [P],
  output logic        [IW-1:0]    seq_idx,
  output logic        [CW-1:0]    count,
  output logic                    period_start,
  output logic                    swap
);

  localparam int unsigned PW = FRAC + 1 + CW;   // width of cumulative*PERIOD

  logic signed [LVL_W-1:0] sh_vs  [P][P];
  logic        [CW-1:0]    sh_b   [P-1];
  logic signed [LVL_W-1:0] act_vs [P][P];
  logic        [CW-1:0]    act_b  [P-1];
  logic                    pending;
  logic        [CW-1:0]    cnt;
  logic        [CW-1:0]    b_in   [P-1];
  logic                    last;

  // Switching instants of the incoming sequence.
  always_comb begin
    logic [FRAC+IW:0] cum;
    logic [PW+IW-1:0] prod;
    cum = '0;
    for (int j = 0; j < int'(P) - 1; j++) begin
      cum     = cum + (FRAC+IW+1)'(t_in[j]);
      prod    = (PW+IW)'(cum) * (PW+IW)'(PERIOD) + (PW+IW)'(1 << (FRAC - 1));
      b_in[j] = CW'(prod >> FRAC);
    end
  end

  assign last = (cnt == CW'(PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      pending <= 1'b0;
      swap    <= 1'b0;
      for (int j = 0; j < int'(P); j++)
        for (int k = 0; k < int'(P); k++) begin
          sh_vs[j][k]  <= '0;
          act_vs[j][k] <= '0;
        end
      for (int j = 0; j < int'(P) - 1; j++) begin
        sh_b[j]  <= '0;
        act_b[j] <= '0;
      end
    end else begin
      cnt  <= last ? '0 : cnt + 1'b1;
      swap <= 1'b0;
      if (load) begin
        sh_vs <= vs_in;
        sh_b  <= b_in;
      end
      if (last && (pending || load)) begin
        act_vs  <= load ? vs_in : sh_vs;
        act_b   <= load ? b_in  : sh_b;
        pending <= 1'b0;
        swap    <= 1'b1;
      end else if (load) begin
        pending <= 1'b1;
      end
    end
  end

  always_comb begin
    int unsigned n;
    n = 0;
    for (int j = 0; j < int'(P) - 1; j++) if (cnt >= act_b[j]) n++;
    seq_idx = IW'(n);
    level   = act_vs[n];
  end

  // instants are non-decreasing, so the vector index never runs past P-1,
  // and a period lasts exactly PERIOD clocks
  a_idx_range: assert property (@(posedge clk) disable iff (!rst_n) int'(seq_idx) < int'(P));
  a_period:    assert property (@(posedge clk) disable iff (!rst_n) cnt < CW'(PERIOD));

  assign count        = cnt;
  assign period_start = (cnt == '0);

endmodule
