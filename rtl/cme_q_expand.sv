// cme_q_expand: the "Q" output block of the CME-SVPWM modulator.
//
// Converts each reduced switching vector w (P-1 integer components) into a
// P-phase switching vector v = Q w, where Q is the basis matrix without its
// homopolar column:
//     v[0] = w[0],  v[k] = w[k] - w[k-1] (0 < k < P-1),  v[P-1] = -w[P-2].
// Every v is therefore a sum of basis vectors with one +1 and one -1, so its
// components add up to zero: the vector produces zero common-mode voltage.
// Only subtractions are needed.
//
// The converter can only produce levels -LMAX..+LMAX (LMAX = (N_LEVELS-1)/2).
// A reference in the overmodulation region yields components outside this
// range; they are saturated to the nearest level and `overmod` is raised for
// that sequence, since such a vector can no longer be both exact and zero-CMV.
//
// Interface: in_valid/ws sampled on a rising clk; out_valid, vs and overmod
// follow one cycle later. ws[j] is vector j of the sequence (P vectors).
// The Q transform follows the modulator's definition; the saturation and the
// overmodulation flag are this design's choices.
module cme_q_expand #(
  parameter int unsigned P        = cme_pkg::P,
  parameter int unsigned N_LEVELS = cme_pkg::N_LEVELS,
  parameter int unsigned INT_W    = cme_pkg::red_width(cme_pkg::REF_W, cme_pkg::P)
                                    - cme_pkg::FRAC + 1,
  parameter int unsigned LVL_W    = cme_pkg::LVL_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [INT_W-1:0] ws [P][P-1],
  output logic                    out_valid,
  output logic signed [LVL_W-1:0] vs [P][P],
  output logic                    overmod
);

  localparam int LMAX = (int'(N_LEVELS) - 1) / 2;

  logic signed [INT_W:0]   diff    [P][P];
  logic signed [LVL_W-1:0] vs_next [P][P];
  logic                    om_next;

  always_comb begin
    om_next = 1'b0;
    for (int j = 0; j < int'(P); j++) begin
      diff[j][0]   = (INT_W+1)'(ws[j][0]);
      for (int k = 1; k < int'(P) - 1; k++)
        diff[j][k] = (INT_W+1)'(ws[j][k]) - (INT_W+1)'(ws[j][k-1]);
      diff[j][P-1] = -(INT_W+1)'(ws[j][P-2]);
      for (int k = 0; k < int'(P); k++) begin
        if (diff[j][k] > (INT_W+1)'(LMAX)) begin
          vs_next[j][k] = LVL_W'(LMAX);
          om_next       = 1'b1;
        end else if (diff[j][k] < -(INT_W+1)'(LMAX)) begin
          vs_next[j][k] = -LVL_W'(LMAX);
          om_next       = 1'b1;
        end else begin
          vs_next[j][k] = LVL_W'(diff[j][k]);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      overmod   <= 1'b0;
      for (int j = 0; j < int'(P); j++)
        for (int k = 0; k < int'(P); k++) vs[j][k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        vs      <= vs_next;
        overmod <= om_next;
      end
    end
  end

endmodule
