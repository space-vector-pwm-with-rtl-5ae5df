// cme_ref_reduce: the "R" input block of the CME-SVPWM modulator.
//
// Maps the normalized P-phase reference v_r to the (P-1)-dimensional reduced
// reference w_r = R v_r, where R is B^-1 times the non-homopolar projection,
// without its last row. Row i of R is (P-i)/P on the first i columns and -i/P
// on the rest, so
//     w_r[i] = ( P * C_i - (i+1) * S ) / P      (0-based i, C_i = v[0]+..+v[i],
//                                                S = sum of all v)
// which is the running sum of the reference with its mean removed. The
// numerator is formed exactly; the division by the constant P is a
// multiplication by a rounded reciprocal, so each output is within one LSB
// of the exact value. The homopolar part of v_r is discarded here, which is
// why a zero-CMV modulator can only follow the non-homopolar reference.
//
// Interface: in_valid/v_r are sampled on a rising clk; out_valid/w_r follow
// one cycle later (latency 1, one vector per clock). Formats: v_r and w_r are
// signed, FRAC fractional bits, in units of the voltage step Vdc.
// The equations follow the modulator's definition; the fixed-point format,
// the rounding and the single pipeline register are this design's choices.
module cme_ref_reduce #(
  parameter int unsigned P     = cme_pkg::P,
  parameter int unsigned REF_W = cme_pkg::REF_W,
  parameter int unsigned OUT_W = cme_pkg::red_width(cme_pkg::REF_W, cme_pkg::P)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [REF_W-1:0] v_r [P],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] w_r [P-1]
);

  // Exact numerator X_i = P*C_i - (i+1)*S needs about REF_W + 2*log2(P) bits.
  localparam int unsigned XW  = REF_W + 2 * $clog2(P) + 2;
  localparam int unsigned RK  = XW + 3;                       // reciprocal scale
  localparam longint      RECIP = ((64'sd1 <<< RK) + longint'(P) / 64'sd2) / longint'(P); // round(2^RK/P)

  logic signed [XW-1:0] csum [P];
  logic signed [XW-1:0] num  [P-1];
  logic signed [OUT_W-1:0] w_next [P-1];

  always_comb begin
    csum[0] = XW'(v_r[0]);
    for (int k = 1; k < int'(P); k++) csum[k] = csum[k-1] + XW'(v_r[k]);
  end

  always_comb begin
    for (int i = 0; i < int'(P) - 1; i++) begin
      longint prod;
      num[i]    = XW'(P) * csum[i] - XW'(i + 1) * csum[P-1];
      prod      = longint'(num[i]) * RECIP + (64'sd1 <<< (RK - 1));
      w_next[i] = OUT_W'(prod >>> RK);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < int'(P) - 1; i++) w_r[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) w_r <= w_next;
    end
  end

endmodule
