// cme_bsvpwm: the basic multilevel multiphase SVPWM core (B-SVPWM), applied
// here to the D = P-1 dimensional reduced reference w_r.
//
// Each component of w_r is split into its integer part (floor) and its
// fractional part. The fractional parts are sorted in descending order. The
// sequence has D+1 = P reduced switching vectors: vector 0 is the floor
// vector, and vector j adds one unit to the components whose fractional part
// has rank < j, so consecutive vectors differ by one unit in one component
// and the last is the first plus [1,..,1]. With the sorted fractions
// f(0) >= f(1) >= .. >= f(D-1), the normalized dwell times are
//     t0 = 1 - f(0),  tj = f(j-1) - f(j),  tD = f(D-1)
// which sum to exactly one period.
//
// Interface: in_valid/w_r sampled on a rising clk; out_valid, ws (reduced
// switching vectors, integers) and t (dwell times as unsigned fractions of
// the period with FRAC fractional bits, 1.0 = 2^FRAC) follow one cycle later.
// Only t[0] can reach 1.0; the top bit of the others is always 0.
// The vector and dwell-time rules follow the algorithm; pipelining in one
// register stage and the fixed-point formats are this design's choices.
module cme_bsvpwm #(
  parameter int unsigned D     = cme_pkg::P - 1,
  parameter int unsigned FRAC  = cme_pkg::FRAC,
  parameter int unsigned IN_W  = cme_pkg::red_width(cme_pkg::REF_W, cme_pkg::P),
  parameter int unsigned INT_W = IN_W - FRAC + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  w_r [D],
  output logic                    out_valid,
  output logic signed [INT_W-1:0] ws  [D+1][D],
  output logic        [FRAC:0]    t   [D+1]
);

  localparam int unsigned RW = (D > 1) ? $clog2(D) : 1;

  logic signed [INT_W-1:0] flr   [D];
  logic        [FRAC-1:0]  frac  [D];
  logic        [RW-1:0]    rank  [D];
  logic        [FRAC-1:0]  fsort [D];
  logic        [RW-1:0]    idx   [D];

  logic signed [INT_W-1:0] ws_next [D+1][D];
  logic        [FRAC:0]    t_next  [D+1];

  always_comb begin
    for (int i = 0; i < int'(D); i++) begin
      flr[i]  = INT_W'(w_r[i] >>> FRAC);   // arithmetic shift = floor
      frac[i] = w_r[i][FRAC-1:0];
    end
  end

  cme_frac_sorter #(.D(D), .W(FRAC)) u_sort (
    .frac  (frac),
    .rank  (rank),
    .fsort (fsort),
    .idx   (idx)
  );

  always_comb begin
    for (int j = 0; j <= int'(D); j++) begin
      for (int i = 0; i < int'(D); i++) begin
        ws_next[j][i] = flr[i] + ((int'(rank[i]) < j) ? INT_W'(1) : INT_W'(0));
      end
    end
    t_next[0] = (FRAC+1)'(1 << FRAC) - {1'b0, fsort[0]};
    for (int j = 1; j < int'(D); j++) t_next[j] = {1'b0, fsort[j-1]} - {1'b0, fsort[j]};
    t_next[D] = {1'b0, fsort[D-1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int j = 0; j <= int'(D); j++) begin
        t[j] <= '0;
        for (int i = 0; i < int'(D); i++) ws[j][i] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        ws <= ws_next;
        t  <= t_next;
      end
    end
  end

endmodule
