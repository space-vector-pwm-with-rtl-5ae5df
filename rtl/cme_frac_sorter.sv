// cme_frac_sorter: descending sort of the fractional parts of the reduced
// reference, the central step of the B-SVPWM core.
//
// A comparison-matrix (rank) sorter: every pair of inputs is compared in
// parallel and the rank of input i is the number of inputs that must precede
// it, i.e. those that are larger, plus the equal ones with a smaller index.
// Ties therefore keep input order, as a stable sort does. The rank vector is
// also the permutation the core needs to build the switching vectors; the
// sorted values are gathered from it with one-hot selects.
//
// Interface: purely combinational. frac[i] is unsigned with W bits;
// rank[i] in 0..D-1 (0 = largest); fsort[r] is the value of rank r and
// idx[r] the input index that holds rank r.
// The sorting itself is what the modulator requires; the parallel rank
// structure is this design's choice of sorter.
module cme_frac_sorter #(
  parameter int unsigned D = cme_pkg::P - 1,
  parameter int unsigned W = cme_pkg::FRAC,
  parameter int unsigned RW = (D > 1) ? $clog2(D) : 1
) (
  input  logic [W-1:0]  frac  [D],
  output logic [RW-1:0] rank  [D],
  output logic [W-1:0]  fsort [D],
  output logic [RW-1:0] idx   [D]
);

  always_comb begin
    for (int i = 0; i < int'(D); i++) begin
      int unsigned r;
      r = 0;
      for (int j = 0; j < int'(D); j++) begin
        if (frac[j] > frac[i] || (frac[j] == frac[i] && j < i)) r++;
      end
      rank[i] = RW'(r);
    end
  end

  always_comb begin
    for (int r = 0; r < int'(D); r++) begin
      fsort[r] = '0;
      idx[r]   = '0;
      for (int i = 0; i < int'(D); i++) begin
        if (rank[i] == RW'(r)) begin
          fsort[r] = fsort[r] | frac[i];
          idx[r]   = idx[r]   | RW'(i);
        end
      end
    end
  end

endmodule
