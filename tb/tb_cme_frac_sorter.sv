// tb_cme_frac_sorter: self-checking test of the rank sorter.
//
// Random inputs, drawn from a small range so that ties are frequent, are
// sorted here with a stable insertion sort (descending, equal values keep
// input order). rank, fsort and idx of the sorter must match it exactly.
module tb_cme_frac_sorter;
  localparam int D = 4, W = 12, RW = 2;

  logic [W-1:0]  frac  [D];
  logic [RW-1:0] rank  [D];
  logic [W-1:0]  fsort [D];
  logic [RW-1:0] idx   [D];
  int checks = 0, failures = 0, ties = 0;

  cme_frac_sorter #(.D(D), .W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [D];
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < D; i++)
        frac[i] = (n % 2 == 0) ? W'($urandom_range(0, 3)) : W'($urandom_range(0, 4095));
      if (n == 0) frac = '{12'd1405, 12'd148, 12'd3031, 12'd3535}; // worked example
      #1;
      // reference: stable insertion sort of indices, descending by value
      for (int i = 0; i < D; i++) order[i] = i;
      for (int i = 1; i < D; i++) begin
        int key, j;
        key = order[i];
        j = i - 1;
        while (j >= 0 && frac[order[j]] < frac[key]) begin
          order[j + 1] = order[j];
          j--;
        end
        order[j + 1] = key;
      end
      for (int r = 0; r < D; r++) begin
        checks += 3;
        if (idx[r] != RW'(order[r])) begin failures++; $display("idx[%0d]=%0d exp %0d", r, idx[r], order[r]); end
        if (fsort[r] != frac[order[r]]) begin failures++; $display("fsort[%0d] wrong", r); end
        if (rank[order[r]] != RW'(r)) begin failures++; $display("rank wrong"); end
        if (r > 0 && frac[order[r]] == frac[order[r-1]]) ties++;
      end
      if (n == 0) begin
        checks++;
        if (!(idx[0] == 3 && idx[1] == 2 && idx[2] == 0 && idx[3] == 1)) begin
          failures++; $display("example order wrong");
        end
      end
    end
    checks++;
    if (ties == 0) begin failures++; $display("no ties exercised"); end
    $display("ties exercised: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
