// tb_cme_q_expand: self-checking test of the Q block v = Q w.
//
// Checks the worked example (reduced vectors [1 3 2 0] .. [2 4 3 1] must give
// [1 2 -1 -2 0], [1 2 -1 -1 -1], [1 2 0 -2 -1], [2 1 0 -2 -1],
// [2 2 -1 -2 -1]), then random in-range reduced vectors against the
// difference formula computed here, the zero sum of every output vector,
// and that out-of-range results saturate and raise overmod. Latency: one
// clock.
module tb_cme_q_expand;
  localparam int P = 5, N_LEVELS = 5, INT_W = 9, LVL_W = 4, LMAX = 2;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, overmod;
  logic signed [INT_W-1:0] ws [P][P-1];
  logic signed [LVL_W-1:0] vs [P][P];
  int checks = 0, failures = 0, n_om = 0;

  cme_q_expand #(.P(P), .N_LEVELS(N_LEVELS), .INT_W(INT_W), .LVL_W(LVL_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input int w [P][P-1]);
    int e [P], sum;
    bit om;
    @(negedge clk);
    for (int j = 0; j < P; j++) for (int i = 0; i < P - 1; i++) ws[j][i] = INT_W'(w[j][i]);
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    chk(out_valid, "latency");
    om = 0;
    for (int j = 0; j < P; j++) begin
      sum = 0;
      for (int k = 0; k < P; k++) begin
        e[k] = (k < P - 1 ? w[j][k] : 0) - (k > 0 ? w[j][k-1] : 0);
        if (e[k] > LMAX) begin e[k] = LMAX; om = 1; end
        if (e[k] < -LMAX) begin e[k] = -LMAX; om = 1; end
        chk(vs[j][k] == LVL_W'(e[k]), $sformatf("vs[%0d][%0d]=%0d exp %0d", j, k, vs[j][k], e[k]));
        sum += vs[j][k];
      end
      if (!om) chk(sum == 0, "switching vector with nonzero common-mode voltage");
    end
    chk(overmod == om, "overmod flag");
    if (overmod) n_om++;
  endtask

  initial begin
    int w [P][P-1];
    int ev [P][P];
    for (int j = 0; j < P; j++) for (int i = 0; i < P - 1; i++) ws[j][i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    w = '{'{1,3,2,0}, '{1,3,2,1}, '{1,3,3,1}, '{2,3,3,1}, '{2,4,3,1}};
    run(w);
    ev = '{'{1,2,-1,-2,0}, '{1,2,-1,-1,-1}, '{1,2,0,-2,-1}, '{2,1,0,-2,-1}, '{2,2,-1,-2,-1}};
    for (int j = 0; j < P; j++) for (int k = 0; k < P; k++)
      chk(vs[j][k] == LVL_W'(ev[j][k]), "worked example");
    chk(!overmod, "example is not overmodulated");
    for (int n = 0; n < 3000; n++) begin
      // a random walk keeps most vectors in range; some leave it
      for (int j = 0; j < P; j++) begin
        w[j][0] = $urandom_range(0, 4) - 2;
        for (int i = 1; i < P - 1; i++) w[j][i] = w[j][i-1] + $urandom_range(0, 4) - 2;
        if (n % 7 == 0) w[j][0] = $urandom_range(0, 10) - 5;
      end
      run(w);
    end
    chk(n_om > 0, "overmodulation never exercised");
    $display("overmodulated sequences: %0d", n_om);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
