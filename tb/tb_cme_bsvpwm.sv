// tb_cme_bsvpwm: self-checking test of the B-SVPWM core on a 4-dimensional
// reduced reference (five-phase drive).
//
// For the worked example w_r = [1.344 3.037 2.740 0.863] the sequence must
// be [1 3 2 0], [1 3 2 1], [1 3 3 1], [2 3 3 1], [2 4 3 1] with dwell times
// 0.137 0.124 0.396 0.307 0.036. For random references the expected vectors
// and dwell times are rebuilt here from floor/fraction and a stable sort,
// and the sequence properties are checked: adjacent vectors differ by one
// unit in one component, last = first + [1 1 1 1], the dwell times sum to
// one period, and the average of the vectors weighted by their dwell times
// reproduces w_r exactly. Latency: one clock.
module tb_cme_bsvpwm;
  localparam int D = 4, FRAC = 12, IN_W = 16 + 3 + 1, INT_W = IN_W - FRAC + 1;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [IN_W-1:0]  w_r [D];
  logic signed [INT_W-1:0] ws  [D+1][D];
  logic        [FRAC:0]    t   [D+1];
  int checks = 0, failures = 0;

  cme_bsvpwm #(.D(D), .FRAC(FRAC), .IN_W(IN_W), .INT_W(INT_W)) dut (.*);

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

  task automatic run(input int w [D]);
    int fl [D], fr [D], order [D], ev [D+1][D], et [D+1];
    longint acc;
    @(negedge clk);
    for (int i = 0; i < D; i++) w_r[i] = IN_W'(w[i]);
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    chk(out_valid, "latency");
    for (int i = 0; i < D; i++) begin
      fr[i] = w[i] & ((1 << FRAC) - 1);
      fl[i] = (w[i] - fr[i]) / (1 << FRAC);
      order[i] = i;
    end
    for (int i = 1; i < D; i++)
      for (int j = i; j > 0 && fr[order[j-1]] < fr[order[j]]; j--) begin
        int tmp; tmp = order[j]; order[j] = order[j-1]; order[j-1] = tmp;
      end
    for (int i = 0; i < D; i++) ev[0][i] = fl[i];
    for (int j = 1; j <= D; j++) begin
      ev[j] = ev[j-1];
      ev[j][order[j-1]]++;
    end
    et[0] = (1 << FRAC) - fr[order[0]];
    for (int j = 1; j < D; j++) et[j] = fr[order[j-1]] - fr[order[j]];
    et[D] = fr[order[D-1]];
    for (int j = 0; j <= D; j++) begin
      chk(t[j] == (FRAC+1)'(et[j]), $sformatf("t[%0d]=%0d exp %0d", j, t[j], et[j]));
      for (int i = 0; i < D; i++)
        chk(ws[j][i] == INT_W'(ev[j][i]), $sformatf("ws[%0d][%0d]=%0d exp %0d", j, i, ws[j][i], ev[j][i]));
    end
    // sequence properties
    acc = 0;
    for (int j = 0; j <= D; j++) acc += t[j];
    chk(acc == (1 << FRAC), "dwell times do not sum to one period");
    for (int j = 1; j <= D; j++) begin
      int nd; nd = 0;
      for (int i = 0; i < D; i++) begin
        if (ws[j][i] - ws[j-1][i] == 1) nd++;
        else if (ws[j][i] != ws[j-1][i]) nd += 10;
      end
      chk(nd == 1, "adjacent vectors must differ by one unit in one component");
    end
    for (int i = 0; i < D; i++) begin
      chk(ws[D][i] == ws[0][i] + 1, "last vector must be first + 1");
      acc = 0;
      for (int j = 0; j <= D; j++) acc += longint'(ws[j][i]) * t[j];
      chk(acc == w[i], "weighted average of the vectors must equal w_r");
    end
  endtask

  initial begin
    int w [D];
    int exv [D+1][D];
    real ext [D+1];
    for (int i = 0; i < D; i++) w_r[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    w = '{5505, 12440, 11223, 3535};
    run(w);
    exv = '{'{1,3,2,0}, '{1,3,2,1}, '{1,3,3,1}, '{2,3,3,1}, '{2,4,3,1}};
    ext = '{0.137, 0.124, 0.396, 0.307, 0.036};
    for (int j = 0; j <= D; j++) begin
      for (int i = 0; i < D; i++) chk(ws[j][i] == INT_W'(exv[j][i]), "example vector");
      chk((real'(t[j]) / 4096.0 - ext[j]) < 0.002 && (ext[j] - real'(t[j]) / 4096.0) < 0.002,
          $sformatf("example dwell t%0d=%f", j + 1, real'(t[j]) / 4096.0));
    end
    // integer reference: zero dwell for all but the first vector
    w = '{4096, -8192, 0, 12288};
    run(w);
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < D; i++) w[i] = int'($urandom_range(0, 60000)) - 30000;
      if (n % 3 == 0) w[1] = (w[0] & 32'hFFFFF000) | (w[0] & 4095); // tie of fractions
      run(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
