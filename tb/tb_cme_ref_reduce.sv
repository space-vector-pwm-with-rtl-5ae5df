// tb_cme_ref_reduce: self-checking test of the reduction block w_r = R v_r.
//
// Drives the five-phase worked example (v_r = [1.344 1.693 -0.297 -1.877
// -0.863], expected w_r = [1.344 3.037 2.740 0.863]) and 2000 random
// references, comparing each output with the exact rational value
// (P*C_i - (i+1)*S)/P computed here with integer arithmetic; one LSB of
// rounding error is allowed. Also checks the one-clock latency.
module tb_cme_ref_reduce;
  localparam int P = 5, REF_W = 16, FRAC = 12, OUT_W = REF_W + $clog2(P) + 1;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [REF_W-1:0] v_r [P];
  logic signed [OUT_W-1:0] w_r [P-1];
  int checks = 0, failures = 0;

  cme_ref_reduce #(.P(P), .REF_W(REF_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int v [P]);
    @(negedge clk);
    for (int k = 0; k < P; k++) v_r[k] = REF_W'(v[k]);
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("out_valid missing after 1 clock"); end
  endtask

  // |P*got - X| <= P means within one LSB of the exact value X/P
  task automatic check_exact(input int v [P]);
    longint s, c, x;
    s = 0;
    for (int k = 0; k < P; k++) s += v[k];
    c = 0;
    for (int i = 0; i < P - 1; i++) begin
      c += v[i];
      x = P * c - (i + 1) * s;
      checks++;
      if ((P * longint'(w_r[i]) - x) > P || (x - P * longint'(w_r[i])) > P) begin
        failures++;
        $display("w_r[%0d]=%0d expected %0f", i, w_r[i], real'(x) / P);
      end
    end
  endtask

  initial begin
    int v [P];
    int ex [P-1];
    for (int k = 0; k < P; k++) v_r[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // worked example, Q12
    v = '{5505, 6935, -1217, -7688, -3535};
    ex = '{5505, 12440, 11223, 3535};
    apply(v);
    for (int i = 0; i < P - 1; i++) begin
      checks++;
      if (w_r[i] != OUT_W'(ex[i])) begin failures++; $display("example w_r[%0d]=%0d exp %0d", i, w_r[i], ex[i]); end
    end
    // with a homopolar offset added, w_r must not change
    for (int k = 0; k < P; k++) v[k] += 1234;
    apply(v);
    for (int i = 0; i < P - 1; i++) begin
      checks++;
      if ((w_r[i] - OUT_W'(ex[i])) > 1 || (OUT_W'(ex[i]) - w_r[i]) > 1) begin
        failures++; $display("offset example w_r[%0d]=%0d exp %0d", i, w_r[i], ex[i]);
      end
    end
    // random references
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < P; k++) v[k] = $signed($urandom_range(0, 65535)) - 32768;
      apply(v);
      check_exact(v);
    end
    // no valid -> no output valid
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("spurious out_valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
