// tb_cme_normalize: self-checking test of the normalization v_r = V_r/Vdc.
//
// The worked example in volts (Vdc = 82.4 V) and 2000 random voltage vectors
// with random reciprocals are normalized; each result must equal the
// product computed here, rounded to 12 fractional bits and saturated to 16
// bits. Checks that a vector takes P+1 clocks from in_valid to out_valid,
// that in_ready is low meanwhile and that a request made while busy is
// ignored.
module tb_cme_normalize;
  localparam int P = 5, VIN_W = 16, VIN_FRAC = 6, INV_W = 18, INV_FRAC = 20, REF_W = 16, FRAC = 12;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic signed [VIN_W-1:0] v_in [P];
  logic        [INV_W-1:0] inv_vdc;
  logic signed [REF_W-1:0] v_r [P];
  int checks = 0, failures = 0, n_sat = 0;

  cme_normalize #(.P(P), .VIN_W(VIN_W), .VIN_FRAC(VIN_FRAC), .INV_W(INV_W),
                  .INV_FRAC(INV_FRAC), .REF_W(REF_W), .FRAC(FRAC)) dut (.*);

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

  task automatic run(input int v [P], input int inv);
    int lat;
    longint e;
    @(negedge clk);
    chk(in_ready, "ready when idle");
    for (int k = 0; k < P; k++) v_in[k] = VIN_W'(v[k]);
    inv_vdc = INV_W'(inv);
    in_valid = 1;
    @(negedge clk);
    // keep a different request on the input while busy: it must be ignored
    for (int k = 0; k < P; k++) v_in[k] = VIN_W'(12345);
    lat = 1;
    while (!out_valid) begin
      chk(!in_ready, "busy while computing");
      @(negedge clk);
      lat++;
    end
    in_valid = 0;
    chk(lat == P + 1, $sformatf("latency %0d", lat));
    for (int k = 0; k < P; k++) begin
      e = longint'(v[k]) * inv;
      e = (e + (longint'(1) <<< (VIN_FRAC + INV_FRAC - FRAC - 1))) >>> (VIN_FRAC + INV_FRAC - FRAC);
      if (e > 32767) begin e = 32767; n_sat++; end
      if (e < -32768) begin e = -32768; n_sat++; end
      chk(v_r[k] == REF_W'(e), $sformatf("v_r[%0d]=%0d exp %0d", k, v_r[k], e));
    end
    @(negedge clk);
  endtask

  initial begin
    int v [P];
    real ex [P];
    int inv;
    for (int k = 0; k < P; k++) v_in[k] = '0;
    inv_vdc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // worked example: v_r * 82.4 V, sent in volts with 6 fractional bits
    ex = '{1.344, 1.693, -0.297, -1.877, -0.863};
    for (int k = 0; k < P; k++) v[k] = $rtoi(ex[k] * 82.4 * 64.0 + (ex[k] >= 0 ? 0.5 : -0.5));
    inv = int'(1048576.0 / 82.4);
    run(v, inv);
    for (int k = 0; k < P; k++)
      chk((real'(v_r[k]) / 4096.0 - ex[k]) < 0.001 && (ex[k] - real'(v_r[k]) / 4096.0) < 0.001, "example value");
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < P; k++) v[k] = int'($urandom_range(0, 65535)) - 32768;
      inv = (n % 2 == 0) ? int'($urandom_range(5000, 30000)) : int'($urandom_range(0, 262143));
      run(v, inv);
    end
    chk(n_sat > 0, "saturation exercised");
    $display("saturated results: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
