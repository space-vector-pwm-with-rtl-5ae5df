// cme_generic_run: test harness that runs one cme_svpwm_top configuration
// with random references and reports its check counts (used by
// tb_cme_svpwm_generic to show the RTL works for other phase and level
// counts).
//
// In each of NPER periods a random balanced sinusoidal P-phase reference of
// amplitude up to 90 % of the linear limit (N-1)/2 and random angle is sent
// at the period start, in volts for a 48 V voltage step. Checked every clock: levels sum to zero, stay within
// +-(N-1)/2, and each single sequence step moves two phases by one unit
// (one up, one down). Checked every period: the time average of each phase
// equals the reference minus its mean within 0.01 Vdc, and no sequence is
// flagged as overmodulated. `done` rises when all periods are finished.
module cme_generic_run #(
  parameter int P = 7,
  parameter int N_LEVELS = 7,
  parameter int PERIOD = 1000,
  parameter int DEAD = 20,
  parameter int NPER = 100
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int VIN_W = 16, INV_W = 18, REF_W = 16, FRAC = 12, LVL_W = 4, NCELL = (N_LEVELS - 1) / 2;
  localparam int CW = $clog2(PERIOD + 1), IW = $clog2(P);
  localparam int LMAX = (N_LEVELS - 1) / 2;
  localparam real PI = 3.14159265358979;
  localparam real VDC = 48.0;
  localparam int  INV = int'(1048576.0 / VDC);

  logic ref_valid = 0, ref_ready;
  logic signed [VIN_W-1:0] ref_v [P];
  logic [INV_W-1:0] vdc_inv = INV_W'(INV);
  logic seq_valid, seq_overmod;
  logic signed [LVL_W-1:0] level [P];
  logic [IW-1:0] seq_idx;
  logic [CW-1:0] count;
  logic period_start, swap;
  logic gate_hi [P][NCELL][2];
  logic gate_lo [P][NCELL][2];
  logic dead_active [P];

  cme_svpwm_top #(.P(P), .N_LEVELS(N_LEVELS), .PERIOD(PERIOD), .DEAD(DEAD)) dut (.*);

  real cur_ref [P], next_ref [P];
  longint acc [P];
  int prev_lvl [P], prev_idx, nper_done = 0;
  bit active = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL P=%0d N=%0d @%0t: %s", P, N_LEVELS, $time, msg);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    #1;
    if (swap) begin cur_ref = next_ref; active = 1; end
    if (active) begin
      int s, dabs;
      s = 0; dabs = 0;
      for (int k = 0; k < P; k++) begin
        s += level[k];
        chk(level[k] <= LMAX && level[k] >= -LMAX, "level out of range");
        dabs += (level[k] > prev_lvl[k]) ? level[k] - prev_lvl[k] : prev_lvl[k] - level[k];
        for (int c = 0; c < NCELL; c++) for (int l = 0; l < 2; l++)
          if (gate_hi[k][c][l] && gate_lo[k][c][l]) chk(0, "shoot-through");
      end
      chk(s == 0, "nonzero common-mode voltage");
      // one step moves two phases by one unit; when rounding skips vectors,
      // the skipped steps may partly cancel
      if (count != 0) begin
        int jmp;
        jmp = int'(seq_idx) - prev_idx;
        if (jmp <= 1) chk(dabs == 2 * jmp, "two units per sequence step");
        else chk(dabs > 0 && dabs <= 2 * jmp, "multi-step change");
      end
      if (count == 0) for (int k = 0; k < P; k++) acc[k] = 0;
      for (int k = 0; k < P; k++) acc[k] += level[k];
      if (count == CW'(PERIOD - 1)) begin
        real mean, avg;
        mean = 0;
        for (int k = 0; k < P; k++) mean += cur_ref[k] / P;
        for (int k = 0; k < P; k++) begin
          avg = real'(acc[k]) / PERIOD;
          chk((avg - (cur_ref[k] - mean)) < 0.01 && ((cur_ref[k] - mean) - avg) < 0.01,
              $sformatf("phase %0d average %f, reference %f", k, avg, cur_ref[k] - mean));
        end
        nper_done++;
      end
    end
    for (int k = 0; k < P; k++) prev_lvl[k] = level[k];
    prev_idx = seq_idx;
  end

  initial begin
    checks = 0;
    failures = 0;
    done = 0;
    for (int k = 0; k < P; k++) ref_v[k] = '0;
    @(posedge rst_n);
    for (int n = 0; n < NPER; n++) begin
      real m, th, v;
      @(posedge clk); #2;
      while (count != '0) begin @(posedge clk); #2; end
      m  = 0.9 * LMAX * real'($urandom_range(0, 1000)) / 1000.0;
      th = 2.0 * PI * real'($urandom_range(0, 3600)) / 3600.0;
      @(negedge clk);
      for (int k = 0; k < P; k++) begin
        v = m * $sin(th + 2.0 * PI * k / P);
        ref_v[k] = VIN_W'($rtoi(v * VDC * 64.0 + (v >= 0 ? 0.5 : -0.5)));
        next_ref[k] = real'(ref_v[k]) / 64.0 * real'(INV) / 1048576.0;
      end
      ref_valid = 1;
      @(negedge clk);
      ref_valid = 0;
      repeat (P + 3) @(negedge clk);
      chk(!seq_overmod, "reference inside the linear range flagged as overmodulated");
    end
    @(posedge clk); #2;
    while (count != '0) begin @(posedge clk); #2; end
    repeat (PERIOD) @(posedge clk);
    chk(nper_done >= NPER, "all periods checked");
    done = 1;
  end
endmodule
