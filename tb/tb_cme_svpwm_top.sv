// tb_cme_svpwm_top: end-to-end test of the CME-SVPWM modulator with all
// parameters at their defaults (five phases, five levels, 50 MHz clock,
// 5102-clock switching period, 200-clock dead time).
//
// 1. Worked example: the constant reference [1.344 1.693 -0.297 -1.877
//    -0.863] (in volts, times Vdc = 82.4 V) must produce, in one period, the vectors [1 2 -1 -2 0],
//    [1 2 -1 -1 -1], [1 2 0 -2 -1], [2 1 0 -2 -1], [2 2 -1 -2 -1] for
//    0.137, 0.123, 0.396, 0.307 and 0.036 of the period, with each phase
//    switching exactly twice (2P = 10 switchings per period).
// 2. Sinusoidal five-phase references, m = 1.9 for one 50 Hz fundamental
//    period (196 switching periods) and m = 0.8 for a quarter of one, a new
//    reference sampled at every period start. Checked every clock: the phase
//    levels add up to zero (zero common-mode voltage) and stay within
//    -2..+2; every vector change moves one phase up and one down per step.
//    Checked every period: the time average of each phase level equals the
//    reference with its mean removed (within 0.005 Vdc).
// 3. Special cases: an integer reference (all but one dwell time zero), a
//    reference with equal fractional parts (sorter ties), an overmodulated
//    reference (must raise seq_overmod), and a reference held on the input
//    while the normalizer is busy (taken once, the later value ignored).
// Gate signals are watched throughout: no leg ever has both gates on and
// dead times occur. The 9-clock computation latency is checked, and each
// mechanism (swap, zero dwell, tie, overmodulation, dead time, busy input)
// must occur.
module tb_cme_svpwm_top;
  localparam int P = 5, VIN_W = 16, INV_W = 18, REF_W = 16, FRAC = 12, LVL_W = 4, PERIOD = 5102, NCELL = 2;
  localparam int CW = $clog2(PERIOD + 1), IW = $clog2(P);
  localparam real PI = 3.14159265358979;
  localparam real VDC = 82.4;                     // voltage step, volts
  localparam int  INV = int'(1048576.0 / VDC);    // 1/Vdc, 20 fractional bits

  logic clk = 0, rst_n = 0, ref_valid = 0, ref_ready;
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

  cme_svpwm_top dut (.*);

  int checks = 0, failures = 0;
  int n_busy = 0, n_swap = 0, n_zero_dwell = 0, n_tie = 0, n_overmod = 0, n_dead = 0, n_periods = 0;

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ---------------------------------------------------------------- monitor
  // Reference used in the current period (set when a sequence is swapped in)
  real cur_ref [P], next_ref [P];
  bit  mon_on = 0;              // per-clock level checks enabled
  bit  om_expected = 0;
  longint acc [P];
  int  prev_lvl [P];
  int  prev_idx;
  int  sw_count [P];            // level changes per phase in this period
  int  sw_last [P];             // the same, for the period just finished

  always @(posedge clk) if (rst_n) begin
    #1;
    if (swap) begin
      n_swap++;
      cur_ref = next_ref;
    end
    for (int k = 0; k < P; k++) begin
      if (dead_active[k]) n_dead++;
      for (int c = 0; c < NCELL; c++)
        for (int l = 0; l < 2; l++)
          if (gate_hi[k][c][l] && gate_lo[k][c][l]) chk(0, "shoot-through");
    end
    if (mon_on) begin
      int s, dsum, dabs;
      s = 0; dsum = 0; dabs = 0;
      for (int k = 0; k < P; k++) begin
        s += level[k];
        chk(level[k] <= 2 && level[k] >= -2 || om_expected, "level outside -2..2");
        if (count != 0) begin
          dabs += (level[k] > prev_lvl[k]) ? level[k] - prev_lvl[k] : prev_lvl[k] - level[k];
          if (level[k] != prev_lvl[k]) sw_count[k]++;
        end
      end
      chk(s == 0 || om_expected, $sformatf("common-mode voltage not zero (sum %0d)", s));
      // a single step moves one phase up and one down; if rounding skips a
      // vector the skipped steps may partly cancel
      if (count != 0 && !om_expected) begin
        int jmp;
        jmp = int'(seq_idx) - prev_idx;
        if (jmp <= 1) chk(dabs == 2 * jmp, "one up/one down per step");
        else chk(dabs > 0 && dabs <= 2 * jmp, "multi-step change");
      end
      if (count == 0) begin
        for (int k = 0; k < P; k++) begin acc[k] = 0; sw_count[k] = 0; end
      end
      for (int k = 0; k < P; k++) acc[k] += level[k];
      if (count == CW'(PERIOD - 1)) sw_last = sw_count;
      if (count == CW'(PERIOD - 1) && !om_expected) begin
        real mean, avg;
        mean = 0;
        for (int k = 0; k < P; k++) mean += cur_ref[k] / P;
        for (int k = 0; k < P; k++) begin
          avg = real'(acc[k]) / PERIOD;
          chk((avg - (cur_ref[k] - mean)) < 0.005 && ((cur_ref[k] - mean) - avg) < 0.005,
              $sformatf("phase %0d average %f, reference %f", k, avg, cur_ref[k] - mean));
        end
        n_periods++;
      end
    end
    for (int k = 0; k < P; k++) prev_lvl[k] = level[k];
    prev_idx = seq_idx;
  end

  // ---------------------------------------------------------------- driver
  // v in units of Vdc; sent as volts with 6 fractional bits
  task automatic send(input real v [P]);
    int lat;
    @(negedge clk);
    chk(ref_ready, "ready for a new reference");
    for (int k = 0; k < P; k++) ref_v[k] = VIN_W'($rtoi(v[k] * VDC * 64.0 + (v[k] >= 0 ? 0.5 : -0.5)));
    // exact value the modulator should follow: volts times 1/Vdc as sent
    for (int k = 0; k < P; k++) next_ref[k] = real'(ref_v[k]) / 64.0 * real'(INV) / 1048576.0;
    ref_valid = 1;
    @(negedge clk);
    ref_valid = 0;
    lat = 1;
    while (!seq_valid) begin @(negedge clk); lat++; end
    chk(lat == P + 4, $sformatf("latency %0d clocks, expected %0d", lat, P + 4));
  endtask

  task automatic wait_period_start();
    @(posedge clk); #2;
    while (count != '0) begin @(posedge clk); #2; end
  endtask

  // count dwell clocks of each sequence index in one full period
  task automatic dwell_of_period(output int d [P]);
    for (int j = 0; j < P; j++) d[j] = 0;
    wait_period_start();
    for (int c = 0; c < PERIOD; c++) begin
      d[seq_idx]++;
      @(posedge clk); #2;
    end
  endtask

  initial begin
    real v [P];
    int d [P];
    int ex_vs [P][P];
    real ex_t [P];
    for (int k = 0; k < P; k++) ref_v[k] = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;

    // ---- 1. worked example
    v = '{1.344, 1.693, -0.297, -1.877, -0.863};
    send(v);
    chk(!seq_overmod, "example is in the linear range");
    // check the computed sequence before it is used
    ex_vs = '{'{1,2,-1,-2,0}, '{1,2,-1,-1,-1}, '{1,2,0,-2,-1}, '{2,1,0,-2,-1}, '{2,2,-1,-2,-1}};
    for (int j = 0; j < P; j++) for (int k = 0; k < P; k++)
      chk(dut.vs[j][k] == LVL_W'(ex_vs[j][k]), $sformatf("example vector %0d phase %0d", j, k));
    wait_period_start();          // sequence swapped in here
    mon_on = 1;
    dwell_of_period(d);
    ex_t = '{0.137, 0.123, 0.396, 0.307, 0.036};
    for (int j = 0; j < P; j++)
      chk(real'(d[j]) / PERIOD - ex_t[j] < 0.003 && ex_t[j] - real'(d[j]) / PERIOD < 0.003,
          $sformatf("example dwell t%0d = %f", j + 1, real'(d[j]) / PERIOD));
    // 2(P-1) switchings inside the period, and 2 more for the return from
    // the last vector to the first: each phase switches exactly twice
    begin
      int tot, wrap;
      tot = 0; wrap = 0;
      for (int k = 0; k < P; k++) tot += sw_last[k];
      chk(tot == 2 * (P - 1), $sformatf("%0d switchings inside the period, expected 8", tot));
      // dwell_of_period returned in the first clock of the next period
      for (int k = 0; k < P; k++) begin
        chk(level[k] == LVL_W'(ex_vs[0][k]), "wrap back to first vector");
        if (level[k] != LVL_W'(ex_vs[P-1][k])) wrap++;
      end
      chk(wrap == 2, "return to the first vector switches two phases");
      chk(tot + wrap == 2 * P, "2P switchings per period");
    end

    // ---- 2. sinusoidal references
    for (int pass = 0; pass < 2; pass++) begin
      real m;
      int nper;
      m = (pass == 0) ? 1.9 : 0.8;
      nper = (pass == 0) ? 196 : 49;
      for (int n = 0; n < nper; n++) begin
        real tt;
        wait_period_start();
        tt = real'(n) / 9800.0;
        for (int k = 0; k < P; k++) v[k] = m * $sin(2.0 * PI * 50.0 * tt + 2.0 * PI * k / 5.0);
        send(v);
        // zero-dwell vectors in the new sequence
        for (int j = 0; j < P; j++) if (dut.t_q[j] == '0) n_zero_dwell++;
      end
    end

    // ---- 3a. integer reference: one vector for the whole period
    wait_period_start();
    v = '{1.0, -1.0, 0.0, 2.0, -2.0};
    send(v);
    for (int j = 1; j < P; j++) if (dut.t_q[j] == '0) n_zero_dwell++;
    chk(dut.t_q[0] == 13'd4096, "integer reference: first vector for the whole period");
    dwell_of_period(d);
    chk(d[0] == PERIOD, "integer reference: only one vector in use");
    // ---- 3b. equal fractional parts
    v = '{0.25, 0.25, 0.25, -0.25, -0.5};
    send(v);
    begin
      int f [P-1];
      for (int i = 0; i < P - 1; i++) f[i] = dut.u_bsvpwm.frac[i];
      for (int i = 0; i < P - 1; i++) for (int j = i + 1; j < P - 1; j++) if (f[i] == f[j]) n_tie++;
    end
    dwell_of_period(d);
    // ---- 3c. overmodulation
    wait_period_start();
    om_expected = 1;
    v = '{2.7, -2.7, 0.0, 0.0, 0.0};
    send(v);
    chk(seq_overmod, "overmodulated reference must raise seq_overmod");
    if (seq_overmod) n_overmod++;
    dwell_of_period(d);
    v = '{0.5, -0.5, 0.0, 0.0, 0.0};
    send(v);
    chk(!seq_overmod, "seq_overmod clears for a linear-range reference");
    dwell_of_period(d);
    om_expected = 0;
    // ---- 3d. a reference offered while the normalizer is busy is not taken
    wait_period_start();
    @(negedge clk);
    v = '{0.3, 0.2, -0.1, -0.2, -0.2};
    for (int k = 0; k < P; k++) ref_v[k] = VIN_W'($rtoi(v[k] * VDC * 64.0 + (v[k] >= 0 ? 0.5 : -0.5)));
    for (int k = 0; k < P; k++) next_ref[k] = real'(ref_v[k]) / 64.0 * real'(INV) / 1048576.0;
    ref_valid = 1;
    @(negedge clk);
    chk(!ref_ready, "busy while normalizing");
    if (!ref_ready) n_busy++;
    for (int k = 0; k < P; k++) ref_v[k] = VIN_W'(3000);   // must be ignored
    repeat (P) @(negedge clk);
    ref_valid = 0;
    dwell_of_period(d);
    dwell_of_period(d);

    $display("periods checked=%0d swaps=%0d zero dwell=%0d ties=%0d overmod=%0d dead-time clocks=%0d",
             n_periods, n_swap, n_zero_dwell, n_tie, n_overmod, n_dead);
    chk(n_swap > 200, "sequence swaps");
    chk(n_zero_dwell > 0, "zero dwell time");
    chk(n_tie > 0, "sorter tie");
    chk(n_overmod > 0, "overmodulation");
    chk(n_dead > 0, "dead time");
    chk(n_busy > 0, "reference held off while busy");
    chk(n_periods > 240, "periods checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
