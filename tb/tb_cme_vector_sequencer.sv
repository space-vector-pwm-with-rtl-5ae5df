// tb_cme_vector_sequencer: self-checking test of the period sequencer
// (PERIOD reduced to 500 clocks to keep the run short).
//
// Sequences with distinguishable vectors and random dwell times (some zero)
// are loaded at random points of a period, sometimes twice (the last load
// must win) and sometimes in the last clock of a period. In the following
// period the test checks, clock by clock, that swap pulses at its start and
// that vector j is output while round((t_0+..+t_{j-1})*PERIOD) <= count <
// round((t_0+..+t_j)*PERIOD), with those instants computed here. Also
// checks the zero output before the first load and that a sequence stays in
// use when no new one arrives.
module tb_cme_vector_sequencer;
  localparam int P = 5, LVL_W = 4, FRAC = 12, PERIOD = 500;
  localparam int CW = $clog2(PERIOD + 1), IW = $clog2(P);

  logic clk = 0, rst_n = 0, load = 0;
  logic signed [LVL_W-1:0] vs_in [P][P];
  logic        [FRAC:0]    t_in  [P];
  logic signed [LVL_W-1:0] level [P];
  logic        [IW-1:0]    seq_idx;
  logic        [CW-1:0]    count;
  logic                    period_start, swap;
  int checks = 0, failures = 0, n_zero_dwell = 0, n_double = 0, n_lastclk = 0;

  cme_vector_sequencer #(.P(P), .LVL_W(LVL_W), .FRAC(FRAC), .PERIOD(PERIOD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  int cur_t [P];
  int cur_id;

  // vector j of sequence id: component 0 = j, component 1 = id mod 8 - 4
  task automatic make_seq(input int id, output int tt [P]);
    int left;
    left = 1 << FRAC;
    for (int j = 0; j < P - 1; j++) begin
      tt[j] = ($urandom_range(0, 3) == 0) ? 0 : int'($urandom_range(0, left));
      left -= tt[j];
    end
    tt[P-1] = left;
  endtask

  task automatic drive_load(input int id, input int tt [P]);
    @(negedge clk);
    for (int j = 0; j < P; j++) begin
      for (int k = 0; k < P; k++) vs_in[j][k] = '0;
      vs_in[j][0] = LVL_W'(j);
      vs_in[j][1] = LVL_W'(id % 8 - 4);
      t_in[j]     = (FRAC+1)'(tt[j]);
    end
    load = 1;
    @(negedge clk);
    load = 0;
  endtask

  task automatic check_period(input int id, input int tt [P], input bit expect_swap);
    int b [P];
    int cum, exp_j;
    cum = 0;
    for (int j = 0; j < P - 1; j++) begin
      cum += tt[j];
      b[j] = (cum * PERIOD + (1 << (FRAC - 1))) >> FRAC;
    end
    b[P-1] = PERIOD;
    // we are right after the edge where count became 0
    chk(swap == expect_swap, "swap pulse at period start");
    chk(period_start, "period_start");
    for (int c = 0; c < PERIOD; c++) begin
      exp_j = 0;
      while (exp_j < P - 1 && c >= b[exp_j]) exp_j++;
      chk(count == CW'(c), "count");
      chk(seq_idx == IW'(exp_j), $sformatf("seq_idx=%0d exp %0d at count %0d", seq_idx, exp_j, c));
      chk(level[0] == LVL_W'(exp_j) && level[1] == LVL_W'(id % 8 - 4), "level vector");
      if (c > 0) chk(!swap && !period_start, "no swap inside a period");
      @(posedge clk); #1;
    end
  endtask

  initial begin
    int tt [P], t2 [P];
    int off;
    for (int j = 0; j < P; j++) begin
      t_in[j] = '0;
      for (int k = 0; k < P; k++) vs_in[j][k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int k = 0; k < P; k++) chk(level[k] == '0, "zero output before first sequence");
    for (int n = 0; n < 60; n++) begin
      make_seq(n, tt);
      for (int j = 0; j < P; j++) if (tt[j] == 0) n_zero_dwell++;
      // wait for a random point in the period
      off = (n % 5 == 4) ? PERIOD - 1 : int'($urandom_range(2, PERIOD - 3));
      while (count != CW'(off)) begin @(posedge clk); #1; end
      if (off == PERIOD - 1) n_lastclk++;
      if (n % 4 == 1 && off < PERIOD - 1) begin
        make_seq(n + 100, t2);
        drive_load(n + 100, t2);   // overwritten below
        n_double++;
      end
      drive_load(n, tt);
      // the rest of this period must still use the previous sequence
      if (n > 0 && off < PERIOD - 3) chk(level[1] == LVL_W'((n - 1) % 8 - 4), "old sequence until boundary");
      // a load in the last clock of a period is used from the very next clock
      if (off == PERIOD - 1) chk(count == '0, "last-clock load lands on the boundary");
      else while (count != '0) begin @(posedge clk); #1; end
      check_period(n, tt, 1'b1);
      // a period without a new load repeats the same sequence, without swap
      if (n % 10 == 3) begin
        check_period(n, tt, 1'b0);
      end
    end
    chk(n_zero_dwell > 0 && n_double > 0 && n_lastclk > 0, "all cases exercised");
    $display("zero dwell=%0d double load=%0d last-clock load=%0d", n_zero_dwell, n_double, n_lastclk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
