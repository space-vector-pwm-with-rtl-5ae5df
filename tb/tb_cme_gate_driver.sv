// tb_cme_gate_driver: self-checking test of the level-to-gate mapping of one
// cascaded full-bridge phase (two cells, five levels) with dead time
// (DEAD reduced to 7 clocks).
//
// Random level steps of one unit, held for random times (some shorter than
// the dead time), and occasional jumps of several levels. Checked each
// clock: no leg has both gates on; every turn-on of a gate is preceded by
// at least DEAD clocks with both gates of that leg off, and exactly DEAD
// when the request was steady; after a level has been held for DEAD+2
// clocks the cell outputs add up to the level (cell output = A - B); a
// one-unit step changes the requested state of exactly one leg.
module tb_cme_gate_driver;
  localparam int N_LEVELS = 5, LVL_W = 4, DEAD = 7, NCELL = 2;

  logic clk = 0, rst_n = 0;
  logic signed [LVL_W-1:0] level = '0;
  logic g_hi [NCELL][2];
  logic g_lo [NCELL][2];
  logic dead_active;
  int checks = 0, failures = 0, n_dead = 0, n_short = 0;
  int off_run [NCELL][2];
  bit last_hi [NCELL][2];
  int n_exact = 0;
  int held;

  cme_gate_driver #(.N_LEVELS(N_LEVELS), .LVL_W(LVL_W), .DEAD(DEAD)) dut (.*);

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

  function automatic int cell_sum();
    int s; s = 0;
    for (int c = 0; c < NCELL; c++) s += int'(g_hi[c][0]) - int'(g_hi[c][1]);
    return s;
  endfunction

  // clock-by-clock monitor
  always @(posedge clk) if (rst_n) begin
    #1;
    held++;
    for (int c = 0; c < NCELL; c++)
      for (int l = 0; l < 2; l++) begin
        chk(!(g_hi[c][l] && g_lo[c][l]), "shoot-through");
        if (!g_hi[c][l] && !g_lo[c][l]) off_run[c][l]++;
        else begin
          // a complementary switch-over needs the dead time; resuming the
          // same gate after an aborted request does not
          if (off_run[c][l] > 0 && g_hi[c][l] != last_hi[c][l]) begin
            chk(off_run[c][l] >= DEAD, $sformatf("dead time %0d too short", off_run[c][l]));
            n_dead++;
            if (off_run[c][l] == DEAD) n_exact++;
          end
          off_run[c][l] = 0;
          last_hi[c][l] = g_hi[c][l];
        end
      end
    if (held == DEAD + 2) chk(cell_sum() == int'(level), $sformatf("cells give %0d for level %0d", cell_sum(), level));
  end

  function automatic int nwant(input int lv);
    // number of legs requested up for level lv
    return (lv > 0) ? lv : -lv;
  endfunction

  initial begin
    int lv, hold, nxt;
    for (int c = 0; c < NCELL; c++) for (int l = 0; l < 2; l++) begin
      off_run[c][l] = 0;
      last_hi[c][l] = 0;
    end
    held = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    lv = 0;
    for (int n = 0; n < 3000; n++) begin
      if (n % 50 == 0) nxt = $urandom_range(0, 4) - 2;
      else begin
        nxt = lv + (($urandom_range(0, 1) == 1) ? 1 : -1);
        if (nxt > 2) nxt = 1;
        if (nxt < -2) nxt = -1;
      end
      // one-unit steps move one leg: one leg more or fewer is requested up,
      // and never both legs of a cell
      if (nxt - lv == 1 || lv - nxt == 1)
        chk(nwant(nxt) - nwant(lv) == 1 || nwant(lv) - nwant(nxt) == 1, "one leg per step");
      lv = nxt;
      hold = (n % 9 == 0) ? int'($urandom_range(1, DEAD - 1)) : int'($urandom_range(DEAD + 2, 3 * DEAD));
      if (hold < DEAD) n_short++;
      @(negedge clk);
      level = LVL_W'(lv);
      held = 0;
      // steady request from a settled state: dead time must be exactly DEAD
      repeat (hold) @(negedge clk);
    end
    repeat (DEAD + 3) @(posedge clk);
    chk(n_dead > 100 && n_short > 0, "dead times and short pulses exercised");
    chk(n_exact * 10 > n_dead * 9, "steady requests must see exactly DEAD clocks");
    $display("dead times=%0d (exactly DEAD: %0d) short holds=%0d", n_dead, n_exact, n_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
