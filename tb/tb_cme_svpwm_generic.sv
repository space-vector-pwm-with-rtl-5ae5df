// tb_cme_svpwm_generic: runs the complete modulator in three other
// configurations side by side, to show the RTL is not tied to five phases
// and five levels: seven phases / seven levels, three phases / three levels
// and six phases / five levels, each with its own period and dead time and
// 100 random sinusoidal references (see cme_generic_run for the checks).
module tb_cme_svpwm_generic;
  logic clk = 0, rst_n = 0;
  logic d7, d3, d6;
  int c7, f7, c3, f3, c6, f6;

  always #10 clk = ~clk;

  cme_generic_run #(.P(7), .N_LEVELS(7), .PERIOD(1000), .DEAD(20)) u_p7 (.clk, .rst_n, .done(d7), .checks(c7), .failures(f7));
  cme_generic_run #(.P(3), .N_LEVELS(3), .PERIOD(800),  .DEAD(10)) u_p3 (.clk, .rst_n, .done(d3), .checks(c3), .failures(f3));
  cme_generic_run #(.P(6), .N_LEVELS(5), .PERIOD(1200), .DEAD(30)) u_p6 (.clk, .rst_n, .done(d6), .checks(c6), .failures(f6));

  initial begin
    repeat (400_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c7 + c3 + c6, f7 + f3 + f6 + 1);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (d7 && d3 && d6);
    $display("P=7 N=7: checks=%0d failures=%0d", c7, f7);
    $display("P=3 N=3: checks=%0d failures=%0d", c3, f3);
    $display("P=6 N=5: checks=%0d failures=%0d", c6, f6);
    $display("TB_RESULT checks=%0d failures=%0d", c7 + c3 + c6, f7 + f3 + f6);
    $finish;
  end
endmodule
