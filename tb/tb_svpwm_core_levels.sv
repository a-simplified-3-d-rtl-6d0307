// tb_svpwm_core_levels: runs the modulator core at the larger level counts
// the method is shown with (15, 25 and 31 levels; 31 is the largest the
// default number formats hold) side by side, each checked against the
// reference model by a svpwm_core_checker.  Each size must also meet the m
// clamp at the top of its range at least once.
module tb_svpwm_core_levels;
  logic clk = 0, rst_n = 0;
  int c15, f15, k15, c25, f25, k25, c31, f31, k31;
  logic d15, d25, d31;
  int checks = 0, failures = 0;

  svpwm_core_checker #(.NLEV(15)) u15 (.clk, .rst_n, .checks(c15), .failures(f15), .clamped(k15), .done(d15));
  svpwm_core_checker #(.NLEV(25)) u25 (.clk, .rst_n, .checks(c25), .failures(f25), .clamped(k25), .done(d25));
  svpwm_core_checker #(.NLEV(31)) u31 (.clk, .rst_n, .checks(c31), .failures(f31), .clamped(k31), .done(d31));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d15 && d25 && d31);
    $display("15 levels: %0d checked, %0d clamped; 25 levels: %0d, %0d; 31 levels: %0d, %0d",
             c15, k15, c25, k25, c31, k31);
    checks = c15 + c25 + c31 + 3;
    failures = f15 + f25 + f31 + int'(k15 == 0) + int'(k25 == 0) + int'(k31 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
