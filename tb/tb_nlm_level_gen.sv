// tb_nlm_level_gen: checks the nearest-level PWM stage with a 16-bit ramp.
// With car_inc = 256 a period lasts 256 clocks and the duty comparison
// advances 32 duty LSBs per clock, so a duty of 32*k must give exactly k
// clocks at level Wx+1.  For every period and phase the testbench checks
// the period length, the number of clocks at Wx+1, that only Wx and Wx+1
// occur (Wx+1 saturated at the top level), their order (ascending: Wx
// first; descending: Wx+1 first), the direction policy (fixed or
// alternating) and that f_rise / f_fall mark every level step.  The
// switching frequency is then doubled on line (car_inc = 512).
module tb_nlm_level_gen;
  import svpwm_pkg::*;

  localparam int CW = 16;
  localparam int NLEV = 9;

  logic clk = 0, rst_n = 0;
  logic [CW-1:0] car_inc = 256;
  dir_sel_e dir_sel = DIR_ALT;
  lvl3_t  w_base = '0;
  duty3_t duty = '0;
  lvl3_t  phase_level;
  logic [2:0] f_rise, f_fall;
  logic period_start, desc, next_desc;
  int checks = 0, failures = 0;

  nlm_level_gen #(.N_LEVELS(NLEV), .CAR_W(CW)) dut (
    .clk, .rst_n, .car_inc, .dir_sel, .w_base, .duty,
    .phase_level, .f_rise, .f_fall, .period_start, .desc, .next_desc);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- monitor: one window per period, aligned to the registered level ----
  logic ps_d = 0;
  int   win_len = 0, hi_cnt [3], lo_after_hi [3], hi_after_lo [3], bad_lvl [3];
  int   w_exp [3], k_exp [3];
  bit   desc_exp = 0, desc_prev = 0, have_win = 0;
  int   periods = 0, exp_len = 256;
  lvl_t prev_lvl [3] = '{default: 0};

  function automatic int lvl_of(lvl3_t l, int x);
    return (x == 0) ? int'(l.a) : (x == 1) ? int'(l.b) : int'(l.c);
  endfunction

  always @(posedge clk) if (rst_n) begin
    ps_d <= period_start;
    // level step strobes
    for (int x = 0; x < 3; x++) begin
      int l; l = lvl_of(phase_level, x);
      checks++;
      if (f_rise[2-x] != (l > int'(prev_lvl[x])) || f_fall[2-x] != (l < int'(prev_lvl[x]))) failures++;
      prev_lvl[x] = lvl_t'(l);
    end
    if (ps_d) begin
      if (have_win) begin
        checks++;
        if (win_len != exp_len) begin failures++; $display("FAIL period %0d clocks", win_len); end
        for (int x = 0; x < 3; x++) begin
          checks++;
          if (hi_cnt[x] != k_exp[x] || bad_lvl[x] != 0 ||
              (!desc_exp && lo_after_hi[x] != 0) || (desc_exp && hi_after_lo[x] != 0)) begin
            failures++;
            $display("FAIL phase %0d desc=%0d hi=%0d exp %0d bad=%0d order %0d/%0d", x, desc_exp,
                     hi_cnt[x], k_exp[x], bad_lvl[x], lo_after_hi[x], hi_after_lo[x]);
          end
        end
        periods++;
      end
      // new window: expectations from the values latched at this period start
      have_win = 1;
      desc_prev = desc_exp;
      desc_exp = desc;
      checks++;
      if (dir_sel == DIR_ASC && desc) failures++;
      if (dir_sel == DIR_DESC && !desc) failures++;
      if (dir_sel == DIR_ALT && periods > 0 && desc == desc_prev) failures++;
      w_exp = '{int'(dut.w_lat.a), int'(dut.w_lat.b), int'(dut.w_lat.c)};
      k_exp = '{int'(dut.d_lat.a), int'(dut.d_lat.b), int'(dut.d_lat.c)};
      for (int x = 0; x < 3; x++) begin
        k_exp[x] = k_exp[x] * exp_len / 8192;
        if (w_exp[x] >= NLEV - 1) k_exp[x] = 0;   // W+1 saturates: never above W
        hi_cnt[x] = 0; lo_after_hi[x] = 0; hi_after_lo[x] = 0; bad_lvl[x] = 0;
      end
      win_len = 0;
    end
    if (have_win) begin
      win_len++;
      for (int x = 0; x < 3; x++) begin
        int l; l = lvl_of(phase_level, x);
        if (l == w_exp[x] + 1) begin
          if (win_len - 1 > hi_cnt[x]) hi_after_lo[x]++;   // a low clock came before
          hi_cnt[x]++;
        end else if (l == w_exp[x]) begin
          if (hi_cnt[x] > 0) lo_after_hi[x]++;
        end else bad_lvl[x]++;
      end
    end
  end

  task automatic set_inputs(int w0, w1, w2, int k0, k1, k2, int step);
    w_base = '{lvl_t'(w0), lvl_t'(w1), lvl_t'(w2)};
    duty = '{duty_t'(k0 * step), duty_t'(k1 * step), duty_t'(k2 * step)};
  endtask

  // change the inputs in the middle of a period only
  task automatic mid_period();
    @(posedge period_start);
    repeat (exp_len / 2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    set_inputs(3, 4, 1, 100, 256, 0, 32);
    for (int p = 0; p < 40; p++) begin
      mid_period();
      if (p == 10) dir_sel = DIR_ASC;
      if (p == 16) dir_sel = DIR_DESC;
      if (p == 22) dir_sel = DIR_ALT;
      if (p == 30) set_inputs(8, 7, 0, 50, 200, 255, 32);   // top level saturates
      else set_inputs($urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7),
                      $urandom_range(0, 256), $urandom_range(0, 256), $urandom_range(0, 256), 32);
    end
    // double the switching frequency on line
    mid_period();
    set_inputs(2, 5, 6, 64, 10, 127, 64);
    car_inc = 512;
    exp_len = 128;
    have_win = 0;
    for (int p = 0; p < 20; p++) begin
      mid_period();
      set_inputs($urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7),
                 2 * $urandom_range(0, 64), 2 * $urandom_range(0, 64), 2 * $urandom_range(0, 64), 64);
    end
    @(posedge period_start);
    checks++;
    if (periods < 55) begin failures++; $display("FAIL only %0d periods", periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
