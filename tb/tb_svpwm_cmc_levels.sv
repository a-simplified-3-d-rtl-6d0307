// tb_svpwm_cmc_levels: runs the converter sizes evaluated besides the
// default two-cell one, side by side: one cell per phase (five-level phase
// voltage) and three cells per phase (13-level).  Both are driven with the
// same sine references, scaled to modulation index 0.85 of their own level
// count, through one fundamental cycle of 32 switching periods with
// alternating ascending/descending periods (m = 1 / 0) and then one cycle of
// discontinuous modulation.  cmc_monitor checks every period and clock of
// each instance; at the end each instance must have produced all of its
// phase levels.  Last, the five-level instance replays the worked example of
// the method: a fixed reference (2.5, 2.7, 0.2) in the triangle with bottom
// vector (2,2,0), m = 1 ascending and m = 0 descending, must step through
// (3,3,1) (3,4,1) (4,4,1) (4,4,2) in an ascending period and
// (3,3,1) (3,3,0) (2,3,0) (2,2,0) in the following descending one.
module tb_svpwm_cmc_levels;
  import svpwm_pkg::*;

  localparam int TS  = 256;
  localparam int PPC = 32;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  mfac_t m_asc = 1, m_desc = 0;
  logic disc_mode = 0;
  logic [23:0] car_inc = 24'(2 ** 24 / TS);
  logic [2:0] i_pos = 0, i_neg = 0;
  vabc_t v1 = '0, v3 = '0;

  always #5 clk = ~clk;

  // ---- five-level instance ----
  vmeas_t c1a [3][1], c1b [3][1];
  lvl_t   pl1 [3];
  clvl_t  cl1 [3][1];
  pair_t  pr1 [3][1];
  logic [7:0] g1 [3][1];
  duty3_t d1; region_e r1; logic ps1, ds1; logic [2:0] su1, sd1;
  svpwm_cmc_top #(.N_CELLS(1)) dut1 (
    .clk, .rst_n, .v_ref(v1), .m_asc, .m_desc, .disc_mode, .dir_sel(DIR_ALT), .car_inc, .bal_en(1'b1),
    .i_pos, .i_neg, .vc1(c1a), .vc2(c1b), .phase_level(pl1), .cell_level(cl1), .cell_pair(pr1),
    .gates(g1), .duty(d1), .region(r1), .period_start(ps1), .desc(ds1), .step_up(su1), .step_dn(sd1));

  // ---- 13-level instance ----
  vmeas_t c3a [3][3], c3b [3][3];
  lvl_t   pl3 [3];
  clvl_t  cl3 [3][3];
  pair_t  pr3 [3][3];
  logic [7:0] g3 [3][3];
  duty3_t d3; region_e r3; logic ps3, ds3; logic [2:0] su3, sd3;
  svpwm_cmc_top #(.N_CELLS(3)) dut3 (
    .clk, .rst_n, .v_ref(v3), .m_asc, .m_desc, .disc_mode, .dir_sel(DIR_ALT), .car_inc, .bal_en(1'b1),
    .i_pos, .i_neg, .vc1(c3a), .vc2(c3b), .phase_level(pl3), .cell_level(cl3), .cell_pair(pr3),
    .gates(g3), .duty(d3), .region(r3), .period_start(ps3), .desc(ds3), .step_up(su3), .step_dn(sd3));

  int ck1, fl1, pe1, ls1, ck3, fl3, pe3, ls3;
  cmc_monitor #(.NC(1), .TS(TS)) mon1 (.clk, .rst_n, .v_ref(v1), .m_asc, .m_desc, .disc_mode,
    .period_start(ps1), .desc(ds1), .phase_level(pl1), .cell_level(cl1),
    .checks(ck1), .failures(fl1), .periods(pe1), .levels_seen(ls1));
  cmc_monitor #(.NC(3), .TS(TS)) mon3 (.clk, .rst_n, .v_ref(v3), .m_asc, .m_desc, .disc_mode,
    .period_start(ps3), .desc(ds3), .phase_level(pl3), .cell_level(cl3),
    .checks(ck3), .failures(fl3), .periods(pe3), .levels_seen(ls3));

  function automatic vabc_t ref_of(int nlev, real th);
    real ctr, amp;
    ctr = real'(nlev - 1) / 2.0;
    amp = 0.85 * real'(nlev - 1) / $sqrt(3.0);
    ref_of.a = vfix_t'($rtoi((ctr + amp * $sin(th)) * 4096.0));
    ref_of.b = vfix_t'($rtoi((ctr + amp * $sin(th - 2.0 * PI / 3.0)) * 4096.0));
    ref_of.c = vfix_t'($rtoi((ctr + amp * $sin(th + 2.0 * PI / 3.0)) * 4096.0));
  endfunction

  int checks = 0, failures = 0;

  initial begin
    repeat (3 * PPC * TS) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + ck1 + ck3, failures + fl1 + fl3 + 1);
    $finish;
  end

  initial begin
    for (int x = 0; x < 3; x++) begin
      c1a[x][0] = 500; c1b[x][0] = 500;
      for (int k = 0; k < 3; k++) begin c3a[x][k] = vmeas_t'(490 + 5 * k); c3b[x][k] = 500; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2; cyc++) begin
      disc_mode = (cyc == 1);
      for (int p = 0; p < PPC; p++) begin
        real th;
        @(posedge ps1);
        repeat (TS / 2) @(negedge clk);
        th = 2.0 * PI * (real'(p) + 0.37) / real'(PPC);
        v1 = ref_of(5, th);
        v3 = ref_of(13, th);
        for (int x = 0; x < 3; x++) begin
          real i; i = $sin(th - 0.5 - real'(x) * 2.0 * PI / 3.0);
          i_pos[x] = (i > 0.05); i_neg[x] = (i < -0.05);
        end
      end
    end
    @(posedge ps1);
    @(negedge clk);
    begin
      int seq [$];
      int want [8];
      int hit;
      int last;
      want = '{331, 341, 441, 442, 331, 330, 230, 220};
      repeat (TS / 2) @(negedge clk);
      disc_mode = 0;
      v1 = '{vfix_t'(2 * 4096 + 2048), vfix_t'(2 * 4096 + 2867), vfix_t'(819)};
      repeat (3) @(posedge ps1);
      last = -1;
      repeat (4 * TS) begin
        int t;
        @(negedge clk);
        t = 100 * int'(pl1[0]) + 10 * int'(pl1[1]) + int'(pl1[2]);
        if (t != last) seq.push_back(t);
        last = t;
      end
      hit = 0;
      for (int k = 0; k + 8 <= seq.size(); k++) begin
        bit ok; ok = 1;
        for (int j = 0; j < 8; j++) if (seq[k + j] != want[j]) ok = 0;
        if (ok) hit = 1;
      end
      $write("five-level example sequence:");
      foreach (seq[k]) $write(" %0d", seq[k]);
      $write("\n");
      checks++;
      if (!hit) begin failures++; $display("FAIL worked-example level sequence not found"); end
    end
    $display("five-level: %0d periods, %0d levels seen; 13-level: %0d periods, %0d levels seen", pe1, ls1, pe3, ls3);
    checks += 2;
    if (ls1 != 5) failures++;
    if (ls3 != 13) failures++;
    checks += 2;
    if (pe1 < 2 * PPC - 2) failures++;
    if (pe3 < 2 * PPC - 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + ck1 + ck3, failures + fl1 + fl3);
    $finish;
  end
endmodule
