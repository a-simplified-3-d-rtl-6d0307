// tb_svpwm_cmc_top: end-to-end test of the modulator at its default size
// (two cascaded 3LNPC cells per phase, nine levels, 24-bit ramp).  A
// three-phase sine reference is advanced once per switching period (in the
// middle of the period, so each period start sees a settled result); the
// switching period is 256 clocks.  Three fundamental cycles of 32 periods:
//   1. modulation index 0.5, continuous duty, alternating ascending and
//      descending periods with m = 1 ascending and m = 0 descending;
//   2. index 0.85, discontinuous duty, same direction policy with m = 2
//      ascending (clamped near the peaks);
//   3. index 0.85, continuous, ascending only, balancing switched off.
// Every period and phase is checked against the reference model: only the
// expected levels W and W+1 occur and W+1 lasts the expected number of
// clocks.  Every clock: the cell levels of a phase add up to its level once
// the phase level has been steady, each cell's switching pair matches its
// level, and its gates match the pair.  The capacitor voltages and current
// signs are stimulus that moves through all comparison cases.  Each
// mechanism (ascending and descending periods, discontinuous periods,
// redundant vector m > 0, m clamping, cell 1 and cell 2 steps, multi-level
// catch-up, the four balancing pairs, balancing off) is counted and must
// occur.
module tb_svpwm_cmc_top;
  import svpwm_pkg::*;
  import svpwm_ref_pkg::*;

  localparam int NC   = 2;          // default of the top
  localparam int NLEV = 4 * NC + 1;
  localparam int TS   = 256;        // clocks per switching period
  localparam int PPC  = 32;         // periods per fundamental cycle
  localparam real PI  = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  vabc_t v_ref = '0;
  mfac_t m_asc = 1, m_desc = 0;
  logic disc_mode = 0, bal_en = 1;
  dir_sel_e dir_sel = DIR_ALT;
  logic [23:0] car_inc = 24'(2 ** 24 / TS);
  logic [2:0] i_pos = 0, i_neg = 0;
  vmeas_t vc1 [3][NC];
  vmeas_t vc2 [3][NC];
  lvl_t   phase_level [3];
  clvl_t  cell_level [3][NC];
  pair_t  cell_pair [3][NC];
  logic [7:0] gates [3][NC];
  duty3_t duty;
  region_e region;
  logic period_start, desc;
  logic [2:0] step_up, step_dn;

  svpwm_cmc_top dut (
    .clk, .rst_n, .v_ref, .m_asc, .m_desc, .disc_mode, .dir_sel, .car_inc, .bal_en,
    .i_pos, .i_neg, .vc1, .vc2, .phase_level, .cell_level, .cell_pair, .gates,
    .duty, .region, .period_start, .desc, .step_up, .step_dn);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_asc = 0, n_desc = 0, n_disc = 0, n_mpos = 0, n_mclamp = 0, n_cell [NC], n_catch = 0;
  int n_pair [4], n_baloff = 0;

  initial begin
    repeat (3 * PPC * TS + 50 * TS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] arm(int s);
    case (s)
      2: return 4'b0011;
      1: return 4'b0110;
      default: return 4'b1100;
    endcase
  endfunction

  // ---- per-period check of the phase levels ------------------------------
  logic ps_d = 0;
  bit   have_win = 0;
  int   win_len, hi_cnt [3], bad [3], w_exp [3], hi_exp [3];

  always @(negedge clk) if (rst_n) begin
    ps_d <= period_start;
    if (ps_d) begin
      if (have_win) begin
        checks++;
        if (win_len != TS) begin failures++; $display("FAIL period length %0d", win_len); end
        for (int x = 0; x < 3; x++) begin
          checks++;
          if (bad[x] != 0 || hi_cnt[x] != hi_exp[x]) begin
            failures++;
            if (failures < 10)
              $display("FAIL phase %0d W=%0d hi=%0d exp %0d bad=%0d", x, w_exp[x], hi_cnt[x], hi_exp[x], bad[x]);
          end
        end
      end
      // expectation for the new period from the reference model
      begin
        int s[3]; int d[3]; int rg; int mreq, mu, smax;
        bottom(int'(v_ref.a), int'(v_ref.b), int'(v_ref.c), NLEV, s);
        duties(int'(v_ref.a), int'(v_ref.b), int'(v_ref.c), disc_mode, d, rg);
        smax = imax3(s[0], s[1], s[2]);
        mreq = desc ? int'(m_desc) : int'(m_asc);
        mu = mclamp(mreq, smax, NLEV);
        if (mu > 0) n_mpos++;
        if (mu < mreq) n_mclamp++;
        if (desc) n_desc++; else n_asc++;
        if (disc_mode) n_disc++;
        if (!bal_en) n_baloff++;
        for (int x = 0; x < 3; x++) begin
          w_exp[x] = s[x] + mu;
          // clocks with ramp 32*j (j = 0..TS-1) at W+1
          hi_exp[x] = 0;
          for (int j = 0; j < TS; j++)
            if (desc ? (32 * j < d[x]) : (32 * j >= 8192 - d[x])) hi_exp[x]++;
          if (w_exp[x] >= NLEV - 1) hi_exp[x] = 0;
          hi_cnt[x] = 0; bad[x] = 0;
        end
        win_len = 0;
        have_win = 1;
      end
    end
    if (have_win) begin
      win_len++;
      for (int x = 0; x < 3; x++) begin
        if (int'(phase_level[x]) == w_exp[x] + 1) hi_cnt[x]++;
        else if (int'(phase_level[x]) != w_exp[x]) bad[x]++;
      end
    end
  end

  // ---- per-clock checks of the cell allocation and the pairs -------------
  int   steady [3] = '{default: 0};
  clvl_t cl_d [3][NC] = '{default: 0};
  int   cl_steady [3][NC] = '{default: 0};

  lvl_t pl_d [3] = '{default: 0};
  always @(negedge clk) if (rst_n) begin
    for (int x = 0; x < 3; x++) begin
      int sum; sum = 0;
      if (phase_level[x] != pl_d[x]) steady[x] = 0; else steady[x]++;
      pl_d[x] = phase_level[x];
      for (int k = 0; k < NC; k++) begin
        if (cell_level[x][k] != cl_d[x][k]) begin
          cl_steady[x][k] = 0;
          if ((step_up[x] || step_dn[x])) n_cell[k]++;
        end else cl_steady[x][k]++;
        cl_d[x][k] = cell_level[x][k];
      end
      for (int k = 0; k < NC; k++) sum += int'(cell_level[x][k]);
      if (steady[x] >= 2 * NLEV) begin
        checks++;
        if (sum != int'(phase_level[x]) - 2 * NC) begin
          failures++; $display("FAIL phase %0d cells sum %0d level %0d", x, sum, phase_level[x]);
        end
      end
      if (sum != int'(phase_level[x]) - 2 * NC && (step_up[x] || step_dn[x]) &&
          (sum - (int'(phase_level[x]) - 2 * NC) > 1 || (int'(phase_level[x]) - 2 * NC) - sum > 1))
        n_catch++;
      for (int k = 0; k < NC; k++) begin
        if (cl_steady[x][k] >= 2) begin
          checks++;
          if (int'(cell_pair[x][k].s1) - int'(cell_pair[x][k].s2) != int'(cell_level[x][k]) ||
              gates[x][k] != {arm(int'(cell_pair[x][k].s2)), arm(int'(cell_pair[x][k].s1))}) begin
            failures++; if (failures < 5) $display("FAIL cell %0d/%0d pair/gates lvl=%0d pair={%0d,%0d} gates=%b st=%0d t=%0t", x, k, cell_level[x][k], cell_pair[x][k].s1, cell_pair[x][k].s2, gates[x][k], cl_steady[x][k], $time);
          end
        end
        case ({cell_pair[x][k].s1, cell_pair[x][k].s2})
          4'b10_01: n_pair[0]++;
          4'b01_00: n_pair[1]++;
          4'b01_10: n_pair[2]++;
          4'b00_01: n_pair[3]++;
          default: ;
        endcase
      end
    end
  end

  // ---- stimulus -----------------------------------------------------------
  task automatic set_ref(real amp, real th);
    real ctr; ctr = real'(NLEV - 1) / 2.0;
    v_ref.a = vfix_t'($rtoi((ctr + amp * $sin(th)) * 4096.0));
    v_ref.b = vfix_t'($rtoi((ctr + amp * $sin(th - 2.0 * PI / 3.0)) * 4096.0));
    v_ref.c = vfix_t'($rtoi((ctr + amp * $sin(th + 2.0 * PI / 3.0)) * 4096.0));
    for (int x = 0; x < 3; x++) begin
      real i; i = $sin(th - 0.5 - real'(x) * 2.0 * PI / 3.0);
      i_pos[x] = (i > 0.05);
      i_neg[x] = (i < -0.05);
      for (int k = 0; k < NC; k++) begin
        vc1[x][k] = vmeas_t'($urandom_range(490, 510));
        vc2[x][k] = vmeas_t'($urandom_range(490, 510));
      end
    end
  endtask

  initial begin
    real amp;
    for (int x = 0; x < 3; x++) for (int k = 0; k < NC; k++) begin vc1[x][k] = 500; vc2[x][k] = 500; end
    for (int k = 0; k < NC; k++) n_cell[k] = 0;
    set_ref(0.0, 0.0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3; cyc++) begin
      // full-scale line voltage is NLEV-1 levels: phase amplitude = M*(n-1)/sqrt(3)
      amp = ((cyc == 0) ? 0.5 : 0.85) * real'(NLEV - 1) / $sqrt(3.0);
      disc_mode = (cyc == 1);
      if (cyc == 1) m_asc = 2;
      if (cyc == 2) begin dir_sel = DIR_ASC; bal_en = 0; end
      for (int p = 0; p < PPC; p++) begin
        @(posedge period_start);
        repeat (TS / 2) @(negedge clk);
        set_ref(amp, 2.0 * PI * (real'(p) + 0.37) / real'(PPC));
      end
    end
    @(posedge period_start);
    @(posedge clk);
    // mechanisms
    begin
      int cnt [13];
      string nm [13];
      cnt = '{n_asc, n_desc, n_disc, n_mpos, n_mclamp, n_cell[0], n_cell[1], n_catch,
              n_pair[0], n_pair[1], n_pair[2], n_pair[3], n_baloff};
      nm = '{"ascending periods", "descending periods", "discontinuous periods", "m>0 periods",
             "m clamped", "cell 1 steps", "cell 2 steps", "multi-level catch-up",
             "pair {2,1}", "pair {1,0}", "pair {1,2}", "pair {0,1}", "balancing off"};
      for (int i = 0; i < 13; i++) begin
        $display("  %-22s %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism never seen: %s", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
