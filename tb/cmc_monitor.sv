// cmc_monitor: testbench checker for one svpwm_cmc_top instance with NC
// cells per phase and a TS-clock switching period (ramp step 32 duty LSBs
// per clock, i.e. car_inc = 2^24/256).  For every switching period and
// phase it computes, with the reference model, the levels W and W+1 and the
// number of clocks at W+1, and compares them with the phase levels seen.
// Every clock it checks that the cell levels of a phase add up to the phase
// level once that level has been steady.  It also records which phase
// levels occurred.  References must only change in the middle of a period.
module cmc_monitor
  import svpwm_pkg::*;
  import svpwm_ref_pkg::*;
#(
  parameter int NC = 2,
  parameter int TS = 256
)(
  input  logic    clk,
  input  logic    rst_n,
  input  vabc_t   v_ref,
  input  mfac_t   m_asc,
  input  mfac_t   m_desc,
  input  logic    disc_mode,
  input  logic    period_start,
  input  logic    desc,
  input  lvl_t    phase_level [3],
  input  clvl_t   cell_level [3][NC],
  output int      checks,
  output int      failures,
  output int      periods,
  output int      levels_seen
);

  localparam int NLEV = 4 * NC + 1;

  logic ps_d = 0;
  bit   have_win = 0;
  int   win_len = 0, hi_cnt [3], bad [3], w_exp [3], hi_exp [3];
  int   steady [3] = '{default: 0};
  lvl_t pl_d [3] = '{default: 0};
  bit   seen [NLEV];

  initial begin
    checks = 0; failures = 0; periods = 0; levels_seen = 0;
    for (int l = 0; l < NLEV; l++) seen[l] = 0;
  end

  always @(negedge clk) if (rst_n) begin
    ps_d <= period_start;
    for (int x = 0; x < 3; x++) begin
      int sum; sum = 0;
      if (phase_level[x] != pl_d[x]) steady[x] = 0; else steady[x]++;
      pl_d[x] = phase_level[x];
      for (int k = 0; k < NC; k++) sum += int'(cell_level[x][k]);
      if (steady[x] >= 2 * NLEV) begin
        checks++;
        if (sum != int'(phase_level[x]) - 2 * NC) begin
          failures++; $display("FAIL NC=%0d phase %0d cell sum %0d level %0d", NC, x, sum, phase_level[x]);
        end
      end
      checks++;
      if (int'(phase_level[x]) >= NLEV) failures++;
      else if (!seen[phase_level[x]]) begin seen[phase_level[x]] = 1; levels_seen++; end
    end
    if (ps_d) begin
      if (have_win) begin
        periods++;
        checks++;
        if (win_len != TS) failures++;
        for (int x = 0; x < 3; x++) begin
          checks++;
          if (bad[x] != 0 || hi_cnt[x] != hi_exp[x]) begin
            failures++;
            $display("FAIL NC=%0d phase %0d W=%0d hi=%0d exp %0d bad=%0d", NC, x, w_exp[x], hi_cnt[x], hi_exp[x], bad[x]);
          end
        end
      end
      begin
        int s[3]; int d[3]; int rg; int mu;
        bottom(int'(v_ref.a), int'(v_ref.b), int'(v_ref.c), NLEV, s);
        duties(int'(v_ref.a), int'(v_ref.b), int'(v_ref.c), disc_mode, d, rg);
        mu = mclamp(desc ? int'(m_desc) : int'(m_asc), imax3(s[0], s[1], s[2]), NLEV);
        for (int x = 0; x < 3; x++) begin
          w_exp[x] = s[x] + mu;
          hi_exp[x] = 0;
          for (int j = 0; j < TS; j++)
            if (desc ? (32 * j < d[x]) : (32 * j >= 8192 - d[x])) hi_exp[x]++;
          if (w_exp[x] >= NLEV - 1) hi_exp[x] = 0;
          hi_cnt[x] = 0; bad[x] = 0;
        end
      end
      win_len = 0;
      have_win = 1;
    end
    if (have_win) begin
      win_len++;
      for (int x = 0; x < 3; x++) begin
        if (int'(phase_level[x]) == w_exp[x] + 1) hi_cnt[x]++;
        else if (int'(phase_level[x]) != w_exp[x]) bad[x]++;
      end
    end
  end

endmodule
