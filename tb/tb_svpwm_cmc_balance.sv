// tb_svpwm_cmc_balance: closed-loop test of the voltage balancing with the
// default two-cell top and a behavioural model of the power stage.
// Model, per cell and clock: with switching pair {S1,S2} and phase current
// i, capacitor C1 carries the current when exactly one arm is at P and C2
// when exactly one arm is at P or O:
//    dV_C1 = K * i * ([S1=2] - [S2=2]),  dV_C2 = K * i * ([S1>=1] - [S2>=1])
// (positive current charges a cell whose output level is positive, the
// convention of the balancing rules).  A single dc source per phase feeds
// the series stack of all capacitors of that phase and holds their total at
// its nominal value; it does not share it out between them.  The
// capacitors start unbalanced inside each cell and between the cells.  The
// converter runs 20 fundamental cycles at modulation index 0.85, with
// alternating periods and balancing on; the largest inner-cell and
// mutual-cell voltage differences must fall below a quarter of their
// initial values.  The same start is then
// run with balancing off and the differences are reported for comparison;
// with balancing off they must stay larger than with it on.
module tb_svpwm_cmc_balance;
  import svpwm_pkg::*;

  localparam int NC   = 2;
  localparam int NLEV = 4 * NC + 1;
  localparam int TS   = 256;
  localparam int PPC  = 32;
  localparam int CYC  = 20;
  localparam real PI  = 3.14159265358979;
  localparam real K   = 0.004;      // capacitor voltage step per clock at unit current
  localparam real G   = 0.02;       // source regulation gain per clock
  localparam real VN  = 500.0;      // nominal capacitor voltage

  logic clk = 0, rst_n = 0;
  vabc_t v_ref = '0;
  logic bal_en = 1;
  logic [2:0] i_pos = 0, i_neg = 0;
  vmeas_t vc1 [3][NC];
  vmeas_t vc2 [3][NC];
  lvl_t   phase_level [3];
  clvl_t  cell_level [3][NC];
  pair_t  cell_pair [3][NC];
  logic [7:0] gates [3][NC];
  duty3_t duty; region_e region; logic period_start, desc; logic [2:0] step_up, step_dn;

  svpwm_cmc_top dut (
    .clk, .rst_n, .v_ref, .m_asc(4'd0), .m_desc(4'd0), .disc_mode(1'b0), .dir_sel(DIR_ALT),
    .car_inc(24'(2 ** 24 / TS)), .bal_en, .i_pos, .i_neg, .vc1, .vc2, .phase_level, .cell_level,
    .cell_pair, .gates, .duty, .region, .period_start, .desc, .step_up, .step_dn);

  always #5 clk = ~clk;

  real cv1 [3][NC], cv2 [3][NC];
  real cur [3];
  bit  run = 0;
  int  checks = 0, failures = 0;

  // power-stage model
  always @(negedge clk) if (run) begin
    for (int x = 0; x < 3; x++) begin
      real tot;
      tot = 0.0;
      for (int k = 0; k < NC; k++) begin
        int s1, s2;
        s1 = int'(cell_pair[x][k].s1); s2 = int'(cell_pair[x][k].s2);
        cv1[x][k] += K * cur[x] * (real'(s1 == 2) - real'(s2 == 2));
        cv2[x][k] += K * cur[x] * (real'(s1 >= 1) - real'(s2 >= 1));
        tot += cv1[x][k] + cv2[x][k];
      end
      for (int k = 0; k < NC; k++) begin
        cv1[x][k] += G * (2.0 * NC * VN - tot) / (2.0 * NC);
        cv2[x][k] += G * (2.0 * NC * VN - tot) / (2.0 * NC);
        vc1[x][k] = vmeas_t'($rtoi(cv1[x][k] + 0.5));
        vc2[x][k] = vmeas_t'($rtoi(cv2[x][k] + 0.5));
      end
    end
  end

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic spreads(output real inner, output real mutual);
    inner = 0.0; mutual = 0.0;
    for (int x = 0; x < 3; x++) begin
      for (int k = 0; k < NC; k++)
        if (fabs(cv1[x][k] - cv2[x][k]) > inner) inner = fabs(cv1[x][k] - cv2[x][k]);
      if (fabs(cv1[x][0] + cv2[x][0] - cv1[x][1] - cv2[x][1]) > mutual)
        mutual = fabs(cv1[x][0] + cv2[x][0] - cv1[x][1] - cv2[x][1]);
    end
  endtask

  task automatic start_state();
    for (int x = 0; x < 3; x++) begin
      cv1[x][0] = 470.0; cv2[x][0] = 550.0;     // cell 1: 1020, C1 low
      cv1[x][1] = 505.0; cv2[x][1] = 475.0;     // cell 2:  980, C1 high
      for (int k = 0; k < NC; k++) begin
        vc1[x][k] = vmeas_t'($rtoi(cv1[x][k])); vc2[x][k] = vmeas_t'($rtoi(cv2[x][k]));
      end
    end
  endtask

  task automatic run_cycles(output real inner, output real mutual);
    real amp; amp = 0.85 * real'(NLEV - 1) / $sqrt(3.0);
    run = 1;
    for (int p = 0; p < CYC * PPC; p++) begin
      real th, ctr;
      @(posedge period_start);
      repeat (TS / 2) @(negedge clk);
      th = 2.0 * PI * (real'(p) + 0.37) / real'(PPC);
      ctr = real'(NLEV - 1) / 2.0;
      v_ref.a = vfix_t'($rtoi((ctr + amp * $sin(th)) * 4096.0));
      v_ref.b = vfix_t'($rtoi((ctr + amp * $sin(th - 2.0 * PI / 3.0)) * 4096.0));
      v_ref.c = vfix_t'($rtoi((ctr + amp * $sin(th + 2.0 * PI / 3.0)) * 4096.0));
      for (int x = 0; x < 3; x++) begin
        cur[x] = $sin(th - 0.5 - real'(x) * 2.0 * PI / 3.0);
        i_pos[x] = (cur[x] > 0.02);
        i_neg[x] = (cur[x] < -0.02);
      end
    end
    run = 0;
    spreads(inner, mutual);
  endtask

  initial begin
    repeat (2 * (CYC + 2) * PPC * TS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real in0, mu0, in1, mu1, in2, mu2;
    for (int x = 0; x < 3; x++) cur[x] = 0.0;
    start_state();
    spreads(in0, mu0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    bal_en = 1;
    run_cycles(in1, mu1);
    $display("balancing on : inner %0.1f -> %0.1f, mutual %0.1f -> %0.1f", in0, in1, mu0, mu1);
    start_state();
    bal_en = 0;
    run_cycles(in2, mu2);
    $display("balancing off: inner %0.1f -> %0.1f, mutual %0.1f -> %0.1f", in0, in2, mu0, mu2);
    checks++; if (in1 > 0.25 * in0) failures++;
    checks++; if (mu1 > 0.25 * mu0) failures++;
    checks++; if (in2 <= in1) failures++;
    checks++; if (mu2 <= mu1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
