// tb_svpwm_core: end-to-end check of the four-stage modulator pipeline.
// Random references and m factors are fed every clock; each result is
// compared with the reference model (bottom vertex + clamped m, duty cycles
// from remainder phases) for the sample entered four clocks earlier.  The
// latency is measured with a single isolated in_valid pulse: out_valid must
// follow exactly four clocks later.  Also replays the five-level example
// whose redundant vector with m=1 is (3,3,1) with a nine-level core, where
// m=1 is allowed, and m=8 is clamped.  Where two phases tie the region is
// ambiguous and only the duty cycles are compared.
module tb_svpwm_core;
  import svpwm_pkg::*;
  import svpwm_ref_pkg::*;

  localparam int NLEV = 9;
  localparam int LAT  = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, disc_mode = 0, out_valid;
  vabc_t v_abc = '0;
  mfac_t m_req = '0;
  lvl3_t w_base;
  duty3_t duty;
  region_e region;
  int checks = 0, failures = 0;

  svpwm_core #(.N_LEVELS(NLEV)) dut (.clk, .rst_n, .in_valid, .v_abc, .m_req, .disc_mode,
                                     .out_valid, .w_base, .duty, .region);

  always #5 clk = ~clk;

  // expected results, indexed by the clock on which the sample was entered
  typedef struct { int w[3]; int d[3]; int rg; } exp_t;
  exp_t expq [$];

  task automatic push(int va, vb, vc, int m, bit disc);
    int s[3]; int d[3]; int rg; int mu; int w[3];
    bottom(va, vb, vc, NLEV, s);
    mu = mclamp(m, imax3(s[0], s[1], s[2]), NLEV);
    duties(va, vb, vc, disc, d, rg);
    w = '{s[0] + mu, s[1] + mu, s[2] + mu};
    expq.push_back('{w: w, d: d, rg: rg});
    v_abc = '{vfix_t'(va), vfix_t'(vb), vfix_t'(vc)};
    m_req = mfac_t'(m);
    disc_mode = disc;
  endtask

  task automatic check_out();
    int w[3]; int d[3]; int rg; exp_t e;
    e = expq.pop_front();
    w = e.w; d = e.d; rg = e.rg;
    checks++;
    if (!out_valid || w_base != '{lvl_t'(w[0]), lvl_t'(w[1]), lvl_t'(w[2])} ||
        duty != '{duty_t'(d[0]), duty_t'(d[1]), duty_t'(d[2])} ||
        (int'(region) != rg && d[0] != d[1] && d[1] != d[2] && d[0] != d[2])) begin
      failures++;
      if (failures < 10)
        $display("FAIL got W=(%0d,%0d,%0d) D=(%0d,%0d,%0d) reg %0d exp W=(%0d,%0d,%0d) D=(%0d,%0d,%0d) reg %0d",
                 w_base.a, w_base.b, w_base.c, duty.a, duty.b, duty.c, region,
                 w[0], w[1], w[2], d[0], d[1], d[2], rg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency of one isolated sample
    push(2 * ONE + 1500, 2 * ONE + 1000, 300, 1, 1'b0);
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != LAT) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (w_base != '{lvl_t'(3), lvl_t'(3), lvl_t'(1)}) failures++;
    check_out();
    @(negedge clk);
    checks++;
    if (out_valid) failures++;
    // m beyond its range
    push(2 * ONE + 1500, 2 * ONE + 1000, 300, 8, 1'b0);
    in_valid = 1;
    repeat (LAT) @(negedge clk);
    in_valid = 0;
    checks++;
    if (w_base != '{lvl_t'(2 + 5), lvl_t'(2 + 5), lvl_t'(0 + 5)}) begin
      failures++; $display("FAIL m clamp %0d %0d %0d", w_base.a, w_base.b, w_base.c);
    end
    expq.delete();
    repeat (3) @(negedge clk);
    // streaming random samples
    in_valid = 1;
    for (int t = 0; t < 5000; t++) begin
      int va, vb, vc;
      bit disc;
      va = $urandom_range(0, 7 * ONE);
      vb = $urandom_range(0, 7 * ONE);
      vc = $urandom_range(0, 7 * ONE);
      disc = $urandom_range(0, 1);
      // keep distinct remainders for the discontinuous table
      if (disc && (((va - vb) % ONE) == 0 || ((vb - vc) % ONE) == 0 || ((va - vc) % ONE) == 0)) disc = 0;
      push(va, vb, vc, $urandom_range(0, 6), disc);
      @(negedge clk);
      if (t >= LAT - 1) check_out();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
