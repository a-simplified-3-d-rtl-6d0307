// svpwm_core_checker: drives one modulator core of NLEV levels with a stream
// of random reference vectors spanning the whole level range, random m
// factors up to the largest the m input holds (so that the top clamp is
// exercised) and both duty modes, and compares every result with the
// reference model four clocks after the sample entered.  Used by
// tb_svpwm_core_levels to run several core sizes side by side; it reports
// its counts on output ports and raises done when its stream has ended.
module svpwm_core_checker #(
  parameter int NLEV    = 15,
  parameter int SAMPLES = 4000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   clamped,
  output logic done
);
  import svpwm_pkg::*;
  import svpwm_ref_pkg::*;

  localparam int LAT = 4;

  logic in_valid = 0, disc_mode = 0, out_valid;
  vabc_t v_abc = '0;
  mfac_t m_req = '0;
  lvl3_t w_base;
  duty3_t duty;
  region_e region;

  svpwm_core #(.N_LEVELS(NLEV)) dut (.clk, .rst_n, .in_valid, .v_abc, .m_req, .disc_mode,
                                     .out_valid, .w_base, .duty, .region);

  typedef struct { int w[3]; int d[3]; } exp_t;
  exp_t expq [$];

  initial begin
    checks = 0; failures = 0; clamped = 0; done = 0;
    @(posedge rst_n);
    @(negedge clk);
    in_valid = 1;
    for (int t = 0; t < SAMPLES; t++) begin
      int va, vb, vc, m, mu;
      int s[3]; int d[3]; int rg;
      bit disc;
      va = $urandom_range(0, (NLEV - 1) * ONE);
      vb = $urandom_range(0, (NLEV - 1) * ONE);
      vc = $urandom_range(0, (NLEV - 1) * ONE);
      disc = 1'($urandom_range(0, 1));
      if (disc && (((va - vb) % ONE) == 0 || ((vb - vc) % ONE) == 0 || ((va - vc) % ONE) == 0)) disc = 0;
      m = $urandom_range(0, 15);
      bottom(va, vb, vc, NLEV, s);
      mu = mclamp(m, imax3(s[0], s[1], s[2]), NLEV);
      if (mu != m) clamped++;
      duties(va, vb, vc, disc, d, rg);
      expq.push_back('{w: '{s[0] + mu, s[1] + mu, s[2] + mu}, d: d});
      v_abc = '{vfix_t'(va), vfix_t'(vb), vfix_t'(vc)};
      m_req = mfac_t'(m);
      disc_mode = disc;
      @(negedge clk);
      if (t >= LAT - 1) begin
        exp_t e;
        e = expq.pop_front();
        checks++;
        if (!out_valid || w_base != '{lvl_t'(e.w[0]), lvl_t'(e.w[1]), lvl_t'(e.w[2])} ||
            duty != '{duty_t'(e.d[0]), duty_t'(e.d[1]), duty_t'(e.d[2])}) begin
          failures++;
          if (failures < 5)
            $display("FAIL n=%0d got W=(%0d,%0d,%0d) D=(%0d,%0d,%0d) exp W=(%0d,%0d,%0d) D=(%0d,%0d,%0d)",
                     NLEV, w_base.a, w_base.b, w_base.c, duty.a, duty.b, duty.c,
                     e.w[0], e.w[1], e.w[2], e.d[0], e.d[1], e.d[2]);
        end
      end
    end
    in_valid = 0;
    done = 1;
  end
endmodule
