// tb_duty_calc: checks the duty cycles and regions of duty_calc against the
// reference model (duty cycles from the remainder phase voltages), in the
// continuous and the discontinuous mode, plus the worked example of the
// method (Vm1=0.2, Vn1=-0.6, Vp1=0.6 -> Da=0.3, Db=0.1, Dc=0.8, region 5)
// and the rule that the three duty cycles reproduce the remainder vector:
// Da-Db = Vm1 and Db-Dc = Vn1 in both modes.
module tb_duty_calc;
  import svpwm_pkg::*;
  import svpwm_ref_pkg::*;

  vmnp_t   v_rem;
  logic    disc_mode;
  duty3_t  duty;
  region_e region;
  int checks = 0, failures = 0;

  duty_calc dut (.v_rem, .disc_mode, .duty, .region);

  function automatic bit near(int got, real want);
    real g; g = real'(got) / real'(2 * ONE);
    return (g - want < 0.001) && (want - g < 0.001);
  endfunction

  task automatic apply(int ra, rb, rc, bit disc);
    int d[3]; int reg_e;
    duties(ra, rb, rc, disc, d, reg_e);
    v_rem = '{m: vfix_t'(ra - rb), n: vfix_t'(rb - rc), p: vfix_t'(rc - ra)};
    disc_mode = disc;
    #1;
    checks++;
    if (int'(duty.a) != d[0] || int'(duty.b) != d[1] || int'(duty.c) != d[2] || int'(region) != reg_e) begin
      failures++;
      $display("FAIL r=(%0d,%0d,%0d) disc=%0d got (%0d,%0d,%0d) reg %0d exp (%0d,%0d,%0d) reg %0d",
               ra, rb, rc, disc, duty.a, duty.b, duty.c, region, d[0], d[1], d[2], reg_e);
    end
    checks++;
    if ((int'(duty.a) - int'(duty.b)) != 2 * (ra - rb) || (int'(duty.b) - int'(duty.c)) != 2 * (rb - rc))
      failures++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example, Table II second row, taken as given
    v_rem = '{m: vfix_t'(819), n: vfix_t'(-2458), p: vfix_t'(2458)};
    disc_mode = 1'b0;
    #1;
    checks++;
    if (!near(int'(duty.a), 0.3) || !near(int'(duty.b), 0.1) || !near(int'(duty.c), 0.8) || region != REG_5) begin
      failures++;
      $display("FAIL example: %0d %0d %0d reg %0d", duty.a, duty.b, duty.c, region);
    end
    // zero remainder: all duty cycles one half
    apply(0, 0, 0, 1'b0);
    repeat (3000) begin
      int ra, rb, rc;
      ra = $urandom_range(0, ONE - 1);
      rb = $urandom_range(0, ONE - 1);
      rc = $urandom_range(0, ONE - 1);
      apply(ra, rb, rc, 1'b0);
      // distinct remainders for the discontinuous mode (the table is
      // discontinuous where two phases are equal)
      if (ra != rb && rb != rc && ra != rc) apply(ra, rb, rc, 1'b1);
    end
    // every region of both modes
    apply(3000, 2000, 1000, 1'b1); apply(2000, 3000, 1000, 1'b1); apply(1000, 3000, 2000, 1'b1);
    apply(1000, 2000, 3000, 1'b1); apply(2000, 1000, 3000, 1'b1); apply(3000, 1000, 2000, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
