// tb_remainder_calc: checks that remainder_calc moves the reference origin
// to the detected vertex: with the bottom vertex of a random reference the
// remainders must equal the differences of the fractional phase voltages
// and lie strictly between -1 and 1; arbitrary vertices are checked with
// the plain formula Vx1 = Vx - Sx.
module tb_remainder_calc;
  import svpwm_pkg::*;
  import svpwm_ref_pkg::*;

  vmnp_t v_mnp, v_rem;
  lvl3_t s_bot;
  int checks = 0, failures = 0;

  remainder_calc dut (.v_mnp, .s_bot, .v_rem);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) begin
      int va, vb, vc, s[3], r[3], mn;
      va = $urandom_range(0, 8 * ONE - 1);
      vb = $urandom_range(0, 8 * ONE - 1);
      vc = $urandom_range(0, 8 * ONE - 1);
      bottom(va, vb, vc, 9, s);
      mn = imin3(va, vb, vc);
      r = '{(va - mn) % ONE, (vb - mn) % ONE, (vc - mn) % ONE};
      v_mnp = '{m: vfix_t'(va - vb), n: vfix_t'(vb - vc), p: vfix_t'(vc - va)};
      s_bot = '{lvl_t'(s[0]), lvl_t'(s[1]), lvl_t'(s[2])};
      #1;
      checks++;
      if (int'(v_rem.m) != r[0] - r[1] || int'(v_rem.n) != r[1] - r[2] || int'(v_rem.p) != r[2] - r[0]) begin
        failures++;
        $display("FAIL v=(%0d,%0d,%0d) rem=(%0d,%0d,%0d)", va, vb, vc, v_rem.m, v_rem.n, v_rem.p);
      end
      checks++;
      if (int'(v_rem.m) <= -ONE || int'(v_rem.m) >= ONE || int'(v_rem.n) <= -ONE || int'(v_rem.n) >= ONE)
        failures++;
      // arbitrary vertex
      s = '{$urandom_range(0, 8), $urandom_range(0, 8), $urandom_range(0, 8)};
      s_bot = '{lvl_t'(s[0]), lvl_t'(s[1]), lvl_t'(s[2])};
      #1;
      checks++;
      if (int'(v_rem.m) != (va - vb) - (s[0] - s[1]) * ONE || int'(v_rem.n) != (vb - vc) - (s[1] - s[2]) * ONE ||
          int'(v_rem.p) != (vc - va) - (s[2] - s[0]) * ONE)
        failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
