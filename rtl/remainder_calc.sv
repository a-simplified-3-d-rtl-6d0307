// remainder_calc: Part 2 of the modulator.  Maps the bottom horizontal vector
// onto the 3-D axes, (Sm, Sn, Sp) = (Sa-Sb, Sb-Sc, Sc-Sa), and moves the
// origin of the reference to that vertex (eq. 5):
//   Vm1 = Vm - Sm,  Vn1 = Vn - Sn,  Vp1 = Vp - Sp.
// The remainder vector lies inside the unit two-level hexagon around the
// vertex, so the rest of the modulation is that of a two-level converter.
// Combinational; formats from svpwm_pkg.
module remainder_calc
  import svpwm_pkg::*;
(
  input  vmnp_t v_mnp,   // Vm, Vn, Vp
  input  lvl3_t s_bot,   // Sa, Sb, Sc
  output vmnp_t v_rem    // Vm1, Vn1, Vp1
);

  // a level difference as a fixed-point voltage
  function automatic vfix_t lvl_diff(input lvl_t x, input lvl_t y);
    logic signed [LVL_W:0] d;
    d = $signed({1'b0, x}) - $signed({1'b0, y});
    return vfix_t'(d) <<< FRAC_BITS;
  endfunction

  always_comb begin
    v_rem.m = v_mnp.m - lvl_diff(s_bot.a, s_bot.b);
    v_rem.n = v_mnp.n - lvl_diff(s_bot.b, s_bot.c);
    v_rem.p = v_mnp.p - lvl_diff(s_bot.c, s_bot.a);
  end

endmodule
