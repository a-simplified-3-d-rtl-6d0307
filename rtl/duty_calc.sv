// duty_calc: Part 3 of the modulator.  Turns the remainder vector (Vm1, Vn1,
// Vp1) into the three phase duty cycles Da, Db, Dc: the fraction of the
// switching period during which phase x sits at level Wx+1 rather than Wx.
// The region of the two-level hexagon follows from the signs of two of the
// remainders (Table I), and each duty cycle is a sum of remainders:
//
//  continuous mode, d01 = d0/2 (Table II)
//   Vm1,Vn1 same sign: Da=(1-Vp1)/2      Db=(1-Vm1+Vn1)/2  Dc=(1+Vp1)/2
//   Vm1,Vp1 same sign: Da=(1+Vm1-Vp1)/2  Db=(1-Vm1-Vp1)/2  Dc=(1-Vn1)/2
//   Vn1,Vp1 same sign: Da=(1-Vn1-Vp1)/2  Db=(1+Vn1+Vp1)/2  Dc=(1-Vn1+Vp1)/2
//  discontinuous mode, d01 = 0 (Table III)
//   Vm1(+)Vn1(+): 1, 1-Vm1, 1+Vp1      Vm1(-)Vn1(-): 0, -Vm1, Vp1
//   Vm1(+)Vp1(+): 1-Vp1, 1+Vn1, 1      Vm1(-)Vp1(-): -Vp1, Vn1, 0
//   Vn1(+)Vp1(+): 1+Vm1, 1, 1-Vn1      Vn1(-)Vp1(-): Vm1, 0, -Vn1
//
// No multiplier or divider: the halving of Table II is free because a duty
// cycle carries one more fraction bit than a voltage.  Design choices: a zero
// remainder counts as (+) (both candidate rows agree on the boundary), and
// results are clamped to 0..1.  Combinational.
module duty_calc
  import svpwm_pkg::*;
(
  input  vmnp_t   v_rem,      // Vm1, Vn1, Vp1
  input  logic    disc_mode,  // 0: continuous (Table II), 1: discontinuous (Table III)
  output duty3_t  duty,       // Da, Db, Dc
  output region_e region      // region 1..6 (Table I)
);

  localparam int W = REF_W + 2;
  typedef logic signed [W-1:0] acc_t;

  // 1.0 in the voltage format
  localparam acc_t ONE = acc_t'(1) <<< FRAC_BITS;

  // a value in the voltage format times two, read as a duty cycle (one more
  // fraction bit), clamped to 0..1
  function automatic duty_t to_duty(input acc_t twice);
    if (twice < 0)                              return '0;
    else if (twice > acc_t'(DUTY_ONE))          return DUTY_ONE;
    else                                        return duty_t'(twice);
  endfunction

  acc_t m1, n1, p1;
  acc_t ta, tb, tc;           // 2*Dx in the voltage format
  logic pm, pn, pp;           // remainder >= 0

  always_comb begin
    m1 = acc_t'(v_rem.m);
    n1 = acc_t'(v_rem.n);
    p1 = acc_t'(v_rem.p);
    pm = (m1 >= 0);
    pn = (n1 >= 0);
    pp = (p1 >= 0);

    if (pm == pn) begin
      region = pm ? REG_1 : REG_4;
      if (!disc_mode) begin
        ta = ONE - p1;  tb = ONE - m1 + n1;  tc = ONE + p1;
      end else if (pm) begin
        ta = 2 * ONE;  tb = 2 * (ONE - m1);  tc = 2 * (ONE + p1);
      end else begin
        ta = '0;  tb = -2 * m1;  tc = 2 * p1;
      end
    end else if (pm == pp) begin
      region = pm ? REG_5 : REG_2;
      if (!disc_mode) begin
        ta = ONE + m1 - p1;  tb = ONE - m1 - p1;  tc = ONE - n1;
      end else if (pm) begin
        ta = 2 * (ONE - p1);  tb = 2 * (ONE + n1);  tc = 2 * ONE;
      end else begin
        ta = -2 * p1;  tb = 2 * n1;  tc = '0;
      end
    end else begin
      // here pn == pp
      region = pn ? REG_3 : REG_6;
      if (!disc_mode) begin
        ta = ONE - n1 - p1;  tb = ONE + n1 + p1;  tc = ONE - n1 + p1;
      end else if (pn) begin
        ta = 2 * (ONE + m1);  tb = 2 * ONE;  tc = 2 * (ONE - n1);
      end else begin
        ta = 2 * m1;  tb = '0;  tc = -2 * n1;
      end
    end

    duty.a = to_duty(ta);
    duty.b = to_duty(tb);
    duty.c = to_duty(tc);
  end

endmodule
