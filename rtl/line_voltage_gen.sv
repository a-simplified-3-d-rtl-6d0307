// line_voltage_gen: maps the three normalised phase references onto the
// three axes of the 3-D space-vector coordinate system,
//   Vm = Va - Vb,  Vn = Vb - Vc,  Vp = Vc - Va,
// which is the first box of the modulator flow.  Only differences of phase
// voltages matter to the modulator, so the common mode of the references is
// removed here.  Purely combinational; the register behind it is in
// svpwm_core.  Inputs and outputs use the vfix_t format of svpwm_pkg; the
// references must stay within +-(2^(REF_W-FRAC_BITS-2)) levels so that the
// differences do not overflow.
module line_voltage_gen
  import svpwm_pkg::*;
(
  input  vabc_t v_abc,   // Va, Vb, Vc (levels)
  output vmnp_t v_mnp    // Vm, Vn, Vp (levels)
);

  always_comb begin
    v_mnp.m = v_abc.a - v_abc.b;
    v_mnp.n = v_abc.b - v_abc.c;
    v_mnp.p = v_abc.c - v_abc.a;
  end

endmodule
