// vertex_detect: Part 1 of the modulator.  Finds the bottom horizontal space
// vector (Sa, Sb, Sc), the vertex of the modulation triangle nearest the
// origin, from sign tests and integer parts of the 3-D reference (eq. 3):
//   Area 1 (Vn >= 0, Vp <= 0): (int(Vm+Vn), int(Vn), 0)
//   Area 2 (Vm <= 0, Vp >= 0): (0, int(Vn+Vp), int(Vp))
//   Area 3 (Vm >= 0, Vn <= 0): (int(Vm), 0, int(Vm+Vp))
// Within each area the arguments of int() are never negative, so the integer
// part is the value with its fraction bits dropped.  It then produces the
// redundant vector (Sa1, Sb1, Sc1) = (Sa, Sb, Sc) + m(1,1,1) of eq. (4).
//
// Design choices: boundary cases are resolved in the order Area 1, 2, 3 (all
// give the same vertex there); m is clamped to n-2-max(S) rather than the
// n-1-max(S) of eq. (4), because the switching period also uses level W+1 of
// every phase; integer parts beyond n-1 (reference outside the hexagon) are
// saturated at n-1.  Combinational.
module vertex_detect
  import svpwm_pkg::*;
#(
  parameter int N_LEVELS = 9           // output levels per phase, n
)(
  input  vmnp_t   v_mnp,               // Vm, Vn, Vp
  input  mfac_t   m_req,               // requested m factor
  output lvl3_t   s_bot,               // bottom vector Sa, Sb, Sc
  output lvl3_t   s_red,               // redundant vector Sa1, Sb1, Sc1
  output mfac_t   m_used,              // m after clamping
  output area_e   area                 // area used for the detection
);

  localparam int TOP = N_LEVELS - 1;

  // integer part of a non-negative fixed-point value, saturated at n-1
  function automatic lvl_t int_part(input logic signed [REF_W:0] x);
    logic signed [REF_W:0] q;
    q = x >>> FRAC_BITS;
    if (q < 0)                return '0;
    else if (q > (REF_W+1)'(TOP)) return lvl_t'(TOP);
    else                      return lvl_t'(q);
  endfunction

  logic signed [REF_W:0] vm, vn, vp;
  logic signed [LVL_W+1:0] room;       // n-2-max(S), may be negative
  lvl_t smax;

  always_comb begin
    vm = {v_mnp.m[REF_W-1], v_mnp.m};
    vn = {v_mnp.n[REF_W-1], v_mnp.n};
    vp = {v_mnp.p[REF_W-1], v_mnp.p};

    if (vn >= 0 && vp <= 0) begin
      area    = AREA_1;
      s_bot.a = int_part(vm + vn);
      s_bot.b = int_part(vn);
      s_bot.c = '0;
    end else if (vm <= 0 && vp >= 0) begin
      area    = AREA_2;
      s_bot.a = '0;
      s_bot.b = int_part(vn + vp);
      s_bot.c = int_part(vp);
    end else begin
      area    = AREA_3;
      s_bot.a = int_part(vm);
      s_bot.b = '0;
      s_bot.c = int_part(vm + vp);
    end

    smax = s_bot.a;
    if (s_bot.b > smax) smax = s_bot.b;
    if (s_bot.c > smax) smax = s_bot.c;

    room = (LVL_W+2)'(TOP - 1) - $signed({2'b00, smax});
    if (room <= 0)
      m_used = '0;
    else if ($signed({3'b000, m_req}) > room)
      m_used = mfac_t'(room);
    else
      m_used = m_req;

    s_red.a = s_bot.a + lvl_t'(m_used);
    s_red.b = s_bot.b + lvl_t'(m_used);
    s_red.c = s_bot.c + lvl_t'(m_used);
  end

endmodule
