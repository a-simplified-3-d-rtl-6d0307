// svpwm_pkg: number formats and types shared by the 3-D NLM-based SVPWM
// modulator and the voltage-balancing logic of the 3LNPC cascaded converter.
//
// All voltages handled by the modulator are normalised so that one converter
// level equals 1.0.  They are signed fixed-point numbers of REF_W bits with
// FRAC_BITS fraction bits.  Duty cycles are unsigned, range 0..1, with one
// more fraction bit than the voltages so that the halving in the continuous
// duty table is exact.  Word lengths are this design's own choice: the method
// itself only needs additions, subtractions, sign tests and integer parts.
package svpwm_pkg;

  // ---- fixed-point formats ----------------------------------------------
  localparam int FRAC_BITS = 12;             // fraction bits of a voltage
  localparam int REF_W     = 18;             // voltage word, +-32 levels
  localparam int DUTY_FB   = FRAC_BITS + 1;  // fraction bits of a duty cycle
  localparam int DUTY_W    = DUTY_FB + 1;    // duty word, holds 0 .. 1.0
  localparam int LVL_W     = 5;              // phase level 0 .. 31
  localparam int M_W       = 4;              // m factor of eq. (4)
  localparam int VM_W      = 12;             // measured capacitor voltage

  localparam logic [DUTY_W-1:0] DUTY_ONE = DUTY_W'(1) << DUTY_FB;

  typedef logic signed [REF_W-1:0] vfix_t;   // normalised voltage
  typedef logic [DUTY_W-1:0]       duty_t;   // duty cycle, 1.0 = DUTY_ONE
  typedef logic [LVL_W-1:0]        lvl_t;    // phase level, 0 .. n-1
  typedef logic [M_W-1:0]          mfac_t;   // m factor
  typedef logic signed [2:0]       clvl_t;   // output level of one cell, -2 .. 2
  typedef logic [1:0]              arm_t;    // state of one 3-level arm, 0 .. 2
  typedef logic [VM_W-1:0]         vmeas_t;  // capacitor voltage measurement

  // phase quantities a, b, c
  typedef struct packed {
    vfix_t a;
    vfix_t b;
    vfix_t c;
  } vabc_t;

  // line (3-D axis) quantities m = a-b, n = b-c, p = c-a
  typedef struct packed {
    vfix_t m;
    vfix_t n;
    vfix_t p;
  } vmnp_t;

  typedef struct packed {
    lvl_t a;
    lvl_t b;
    lvl_t c;
  } lvl3_t;

  typedef struct packed {
    duty_t a;
    duty_t b;
    duty_t c;
  } duty3_t;

  // area of the bottom-vertex detection (Fig. 2(c))
  typedef enum logic [1:0] {
    AREA_NONE = 2'd0,
    AREA_1    = 2'd1,   // Vn >= 0 and Vp <= 0
    AREA_2    = 2'd2,   // Vm <= 0 and Vp >= 0
    AREA_3    = 2'd3    // Vm >= 0 and Vn <= 0
  } area_e;

  // two-level region of the remainder vector (Table I numbering)
  typedef enum logic [2:0] {
    REG_NONE = 3'd0,
    REG_1    = 3'd1,    // Vm1(+) Vn1(+)
    REG_2    = 3'd2,    // Vm1(-) Vp1(-)
    REG_3    = 3'd3,    // Vn1(+) Vp1(+)
    REG_4    = 3'd4,    // Vm1(-) Vn1(-)
    REG_5    = 3'd5,    // Vm1(+) Vp1(+)
    REG_6    = 3'd6     // Vn1(-) Vp1(-)
  } region_e;

  // direction policy of the carrier periods
  typedef enum logic [1:0] {
    DIR_ASC   = 2'd0,   // every period ascending
    DIR_DESC  = 2'd1,   // every period descending
    DIR_ALT   = 2'd2,   // ascending and descending periods alternate
    DIR_ALT2  = 2'd3    // same as DIR_ALT
  } dir_sel_e;

  // switching pair {S1, S2} of one 3LNPC cell, cell level = S1 - S2
  typedef struct packed {
    arm_t s1;
    arm_t s2;
  } pair_t;

endpackage
