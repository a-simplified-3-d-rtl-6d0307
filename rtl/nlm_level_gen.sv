// nlm_level_gen: nearest-level PWM stage for the three phases.  In each
// switching period of length Ts every phase takes two successive levels, Wx
// and Wx+1, with duty cycle Dx on Wx+1:
//   ascending period : Wx during (1-Dx)*Ts, then Wx+1 during Dx*Ts
//   descending period: Wx+1 during Dx*Ts, then Wx during (1-Dx)*Ts
// The repeating ramp of the period is a CAR_W-bit phase accumulator that
// advances by car_inc each clock, so Ts = 2^CAR_W / car_inc clocks and the
// switching frequency can be changed on line without a multiplier; the top
// DUTY_FB bits of the ramp are compared with (1-Dx) or Dx.  When the
// accumulator wraps a new period starts: w_base and duty are latched and the
// direction is chosen by dir_sel (fixed, or alternating every period).
// next_desc announces the direction of the coming period so that the source
// of w_base can pick its m factor in advance.  f_rise / f_fall pulse for one
// clock when the level of a phase goes up / down.  Outputs are registered,
// one clock behind the ramp.  The ramp as an accumulator and the direction
// policy are this design's choices; the level pattern follows the document.
module nlm_level_gen
  import svpwm_pkg::*;
#(
  parameter int N_LEVELS = 9,
  parameter int CAR_W    = 24
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CAR_W-1:0] car_inc,      // ramp increment per clock
  input  dir_sel_e         dir_sel,
  input  lvl3_t            w_base,       // Wa, Wb, Wc for the next period
  input  duty3_t           duty,         // Da, Db, Dc for the next period
  output lvl3_t            phase_level,  // present level of each phase
  output logic [2:0]       f_rise,       // [2]=a [1]=b [0]=c
  output logic [2:0]       f_fall,
  output logic             period_start, // first clock of a period
  output logic             desc,         // present period is descending
  output logic             next_desc     // direction of the next period
);

  localparam lvl_t TOP = lvl_t'(N_LEVELS - 1);

  logic [CAR_W-1:0] ramp;
  logic [CAR_W:0]   ramp_sum;
  lvl3_t            w_lat;
  duty3_t           d_lat;
  lvl3_t            level_c;
  duty_t            ramp_q;

  assign ramp_sum = {1'b0, ramp} + {1'b0, car_inc};
  assign ramp_q   = duty_t'(ramp[CAR_W-1 -: DUTY_FB]);

  always_comb begin
    unique case (dir_sel)
      DIR_ASC:  next_desc = 1'b0;
      DIR_DESC: next_desc = 1'b1;
      default:  next_desc = ~desc;
    endcase
  end

  // level of one phase at the present ramp value
  function automatic lvl_t level_of(input lvl_t w, input duty_t d, input logic dn,
                                    input duty_t r);
    logic hi;
    lvl_t w1;
    w1 = (w >= TOP) ? TOP : w + 1'b1;
    if (dn) hi = (r < d);                  // Wx+1 first
    else    hi = (r >= DUTY_ONE - d);      // Wx first
    return hi ? w1 : w;
  endfunction

  always_comb begin
    level_c.a = level_of(w_lat.a, d_lat.a, desc, ramp_q);
    level_c.b = level_of(w_lat.b, d_lat.b, desc, ramp_q);
    level_c.c = level_of(w_lat.c, d_lat.c, desc, ramp_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ramp         <= '0;
      w_lat        <= '0;
      d_lat        <= '0;
      desc         <= 1'b0;
      period_start <= 1'b0;
      phase_level  <= '0;
      f_rise       <= '0;
      f_fall       <= '0;
    end else begin
      ramp         <= ramp_sum[CAR_W-1:0];
      period_start <= ramp_sum[CAR_W];
      if (ramp_sum[CAR_W]) begin
        w_lat <= w_base;
        d_lat <= duty;
        desc  <= next_desc;
      end
      phase_level <= level_c;
      f_rise <= {level_c.a > phase_level.a, level_c.b > phase_level.b, level_c.c > phase_level.c};
      f_fall <= {level_c.a < phase_level.a, level_c.b < phase_level.b, level_c.c < phase_level.c};
    end
  end

endmodule
