// svpwm_core: the 3-D NLM-based SVPWM modulator.  From the normalised phase
// references it produces, for one switching period, the base level Wx of
// each phase and the duty cycle Dx during which that phase sits at Wx+1.
// It chains the four steps of the method, one pipeline register after each:
//   stage 1  line_voltage_gen  Vm, Vn, Vp                       (eq. 1)
//   stage 2  vertex_detect     bottom vector S, redundant S+m    (eq. 3, 4)
//   stage 3  remainder_calc    Vm1, Vn1, Vp1                     (eq. 5)
//   stage 4  duty_calc         Da, Db, Dc                        (Tables II/III)
// Only adders, subtractors, comparators and sign tests are used.  Latency is
// four clocks from in_valid to out_valid, one result per clock.  The pipeline
// split is this design's choice; the document gives the steps, not the
// registers.  m_req and disc_mode are sampled with the references.
module svpwm_core
  import svpwm_pkg::*;
#(
  parameter int N_LEVELS = 9
)(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  vabc_t   v_abc,      // Va, Vb, Vc
  input  mfac_t   m_req,      // m factor for this sample
  input  logic    disc_mode,  // 0 continuous, 1 discontinuous
  output logic    out_valid,
  output lvl3_t   w_base,     // Wa, Wb, Wc = redundant vector
  output duty3_t  duty,       // Da, Db, Dc
  output region_e region      // region 1..6 of the remainder
);

  // ---- stage 1: reference voltages on the 3-D axes ----
  vmnp_t v_mnp_c, v_mnp_q1;
  mfac_t m_q1;
  logic  disc_q1, vld_q1;

  line_voltage_gen u_line (.v_abc(v_abc), .v_mnp(v_mnp_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q1 <= 1'b0;  v_mnp_q1 <= '0;  m_q1 <= '0;  disc_q1 <= 1'b0;
    end else begin
      vld_q1 <= in_valid;  v_mnp_q1 <= v_mnp_c;  m_q1 <= m_req;  disc_q1 <= disc_mode;
    end
  end

  // ---- stage 2: Part 1, vertex detection and redundant vector ----
  lvl3_t s_bot_c, s_red_c, s_bot_q2, s_red_q2;
  vmnp_t v_mnp_q2;
  logic  disc_q2, vld_q2;
  mfac_t m_used_c;
  area_e area_c;

  vertex_detect #(.N_LEVELS(N_LEVELS)) u_vertex (
    .v_mnp(v_mnp_q1), .m_req(m_q1), .s_bot(s_bot_c), .s_red(s_red_c),
    .m_used(m_used_c), .area(area_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q2 <= 1'b0;  s_bot_q2 <= '0;  s_red_q2 <= '0;  v_mnp_q2 <= '0;  disc_q2 <= 1'b0;
    end else begin
      vld_q2 <= vld_q1;  s_bot_q2 <= s_bot_c;  s_red_q2 <= s_red_c;
      v_mnp_q2 <= v_mnp_q1;  disc_q2 <= disc_q1;
    end
  end

  // ---- stage 3: Part 2, remainder vector ----
  vmnp_t v_rem_c, v_rem_q3;
  lvl3_t s_red_q3;
  logic  disc_q3, vld_q3;

  remainder_calc u_rem (.v_mnp(v_mnp_q2), .s_bot(s_bot_q2), .v_rem(v_rem_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q3 <= 1'b0;  v_rem_q3 <= '0;  s_red_q3 <= '0;  disc_q3 <= 1'b0;
    end else begin
      vld_q3 <= vld_q2;  v_rem_q3 <= v_rem_c;  s_red_q3 <= s_red_q2;  disc_q3 <= disc_q2;
    end
  end

  // ---- stage 4: Part 3, duty cycles ----
  duty3_t  duty_c;
  region_e region_c;

  duty_calc u_duty (.v_rem(v_rem_q3), .disc_mode(disc_q3), .duty(duty_c), .region(region_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;  w_base <= '0;  duty <= '0;  region <= REG_NONE;
    end else begin
      out_valid <= vld_q3;  w_base <= s_red_q3;  duty <= duty_c;  region <= region_c;
    end
  end

  // the m factor and the area are consumed inside the pipeline only
  logic unused_ok;
  assign unused_ok = ^{m_used_c, area_c};

endmodule
