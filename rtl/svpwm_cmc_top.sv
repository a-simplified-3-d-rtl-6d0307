// svpwm_cmc_top: complete modulator for a three-phase cascaded converter
// built from N_CELLS 3-level NPC cells per phase (n = 4*N_CELLS+1 levels).
//
// Data flow, once per switching period:
//   v_ref (Va,Vb,Vc) -> svpwm_core: bottom vertex, redundant vector with m,
//     remainder, duty cycles (four-stage pipeline, runs every clock)
//   -> nlm_level_gen: latches Wx, Dx at the period start and steps every
//     phase between Wx and Wx+1 (ascending or descending period)
//   -> per phase, mutual_cell_balance: spreads the phase level over the cells,
//     one cell moving per level step, chosen by dc-link voltages and current
//   -> per cell, inner_cell_balance: picks the switching pair that balances
//     the two capacitors of the cell and drives its eight switches.
// The m factor of the coming period is m_asc or m_desc according to the
// direction nlm_level_gen announces, so ascending and descending periods can
// use different redundant vectors.  The references, the capacitor voltages
// and the current signs come from outside (reference generator and
// measurement are not part of this design).  A cell's dc-link voltage is the
// sum of its two capacitor voltages.  Gate outputs lag a level step by two
// clocks (one in mutual_cell_balance, one in inner_cell_balance).
module svpwm_cmc_top
  import svpwm_pkg::*;
#(
  parameter int N_CELLS = 2,
  parameter int CAR_W   = 24
)(
  input  logic             clk,
  input  logic             rst_n,
  input  vabc_t            v_ref,                 // Va, Vb, Vc in levels
  input  mfac_t            m_asc,                 // m for ascending periods
  input  mfac_t            m_desc,                // m for descending periods
  input  logic             disc_mode,             // 0 continuous, 1 discontinuous
  input  dir_sel_e         dir_sel,
  input  logic [CAR_W-1:0] car_inc,               // sets the switching frequency
  input  logic             bal_en,
  input  logic [2:0]       i_pos,                 // phase a,b,c current > 0
  input  logic [2:0]       i_neg,                 // phase a,b,c current < 0
  input  vmeas_t           vc1 [3][N_CELLS],      // V_C1 of every cell
  input  vmeas_t           vc2 [3][N_CELLS],      // V_C2 of every cell
  output lvl_t             phase_level [3],       // level W of phases a,b,c
  output clvl_t            cell_level [3][N_CELLS],
  output pair_t            cell_pair  [3][N_CELLS],
  output logic [7:0]       gates      [3][N_CELLS],
  output duty3_t           duty,                  // duty cycles of the present sample
  output region_e          region,
  output logic             period_start,
  output logic             desc,
  output logic [2:0]       step_up,               // a cell of phase x rose
  output logic [2:0]       step_dn                // a cell of phase x fell
);

  localparam int N_LEVELS = 4 * N_CELLS + 1;

  // ---- modulator -------------------------------------------------------
  logic   core_valid;
  lvl3_t  w_base;
  logic   next_desc;
  mfac_t  m_sel;

  assign m_sel = next_desc ? m_desc : m_asc;

  svpwm_core #(.N_LEVELS(N_LEVELS)) u_core (
    .clk, .rst_n,
    .in_valid (1'b1),
    .v_abc    (v_ref),
    .m_req    (m_sel),
    .disc_mode,
    .out_valid(core_valid),
    .w_base,
    .duty,
    .region);

  lvl3_t      lvl3;
  logic [2:0] f_rise, f_fall;

  nlm_level_gen #(.N_LEVELS(N_LEVELS), .CAR_W(CAR_W)) u_nlm (
    .clk, .rst_n, .car_inc, .dir_sel,
    .w_base, .duty,
    .phase_level (lvl3),
    .f_rise, .f_fall,
    .period_start, .desc, .next_desc);

  assign phase_level[0] = lvl3.a;
  assign phase_level[1] = lvl3.b;
  assign phase_level[2] = lvl3.c;

  // ---- balancing, per phase and per cell -------------------------------
  for (genvar x = 0; x < 3; x++) begin : g_phase
    logic [VM_W:0] vdc [N_CELLS];
    logic [$clog2(N_CELLS+1)-1:0] moved;

    for (genvar k = 0; k < N_CELLS; k++) begin : g_vdc
      assign vdc[k] = {1'b0, vc1[x][k]} + {1'b0, vc2[x][k]};
    end

    mutual_cell_balance #(.N_CELLS(N_CELLS)) u_mutual (
      .clk, .rst_n, .bal_en,
      .level      (phase_level[x]),
      .i_pos      (i_pos[x]),
      .i_neg      (i_neg[x]),
      .vdc        (vdc),
      .cell_level (cell_level[x]),
      .step_up    (step_up[x]),
      .step_dn    (step_dn[x]),
      .moved_cell (moved));

    for (genvar k = 0; k < N_CELLS; k++) begin : g_cell
      inner_cell_balance u_inner (
        .clk, .rst_n, .bal_en,
        .cell_level (cell_level[x][k]),
        .vc1        (vc1[x][k]),
        .vc2        (vc2[x][k]),
        .i_pos      (i_pos[x]),
        .i_neg      (i_neg[x]),
        .pair       (cell_pair[x][k]),
        .gates      (gates[x][k]));
    end
  end

  // the rise/fall strobes and the moved-cell index are observation signals
  // of the sub-blocks; the cell steps are brought out instead
  logic unused_ok;
  assign unused_ok = ^{core_valid, f_rise, f_fall, g_phase[0].moved, g_phase[1].moved, g_phase[2].moved};

endmodule
