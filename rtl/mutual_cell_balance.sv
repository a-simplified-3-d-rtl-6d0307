// mutual_cell_balance: balances the dc-link voltages of the N_CELLS cascaded
// cells of one phase.  It keeps the vertical space vector [C1 .. Ch], the
// output level of each cell (-2 .. 2), whose sum must equal the phase level
// W - 2h.  Whenever the phase level steps by one unit, exactly one cell
// changes by one unit, so a level step costs the minimum number of switch
// transitions.  Which cell moves follows the energy rule of the method
// (eq. 10/11 for two cells): with positive phase current a cell whose level
// rises is charged, so
//   level rises : move the eligible cell with the lowest  Vdc if i > 0,
//                                          the highest Vdc if i < 0
//   level falls : move the eligible cell with the highest Vdc if i > 0,
//                                          the lowest  Vdc if i < 0
// For two cells this is exactly eq. (10)/(11).  A cell at +2 cannot rise and
// one at -2 cannot fall.  Ties, and zero current, go to the highest index,
// matching the strict inequalities of eq. (10)/(11).  With bal_en low the
// lowest-index eligible cell moves instead.  If the phase level jumps by more
// than one (new base level at a period start), the vector moves one unit per
// clock until it catches up.  The general h-cell rule, the saturation rule
// and the one-step-per-clock tracking are this design's choices.  A step
// is taken the clock after the level input changes; cell_level is registered.
module mutual_cell_balance
  import svpwm_pkg::*;
#(
  parameter int N_CELLS = 2
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bal_en,
  input  lvl_t               level,                 // phase level W, 0 .. 4h
  input  logic               i_pos,                 // phase current > 0
  input  logic               i_neg,                 // phase current < 0
  input  logic [VM_W:0]      vdc [N_CELLS],          // dc-link voltage of each cell
  output clvl_t              cell_level [N_CELLS],   // C1 .. Ch
  output logic               step_up,               // a cell rose this clock
  output logic               step_dn,               // a cell fell this clock
  output logic [$clog2(N_CELLS+1)-1:0] moved_cell   // index of the cell that moved
);

  localparam int SW = LVL_W + 2;
  typedef logic signed [SW-1:0] sum_t;
  localparam int IW = $clog2(N_CELLS+1);

  sum_t target, total;
  logic up, dn;
  int   pick;

  always_comb begin
    target = $signed({2'b00, level}) - sum_t'(2 * N_CELLS);
    total  = '0;
    for (int k = 0; k < N_CELLS; k++) total += sum_t'(cell_level[k]);
    up = (target > total);
    dn = (target < total);

    pick = -1;
    for (int k = 0; k < N_CELLS; k++) begin
      if ((up && cell_level[k] < 3'sd2) || (dn && cell_level[k] > -3'sd2)) begin
        if (pick < 0) begin
          pick = k;
        end else if (bal_en) begin
          // later index wins ties; i = 0 simply takes the last eligible cell
          if (i_pos && !i_neg) begin
            if (up ? (vdc[k] <= vdc[pick]) : (vdc[k] >= vdc[pick])) pick = k;
          end else if (i_neg && !i_pos) begin
            if (up ? (vdc[k] >= vdc[pick]) : (vdc[k] <= vdc[pick])) pick = k;
          end else begin
            pick = k;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_CELLS; k++) cell_level[k] <= '0;
      step_up    <= 1'b0;
      step_dn    <= 1'b0;
      moved_cell <= '0;
    end else begin
      step_up <= 1'b0;
      step_dn <= 1'b0;
      if (pick >= 0) begin
        for (int k = 0; k < N_CELLS; k++)
          if (k == pick) cell_level[k] <= up ? cell_level[k] + 3'sd1 : cell_level[k] - 3'sd1;
        step_up    <= up;
        step_dn    <= dn;
        moved_cell <= IW'(pick);
      end
    end
  end

endmodule
