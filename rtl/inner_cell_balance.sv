// inner_cell_balance: balances the two capacitors C1, C2 of one 3LNPC cell
// and drives its eight switches.  Each of the two 3-level arms has a state
// S = 2 (P), 1 (neutral point O) or 0 (N); the cell output level is S1 - S2.
// Levels +1 and -1 have two switching pairs each, one that carries the phase
// current through C1 and one through C2 (Table IV):
//   +2: {2,0}     +1: {2,1} if C1 must charge (Vc1<Vc2, i>0 or Vc1>Vc2, i<0)
//                     {1,0} otherwise
//    0: {1,1}     -1: {1,2} if C1 must discharge (Vc1>Vc2, i>0 or Vc1<Vc2, i<0)
//   -2: {0,2}         {0,1} otherwise
// Level 0 always uses {1,1}, the pair closest to all others.  An arm state is
// decoded to its four switches as in a 3-level NPC leg: 2 -> Sx1,Sx2 on;
// 1 -> Sx2,Sx3 on; 0 -> Sx3,Sx4 on.  gates[0..3] = S_x11,S_x21,S_x31,S_x41
// (arm 1), gates[4..7] = S_x51,S_x61,S_x71,S_x81 (arm 2).
// Design choices: the pair is chosen again only when the cell level changes
// (and after reset), so balancing never adds transitions of its own; equal
// voltages or zero current take the "otherwise" pair; with bal_en low the
// "otherwise" pairs are always used.  No dead time is inserted.  The pair is
// registered: gates follow a level change after one clock.
module inner_cell_balance
  import svpwm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   bal_en,
  input  clvl_t  cell_level,   // -2 .. 2
  input  vmeas_t vc1,          // V_C1
  input  vmeas_t vc2,          // V_C2
  input  logic   i_pos,        // phase current > 0
  input  logic   i_neg,        // phase current < 0
  output pair_t  pair,         // {S1, S2}
  output logic [7:0] gates
);

  logic  charge_c1, discharge_c1;
  pair_t pair_c;
  clvl_t level_q;
  logic  init_q;

  always_comb begin
    charge_c1    = bal_en && ((vc1 < vc2 && i_pos) || (vc1 > vc2 && i_neg));
    discharge_c1 = bal_en && ((vc1 > vc2 && i_pos) || (vc1 < vc2 && i_neg));
    unique case (cell_level)
      3'sd2:   pair_c = '{s1: 2'd2, s2: 2'd0};
      3'sd1:   pair_c = charge_c1    ? '{s1: 2'd2, s2: 2'd1} : '{s1: 2'd1, s2: 2'd0};
      -3'sd1:  pair_c = discharge_c1 ? '{s1: 2'd1, s2: 2'd2} : '{s1: 2'd0, s2: 2'd1};
      -3'sd2:  pair_c = '{s1: 2'd0, s2: 2'd2};
      default: pair_c = '{s1: 2'd1, s2: 2'd1};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pair    <= '{s1: 2'd1, s2: 2'd1};
      level_q <= '0;
      init_q  <= 1'b1;
    end else begin
      init_q  <= 1'b0;
      level_q <= cell_level;
      if (init_q || cell_level != level_q) pair <= pair_c;
    end
  end

  function automatic logic [3:0] arm_gates(input arm_t s);
    // bit 0 = outer upper switch, bit 3 = outer lower switch
    unique case (s)
      2'd2:    return 4'b0011;
      2'd1:    return 4'b0110;
      default: return 4'b1100;
    endcase
  endfunction

  assign gates = {arm_gates(pair.s2), arm_gates(pair.s1)};

endmodule
