// tb_mutual_cell_balance: checks the cell-level allocation of one phase.
// A two-cell instance is compared clock by clock with a model written
// directly from the step rules for two cells: on a rise C1 steps +1 if
// (Vdc1 < Vave and i > 0) or (Vdc1 > Vave and i < 0), else C2 steps; on a
// fall C1 steps -1 if (Vdc1 > Vave and i > 0) or (Vdc1 < Vave and i < 0),
// else C2 steps; a cell at its limit hands the step to the other; without
// balancing C1 goes first.  It replays the example [-1,0] -> [0,0]
// (Vdc1 < Vdc2, i > 0, level rising) and checks jumps of several levels,
// which must be followed one unit per clock.  A three-cell instance is
// checked for: sum equal to the phase level, one unit step per clock, and
// the moved cell having the lowest (highest) Vdc among the eligible cells.
module tb_mutual_cell_balance;
  import svpwm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic bal_en = 1, i_pos = 1, i_neg = 0;
  lvl_t level2 = 4, level3 = 6;
  logic [VM_W:0] vdc2 [2];
  logic [VM_W:0] vdc3 [3];
  clvl_t c2 [2];
  clvl_t c3 [3];
  logic up2, dn2, up3, dn3;
  logic [1:0] mv2, mv3;
  int checks = 0, failures = 0;

  mutual_cell_balance #(.N_CELLS(2)) dut2 (.clk, .rst_n, .bal_en, .level(level2), .i_pos, .i_neg,
    .vdc(vdc2), .cell_level(c2), .step_up(up2), .step_dn(dn2), .moved_cell(mv2));
  mutual_cell_balance #(.N_CELLS(3)) dut3 (.clk, .rst_n, .bal_en, .level(level3), .i_pos, .i_neg,
    .vdc(vdc3), .cell_level(c3), .step_up(up3), .step_dn(dn3), .moved_cell(mv3));

  always #5 clk = ~clk;

  int m1 = 0, m2 = 0;     // model of the two-cell vertical vector

  // one model step toward the target, with the inputs of this clock
  task automatic model_step();
    int tgt, sum; bit rise, c1;
    tgt = int'(level2) - 4;
    sum = m1 + m2;
    if (tgt == sum) return;
    rise = tgt > sum;
    if (!bal_en) c1 = 1;
    else if (rise) c1 = (vdc2[0] < vdc2[1] && i_pos && !i_neg) || (vdc2[0] > vdc2[1] && i_neg && !i_pos);
    else           c1 = (vdc2[0] > vdc2[1] && i_pos && !i_neg) || (vdc2[0] < vdc2[1] && i_neg && !i_pos);
    if (rise) begin
      if (c1 && m1 == 2) c1 = 0;
      if (!c1 && m2 == 2) c1 = 1;
      if (c1) m1++; else m2++;
    end else begin
      if (c1 && m1 == -2) c1 = 0;
      if (!c1 && m2 == -2) c1 = 1;
      if (c1) m1--; else m2--;
    end
  endtask

  clvl_t p3 [3];
  // check of the three-cell instance after a clock edge; p3 holds the old state
  task automatic check3(logic [VM_W:0] v [3], bit ip, bit in_, bit be);
    int moved, ch, sum, tgt, oldsum;
    moved = -1; ch = 0; sum = 0; oldsum = 0;
    for (int k = 0; k < 3; k++) begin
      sum += int'(c3[k]); oldsum += int'(p3[k]);
      if (c3[k] != p3[k]) begin ch++; moved = k; end
    end
    tgt = int'(level3) - 6;
    checks++;
    if (ch > 1 || (oldsum != tgt && ch != 1) || (oldsum == tgt && ch != 0)) begin
      failures++; $display("FAIL3 changes=%0d", ch);
    end
    if (ch == 1 && be && ip != in_) begin
      bit rise; rise = sum > oldsum;
      for (int k = 0; k < 3; k++) begin
        bit elig; elig = rise ? (p3[k] < 2) : (p3[k] > -2);
        if (elig && k != moved) begin
          checks++;
          // i > 0: a rise goes to the lowest Vdc, a fall to the highest
          if ((rise == ip) ? (v[k] < v[moved]) : (v[k] > v[moved])) begin
            failures++; $display("FAIL3 cell %0d moved, cell %0d preferred", moved, k);
          end
        end
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [VM_W:0] v3s [3];
    bit ips, ins, bes;
    vdc2 = '{1000, 1000};
    vdc3 = '{1000, 1000, 1000};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // example: reach [-1,0] with a fall that moves C1 (Vdc1 > Vdc2, i > 0)
    vdc2 = '{1100, 1000};
    level2 = 3;
    model_step();
    @(negedge clk);
    checks++;
    if (c2[0] != -3'sd1 || c2[1] != 3'sd0) begin failures++; $display("FAIL example step 1"); end
    // rise with Vdc1 < Vdc2, i > 0: C1 steps +1 -> [0,0]
    vdc2 = '{900, 1000};
    level2 = 4;
    model_step();
    @(negedge clk);
    checks++;
    if (c2[0] != 3'sd0 || c2[1] != 3'sd0 || !up2 || mv2 != 0) begin failures++; $display("FAIL example step 2"); end

    for (int t = 0; t < 20000; t++) begin
      // new stimulus
      if ($urandom_range(0, 3) == 0) begin
        int l;
        l = int'(level2) + (($urandom_range(0, 1) == 1) ? 1 : -1);
        if ($urandom_range(0, 30) == 0) l = $urandom_range(0, 8);     // multi-level jump
        if (l < 0) l = 0;
        if (l > 8) l = 8;
        level2 = lvl_t'(l);
        l = int'(level3) + (($urandom_range(0, 1) == 1) ? 1 : -1);
        if ($urandom_range(0, 30) == 0) l = $urandom_range(0, 12);
        if (l < 0) l = 0;
        if (l > 12) l = 12;
        level3 = lvl_t'(l);
      end
      vdc2 = '{$urandom_range(900, 1100), $urandom_range(900, 1100)};
      vdc3 = '{$urandom_range(900, 1100), $urandom_range(900, 1100), $urandom_range(900, 1100)};
      case ($urandom_range(0, 4))
        0: begin i_pos = 0; i_neg = 0; end
        1, 2: begin i_pos = 1; i_neg = 0; end
        default: begin i_pos = 0; i_neg = 1; end
      endcase
      bal_en = ($urandom_range(0, 9) != 0);
      p3 = c3;
      v3s = vdc3; ips = i_pos; ins = i_neg; bes = bal_en;
      model_step();
      @(negedge clk);
      checks++;
      if (int'(c2[0]) != m1 || int'(c2[1]) != m2) begin
        failures++;
        if (failures < 10) $display("FAIL2 t=%0d got [%0d,%0d] exp [%0d,%0d]", t, c2[0], c2[1], m1, m2);
      end
      check3(v3s, ips, ins, bes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
