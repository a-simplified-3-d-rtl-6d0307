// tb_inner_cell_balance: checks the switching-pair choice of one 3LNPC cell
// against the table of pairs and balancing conditions: every level, with
// Vc1 <, = and > Vc2 and every current sign, balancing on and off.  For each
// case it checks that S1 - S2 equals the cell level, that the pair is the
// one the conditions call for, and that the gate pattern is the arm decoding
// (2: outer and inner upper switch on, 1: both inner switches on, 0: inner
// and outer lower switch on).  It also checks that a change of the voltage
// comparison while the level stays constant does not change the pair, and
// that the pair follows a level change one clock later.
module tb_inner_cell_balance;
  import svpwm_pkg::*;

  logic clk = 0, rst_n = 0, bal_en = 1, i_pos = 0, i_neg = 0;
  clvl_t cell_level = 0;
  vmeas_t vc1 = 1000, vc2 = 1000;
  pair_t pair;
  logic [7:0] gates;
  int checks = 0, failures = 0;
  int used [4];

  inner_cell_balance dut (.clk, .rst_n, .bal_en, .cell_level, .vc1, .vc2, .i_pos, .i_neg, .pair, .gates);

  always #5 clk = ~clk;

  function automatic logic [3:0] arm(int s);
    // {S_x4, S_x3, S_x2, S_x1}
    case (s)
      2: return 4'b0011;
      1: return 4'b0110;
      default: return 4'b1100;
    endcase
  endfunction

  task automatic expect_pair(int lvl, int c1, int c2, bit ip, bit in_, bit be, output int s1, output int s2);
    bit cond1, cond3;
    cond1 = be && ((c1 < c2 && ip) || (c1 > c2 && in_));
    cond3 = be && ((c1 > c2 && ip) || (c1 < c2 && in_));
    case (lvl)
      2:  begin s1 = 2; s2 = 0; end
      1:  if (cond1) begin s1 = 2; s2 = 1; end else begin s1 = 1; s2 = 0; end
      0:  begin s1 = 1; s2 = 1; end
      -1: if (cond3) begin s1 = 1; s2 = 2; end else begin s1 = 0; s2 = 1; end
      default: begin s1 = 0; s2 = 2; end
    endcase
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s1, s2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (pair != '{s1: 2'd1, s2: 2'd1}) failures++;
    for (int be = 0; be < 2; be++)
      for (int cmp = 0; cmp < 3; cmp++)
        for (int cur = 0; cur < 3; cur++)
          for (int lvl = -2; lvl <= 2; lvl++) begin
            bal_en = be[0];
            vc1 = (cmp == 0) ? 900 : (cmp == 1) ? 1000 : 1100;
            vc2 = 1000;
            i_pos = (cur == 1); i_neg = (cur == 2);
            // pass through level 0 first so that every case is a level change
            cell_level = (lvl == 0) ? 3'sd1 : 3'sd0;
            @(negedge clk);
            cell_level = clvl_t'(lvl);
            @(negedge clk);
            expect_pair(lvl, int'(vc1), int'(vc2), i_pos, i_neg, bal_en, s1, s2);
            checks++;
            if (int'(pair.s1) != s1 || int'(pair.s2) != s2 || int'(pair.s1) - int'(pair.s2) != lvl) begin
              failures++;
              $display("FAIL lvl=%0d vc1=%0d be=%0d i=%0d/%0d got {%0d,%0d} exp {%0d,%0d}",
                       lvl, vc1, be, i_pos, i_neg, pair.s1, pair.s2, s1, s2);
            end
            checks++;
            if (gates != {arm(s2), arm(s1)}) begin failures++; $display("FAIL gates %b", gates); end
            if (s1 == 2 && s2 == 1) used[0]++;
            if (s1 == 1 && s2 == 0) used[1]++;
            if (s1 == 1 && s2 == 2) used[2]++;
            if (s1 == 0 && s2 == 1) used[3]++;
            // hold the level, flip the comparison: pair must stay
            vc1 = 2000 - vc1;
            @(negedge clk);
            checks++;
            if (int'(pair.s1) != s1 || int'(pair.s2) != s2) begin failures++; $display("FAIL pair changed without level change"); end
          end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (used[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
