// tb_line_voltage_gen: drives random and corner phase references into
// line_voltage_gen and checks Vm = Va-Vb, Vn = Vb-Vc, Vp = Vc-Va computed
// with integer arithmetic, and that the three outputs sum to zero.
module tb_line_voltage_gen;
  import svpwm_pkg::*;

  vabc_t v_abc;
  vmnp_t v_mnp;
  int checks = 0, failures = 0;

  line_voltage_gen dut (.v_abc, .v_mnp);

  task automatic apply(int a, int b, int c);
    v_abc.a = vfix_t'(a); v_abc.b = vfix_t'(b); v_abc.c = vfix_t'(c);
    #1;
    checks++;
    if (int'(v_mnp.m) != a - b || int'(v_mnp.n) != b - c || int'(v_mnp.p) != c - a) begin
      failures++;
      $display("FAIL a=%0d b=%0d c=%0d -> m=%0d n=%0d p=%0d", a, b, c, v_mnp.m, v_mnp.n, v_mnp.p);
    end
    checks++;
    if (int'(v_mnp.m) + int'(v_mnp.n) + int'(v_mnp.p) != 0) failures++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0, 0);
    apply(2 * 4096 + 819, 0, 3 * 4096 + 3277);   // 2.2, 0, 3.8 levels
    apply(-8 * 4096, 8 * 4096, 0);
    repeat (2000) begin
      int a, b, c;
      a = $urandom_range(0, 16 * 4096) - 8 * 4096;
      b = $urandom_range(0, 16 * 4096) - 8 * 4096;
      c = $urandom_range(0, 16 * 4096) - 8 * 4096;
      apply(a, b, c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
