// tb_vertex_detect: checks the bottom-vertex detection and the redundant
// vector of vertex_detect against the reference model (subtract the
// smallest phase, take floors), for a nine-level and a five-level instance.
// Includes the examples (2.2, 0, 3.8) -> (2,0,3) and the five-level triangle
// whose bottom vertex is (2,2,0) with redundant vectors (3,3,1) (m=1) and
// m=2 clamped to 1 because level 4 is then the top.
module tb_vertex_detect;
  import svpwm_pkg::*;
  import svpwm_ref_pkg::*;

  vmnp_t v9, v5;
  mfac_t m9, m5;
  lvl3_t b9, r9, b5, r5;
  mfac_t u9, u5;
  area_e a9, a5;
  int checks = 0, failures = 0;

  vertex_detect #(.N_LEVELS(9)) dut9 (.v_mnp(v9), .m_req(m9), .s_bot(b9), .s_red(r9), .m_used(u9), .area(a9));
  vertex_detect #(.N_LEVELS(5)) dut5 (.v_mnp(v5), .m_req(m5), .s_bot(b5), .s_red(r5), .m_used(u5), .area(a5));

  task automatic apply(int va, vb, vc, int m, int nlev);
    int s[3]; int smax, mu;
    bottom(va, vb, vc, nlev, s);
    smax = imax3(s[0], s[1], s[2]);
    mu = mclamp(m, smax, nlev);
    if (nlev == 9) begin
      v9 = '{m: vfix_t'(va - vb), n: vfix_t'(vb - vc), p: vfix_t'(vc - va)}; m9 = mfac_t'(m);
      #1;
      checks++;
      if (b9 != '{lvl_t'(s[0]), lvl_t'(s[1]), lvl_t'(s[2])} || u9 != mfac_t'(mu) ||
          r9 != '{lvl_t'(s[0] + mu), lvl_t'(s[1] + mu), lvl_t'(s[2] + mu)}) begin
        failures++;
        $display("FAIL9 v=(%0d,%0d,%0d) m=%0d got bot=(%0d,%0d,%0d) red=(%0d,%0d,%0d) m=%0d exp (%0d,%0d,%0d)+%0d",
                 va, vb, vc, m, b9.a, b9.b, b9.c, r9.a, r9.b, r9.c, u9, s[0], s[1], s[2], mu);
      end
    end else begin
      v5 = '{m: vfix_t'(va - vb), n: vfix_t'(vb - vc), p: vfix_t'(vc - va)}; m5 = mfac_t'(m);
      #1;
      checks++;
      if (b5 != '{lvl_t'(s[0]), lvl_t'(s[1]), lvl_t'(s[2])} || u5 != mfac_t'(mu) ||
          r5 != '{lvl_t'(s[0] + mu), lvl_t'(s[1] + mu), lvl_t'(s[2] + mu)}) begin
        failures++;
        $display("FAIL5 v=(%0d,%0d,%0d) m=%0d got bot=(%0d,%0d,%0d) red=(%0d,%0d,%0d) m=%0d exp (%0d,%0d,%0d)+%0d",
                 va, vb, vc, m, b5.a, b5.b, b5.c, r5.a, r5.b, r5.c, u5, s[0], s[1], s[2], mu);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example: Vm=2.2, Vp=1.6 -> bottom vertex (2,0,3)
    apply(2 * 4096 + 819, 0, 3 * 4096 + 3277, 0, 9);
    checks++;
    if (b9 != '{lvl_t'(2), lvl_t'(0), lvl_t'(3)} || a9 != AREA_3) failures++;
    // five-level triangle T1 near vertex (2,2,0)
    apply(2 * 4096 + 1500, 2 * 4096 + 1000, 300, 1, 5);
    checks++;
    if (b5 != '{lvl_t'(2), lvl_t'(2), lvl_t'(0)} || r5 != '{lvl_t'(3), lvl_t'(3), lvl_t'(1)} || a5 != AREA_1) failures++;
    apply(2 * 4096 + 1500, 2 * 4096 + 1000, 300, 2, 5);
    checks++;
    if (u5 != mfac_t'(1)) failures++;
    // one case per area
    apply(0, 4096, 2 * 4096, 0, 9);   checks++; if (a9 != AREA_2) failures++;
    apply(4096, 3000, 0, 0, 9);       checks++; if (a9 != AREA_1) failures++;
    repeat (4000) begin
      int va, vb, vc, m;
      va = $urandom_range(0, 8 * 4096 - 1);
      vb = $urandom_range(0, 8 * 4096 - 1);
      vc = $urandom_range(0, 8 * 4096 - 1);
      m  = $urandom_range(0, 8);
      apply(va, vb, vc, m, 9);
      va = $urandom_range(0, 4 * 4096 - 1);
      vb = $urandom_range(0, 4 * 4096 - 1);
      vc = $urandom_range(0, 4 * 4096 - 1);
      apply(va - 2 * 4096, vb - 2 * 4096, vc - 2 * 4096, m, 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
