// tb_comp_circuit: checks flags and memory update of one pixel against the
// decision rules, over the threshold boundaries and random values:
//   flag1 = |x - m| >= th1, flag2 = |x - p| >= th2, output = flag1 & flag2,
//   new memory = m (flag1 low), p (flag2 low), x (both high).
module tb_comp_circuit;
  import sensor_pkg::*;

  pixel_t x, m_old, p_d, th1, th2, m_new;
  logic   flag1, flag2, flag_and;
  int     checks = 0, failures = 0;
  int     n_inter = 0, n_intra = 0, n_out = 0;

  comp_circuit dut (.x, .m_old, .p_d, .th1, .th2, .flag1, .flag2, .flag_and, .m_new);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int xv, int mv, int pv, int t1, int t2);
    int d1, d2, em;
    bit f1, f2;
    x = pixel_t'(xv); m_old = pixel_t'(mv); p_d = pixel_t'(pv);
    th1 = pixel_t'(t1); th2 = pixel_t'(t2);
    #1;
    d1 = (xv > mv) ? xv - mv : mv - xv;
    d2 = (xv > pv) ? xv - pv : pv - xv;
    f1 = d1 >= t1;
    f2 = d2 >= t2;
    em = !f1 ? mv : (!f2 ? pv : xv);
    if (!f1) n_inter++; else if (!f2) n_intra++; else n_out++;
    checks++;
    if (flag1 != f1 || flag2 != f2 || flag_and != (f1 && f2) || int'(m_new) != em) begin
      failures++;
      if (failures < 10)
        $display("x=%0d m=%0d p=%0d th=%0d/%0d: got %0b%0b%0b m=%0d exp %0b%0b m=%0d",
                 xv, mv, pv, t1, t2, flag1, flag2, flag_and, m_new, f1, f2, em);
    end
  endtask

  initial begin
    // Threshold boundaries: difference equal to, one below, one above.
    for (int t = 0; t < 256; t += 17)
      for (int d = -1; d <= 1; d++) begin
        if (t + d < 0 || t + d > 255) continue;
        apply(t + d, 0, 0, t, 255);
        apply(0, t + d, 255, t, 255);
        apply(t + d, 255 - 0, 0, 0, t);
        apply(255 - (t + d), 255, 255, 255, t);
        apply(100, 100 + 0, 0, 0, 0);
      end
    for (int k = 0; k < 20000; k++)
      apply($urandom_range(255), $urandom_range(255), $urandom_range(255),
            $urandom_range(40), $urandom_range(40));
    checks++;
    if (n_inter == 0 || n_intra == 0 || n_out == 0) begin
      failures++;
      $display("a decision path was never taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
