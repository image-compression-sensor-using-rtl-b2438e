// tb_column_array: feeds whole frames row by row, with memory values kept by
// the testbench, and compares every column's new memory value and, after
// the load edge, the held flags and pixel values with a model that works
// through the row pixel by pixel, left to right: prediction from the updated
// value above and the updated value to the left, border rules for row 0 and
// column 0, flag1 = |x - M| >= th1, flag2 = |x - P| >= th2.
module tb_column_array;
  import sensor_pkg::*;

  localparam int unsigned R = 16, C = 64;

  logic         clk = 0, rst_n = 0, load = 0, first_row = 0;
  pixel_t       th1, th2;
  pixel_t       pix [C];
  pixel_t       m_old [C];
  pixel_t       m_new [C];
  pixel_t       pix_q [C];
  logic [C-1:0] flag1_q, flag2_q, flag_and_q;
  pixel_t       mem [R][C];
  int           checks = 0, failures = 0;
  int           n_intra = 0, n_inter = 0, n_out = 0;

  column_array #(.COLS(C)) dut (.clk, .rst_n, .load, .first_row, .th1, .th2,
                                .pix, .m_old, .m_new, .pix_q, .flag1_q, .flag2_q,
                                .flag_and_q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(int base, int spread);
    for (int r = 0; r < R; r++) begin
      pixel_t       exp_m [C];
      logic [C-1:0] e1, e2;
      @(negedge clk);
      first_row = (r == 0);
      for (int j = 0; j < C; j++) begin
        int v;
        v = base + int'($urandom_range(spread)) + ((j / 16) * 20);
        pix[j] = pixel_t'(v > 255 ? 255 : v);
        m_old[j] = mem[r][j];
      end
      for (int j = 0; j < C; j++) begin
        int x, m, p, d1, d2;
        x = pix[j];
        m = mem[r][j];
        if (r > 0 && j > 0) p = (mem[r-1][j] + exp_m[j-1]) / 2;
        else if (r > 0)     p = mem[r-1][j];
        else if (j > 0)     p = exp_m[j-1];
        else                p = m;
        d1 = (x > m) ? x - m : m - x;
        d2 = (x > p) ? x - p : p - x;
        e1[j] = d1 >= th1;
        e2[j] = d2 >= th2;
        exp_m[j] = !e1[j] ? pixel_t'(m) : (!e2[j] ? pixel_t'(p) : pixel_t'(x));
        if (!e1[j]) n_inter++; else if (!e2[j]) n_intra++; else n_out++;
      end
      #1;
      for (int j = 0; j < C; j++) begin
        checks++;
        if (m_new[j] != exp_m[j]) begin
          failures++;
          if (failures < 10) $display("row %0d col %0d: m_new=%0d exp %0d", r, j, m_new[j], exp_m[j]);
        end
      end
      load = 1;
      @(negedge clk);
      load = 0;
      checks++;
      if (flag1_q != e1 || flag2_q != e2 || flag_and_q != (e1 & e2)) begin
        failures++;
        $display("row %0d: held flags wrong", r);
      end
      for (int j = 0; j < C; j++) begin
        checks++;
        if (pix_q[j] != pix[j]) begin failures++; $display("pix_q col %0d wrong", j); end
        mem[r][j] = exp_m[j];
      end
      // Values change without load: held outputs must not.
      for (int j = 0; j < C; j++) pix[j] = ~pix[j];
      @(negedge clk);
      checks++;
      if (flag1_q != e1 || flag2_q != e2) begin failures++; $display("row %0d: flags not held", r); end
    end
  endtask

  initial begin
    for (int r = 0; r < R; r++) for (int j = 0; j < C; j++) mem[r][j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    th1 = 8'd4; th2 = 8'd4;
    frame(40, 3);
    frame(40, 6);
    frame(100, 40);
    th1 = 8'd0; th2 = 8'd8;
    frame(90, 10);
    th1 = 8'd6; th2 = 8'd0;
    frame(60, 20);
    checks++;
    if (n_inter == 0 || n_intra == 0 || n_out == 0) begin
      failures++;
      $display("a decision path was never taken: %0d %0d %0d", n_inter, n_intra, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
