// tb_workload_sweep: the two evaluations of the compression method, run on
// the full 64 x 64 sensor with a synthetic scene (a textured background and
// a textured block moving horizontally, with +-1 code of noise).
//
//   Threshold sweep: th1 in {0 (intra-only), 1, 2, 3, 4, 5}, each with th2 in
//   {0 (inter-only), 2, 4, 8, 16}; motion of 2 pixels per frame.
//   Frame-rate sweep: th1 = 3, th2 = 4 fixed; the same object speed seen at
//   1000, 500, 250, 125, 62 and 31 frames/s, i.e. 1, 2, 4, 8, 16 and 32
//   pixels of motion per frame.
//
// Every setting starts from reset and runs FRAMES frames. For each frame the
// output pixel count and the frame memory are compared with a reference
// model of the compression rules. The testbench prints the average ratio
// of output pixels and the PSNR of the memory image against the scene for
// every setting, and checks the trends the method is built for: a larger
// th2 outputs fewer pixels, adding the inter-frame step to intra-only
// operation outputs fewer pixels, a larger th1 outputs fewer pixels in
// inter-only operation, and a higher frame rate outputs fewer pixels.
// Note that at the same th1 the combined method is not always below
// inter-only: a skipped pixel whose memory takes the predicted value can be
// output in a later frame, where inter-only would have kept it exact.
module tb_workload_sweep;
  import sensor_pkg::*;

  localparam int unsigned R = N_ROWS;
  localparam int unsigned C = N_COLS;
  localparam int unsigned FRAMES = 6;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         frame_start = 1'b0;
  pixel_t       th1 = '0, th2 = '0;
  logic [R-1:0] pd_row_sel;
  pixel_t       pd_pixels [C];
  logic         pix_valid;
  pixel_t       pix_data;
  logic [5:0]   pix_row, pix_col;
  logic         row_flags_valid;
  logic [C-1:0] row_flag1, row_flag2;
  logic         busy, frame_done;

  image_compression_sensor dut (
    .clk, .rst_n, .frame_start, .th1, .th2, .pd_row_sel, .pd_pixels,
    .pix_valid, .pix_data, .pix_row, .pix_col,
    .row_flags_valid, .row_flag1, .row_flag2, .busy, .frame_done
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- scene
  pixel_t img [R][C];

  task automatic make_scene(int pos);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        int v, u;
        v = 40 + r + ((c * 3) % 17);                        // background
        u = (c - pos) % C;
        if (u < 0) u += C;
        if (r >= 16 && r < 48 && u < 20)                     // moving block
          v = 150 + ((u * 7 + r * 5) % 60);
        v += int'($urandom_range(2)) - 1;                    // noise
        img[r][c] = pixel_t'(v);
      end
  endtask

  always_comb begin
    for (int c = 0; c < C; c++) begin
      pd_pixels[c] = '0;
      for (int r = 0; r < R; r++)
        if (pd_row_sel[r]) pd_pixels[c] = img[r][c];
    end
  end

  // -------------------------------------------------------- reference model
  pixel_t ref_mem [R][C];
  int     exp_out;

  task automatic model_frame(pixel_t t1, pixel_t t2);
    exp_out = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        int x, m, p, d1, d2;
        x = img[r][c];
        m = ref_mem[r][c];
        if (r > 0 && c > 0) p = (ref_mem[r-1][c] + ref_mem[r][c-1]) / 2;
        else if (r > 0)     p = ref_mem[r-1][c];
        else if (c > 0)     p = ref_mem[r][c-1];
        else                p = m;
        d1 = (x > m) ? x - m : m - x;
        d2 = (x > p) ? x - p : p - x;
        if (d1 >= t1) begin
          if (d2 >= t2) begin
            ref_mem[r][c] = pixel_t'(x);
            exp_out++;
          end else begin
            ref_mem[r][c] = pixel_t'(p);
          end
        end
      end
  endtask

  int got_out = 0;
  bit done_seen = 0;
  always @(posedge clk) begin
    if (pix_valid) got_out++;
    if (frame_done) done_seen = 1;
  end

  // Runs one setting; returns average output ratio [%] and PSNR [dB] over
  // the frames after the first (the first is coded against a black memory).
  task automatic run_setting(pixel_t t1, pixel_t t2, int step, output real ratio, output real psnr);
    real sum_ratio = 0.0, sum_psnr = 0.0;
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) ref_mem[r][c] = '0;
    th1 = t1;
    th2 = t2;
    for (int f = 0; f < FRAMES; f++) begin
      real mse;
      make_scene(f * step);
      model_frame(t1, t2);
      got_out = 0;
      done_seen = 0;
      @(negedge clk);
      frame_start = 1'b1;
      @(negedge clk);
      frame_start = 1'b0;
      while (!done_seen) @(negedge clk);
      @(negedge clk);
      checks++;
      if (got_out != exp_out) begin
        failures++;
        $display("th1=%0d th2=%0d step=%0d frame %0d: %0d pixels out, expected %0d",
                 t1, t2, step, f, got_out, exp_out);
      end
      mse = 0.0;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          pixel_t m;
          m = dut.u_mem.mem[r][c*PIX_W +: PIX_W];
          checks++;
          if (m != ref_mem[r][c]) begin
            failures++;
            if (failures < 10) $display("memory mismatch r=%0d c=%0d", r, c);
          end
          mse += (real'(m) - real'(img[r][c])) ** 2;
        end
      mse /= real'(R * C);
      if (f > 0) begin
        sum_ratio += 100.0 * real'(got_out) / real'(R * C);
        sum_psnr  += (mse == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / mse);
      end
    end
    ratio = sum_ratio / real'(FRAMES - 1);
    psnr  = sum_psnr / real'(FRAMES - 1);
  endtask

  task automatic expect_less(string what, real a, real b);
    checks++;
    if (!(a < b)) begin
      failures++;
      $display("trend not met: %s (%0.2f %% vs %0.2f %%)", what, a, b);
    end
  endtask

  real ratio_tab [6][5];
  real fps_ratio [6];
  int  th2_set [5] = '{0, 2, 4, 8, 16};
  int  fps_set [6] = '{1000, 500, 250, 125, 62, 31};

  initial begin
    void'($urandom(2024));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    $display("threshold sweep (2 pixels of motion per frame)");
    for (int t1 = 0; t1 <= 5; t1++)
      for (int k = 0; k < 5; k++) begin
        real ratio, psnr;
        run_setting(pixel_t'(t1), pixel_t'(th2_set[k]), 2, ratio, psnr);
        ratio_tab[t1][k] = ratio;
        $display("  th1=%0d th2=%2d: output %6.2f %%  PSNR %5.2f dB", t1, th2_set[k], ratio, psnr);
      end

    $display("frame-rate sweep (th1=3, th2=4)");
    for (int k = 0; k < 6; k++) begin
      real ratio, psnr;
      run_setting(8'd3, 8'd4, 1 << k, ratio, psnr);
      fps_ratio[k] = ratio;
      $display("  %4d fps (%2d pixels/frame): output %6.2f %%  PSNR %5.2f dB",
               fps_set[k], 1 << k, ratio, psnr);
    end

    // Trends.
    for (int t1 = 0; t1 <= 5; t1++)
      expect_less("larger th2 outputs fewer", ratio_tab[t1][4], ratio_tab[t1][1]);
    for (int k = 1; k < 5; k++)
      expect_less("adding inter-frame prediction outputs fewer", ratio_tab[3][k], ratio_tab[0][k]);
    expect_less("larger th1 outputs fewer (inter-only)", ratio_tab[5][0], ratio_tab[1][0]);
    expect_less("1000 fps below 31 fps", fps_ratio[0], fps_ratio[5]);
    expect_less("250 fps below 62 fps", fps_ratio[2], fps_ratio[4]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
