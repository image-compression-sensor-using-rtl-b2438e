// tb_image_compression_sensor: end-to-end test of the compression sensor at
// its full 64 x 64 size.
//
// A behavioural pixel array in this testbench returns the row selected by
// pd_row_sel. The scene is the one used to evaluate the chip: a bright
// letter "T" moving horizontally over a dark background, with +-1 code of
// noise. A reference model computes, for every frame, the expected flags,
// the expected output pixel stream (row, column, value, in order) and the
// expected memory contents, straight from the compression rules:
//   flag1 = |x - M| >= th1, flag2 = |x - P| >= th2, P = (M_up + M_left) / 2,
//   output when both flags are high, memory kept / set to P / set to x.
// Frames are run with normal thresholds, intra-only (th1 = 0), inter-only
// (th2 = 0), output-everything (both 0) and output-nothing (both 255). The
// frame length is checked against sum over rows of (k + 2) cycles. Each
// mechanism must occur at least once: inter-frame skip, intra-frame skip,
// output, a row with no output, a row with every pixel output, a border
// prediction, and a frame_start ignored while busy.
module tb_image_compression_sensor;
  import sensor_pkg::*;

  localparam int unsigned R = N_ROWS;
  localparam int unsigned C = N_COLS;
  localparam int unsigned NFRAMES = 9;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            frame_start = 1'b0;
  pixel_t          th1 = '0, th2 = '0;
  logic [R-1:0]    pd_row_sel;
  pixel_t          pd_pixels [C];
  logic            pix_valid;
  pixel_t          pix_data;
  logic [5:0]      pix_row, pix_col;
  logic            row_flags_valid;
  logic [C-1:0]    row_flag1, row_flag2;
  logic            busy, frame_done;

  image_compression_sensor dut (
    .clk, .rst_n, .frame_start, .th1, .th2, .pd_row_sel, .pd_pixels,
    .pix_valid, .pix_data, .pix_row, .pix_col,
    .row_flags_valid, .row_flag1, .row_flag2, .busy, .frame_done
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- scene
  pixel_t img [R][C];

  function automatic bit in_t(int r, int c, int x0);
    // "T": top bar rows 8..15, columns x0..x0+29; stem rows 16..55, x0+11..x0+18
    if (r >= 8 && r < 16 && c >= x0 && c < x0 + 30) return 1;
    if (r >= 16 && r < 56 && c >= x0 + 11 && c < x0 + 19) return 1;
    return 0;
  endfunction

  task automatic make_scene(int x0, int noise);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        int v;
        v = in_t(r, c, x0) ? 200 : 30 + (c / 8);
        if (noise != 0) v += int'($urandom_range(2)) - 1;
        img[r][c] = pixel_t'(v);
      end
  endtask

  // Behavioural pixel array: the selected row, in the same cycle.
  always_comb begin
    for (int c = 0; c < C; c++) begin
      pd_pixels[c] = '0;
      for (int r = 0; r < R; r++)
        if (pd_row_sel[r]) pd_pixels[c] = img[r][c];
    end
  end

  // -------------------------------------------------------- reference model
  pixel_t ref_mem [R][C];
  bit     exp_f1 [R][C];
  bit     exp_f2 [R][C];
  int     exp_row_k [R];
  int     exp_q_r [$], exp_q_c [$];
  pixel_t exp_q_v [$];
  int     exp_cycles;
  int     n_inter_skip = 0, n_intra_skip = 0, n_out = 0;
  int     n_empty_row = 0, n_full_row = 0, n_border = 0, n_busy_start = 0;

  task automatic model_frame(pixel_t t1, pixel_t t2);
    exp_cycles = 0;
    for (int r = 0; r < R; r++) begin
      exp_row_k[r] = 0;
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
        exp_f1[r][c] = (d1 >= t1);
        exp_f2[r][c] = (d2 >= t2);
        if (!exp_f1[r][c]) begin
          n_inter_skip++;
        end else if (!exp_f2[r][c]) begin
          n_intra_skip++;
          ref_mem[r][c] = pixel_t'(p);
          if (r == 0 || c == 0) n_border++;
        end else begin
          n_out++;
          ref_mem[r][c] = pixel_t'(x);
          exp_row_k[r]++;
          exp_q_r.push_back(r);
          exp_q_c.push_back(c);
          exp_q_v.push_back(pixel_t'(x));
        end
      end
      if (exp_row_k[r] == 0) n_empty_row++;
      if (exp_row_k[r] == C) n_full_row++;
      exp_cycles += exp_row_k[r] + 2;
    end
  endtask

  // ------------------------------------------------------------ monitors
  int busy_cycles = 0;
  int got_pixels = 0;
  bit frame_seen_done = 0;
  int last_flag_row = -1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (busy) busy_cycles++;
      if (frame_done) frame_seen_done = 1;
      if (pix_valid) begin
        got_pixels++;
        checks++;
        if (exp_q_v.size() == 0) begin
          failures++;
          $display("unexpected output pixel r=%0d c=%0d v=%0d", pix_row, pix_col, pix_data);
        end else begin
          int er, ec;
          pixel_t ev;
          er = exp_q_r.pop_front();
          ec = exp_q_c.pop_front();
          ev = exp_q_v.pop_front();
          if (int'(pix_row) != er || int'(pix_col) != ec || pix_data != ev) begin
            failures++;
            if (failures < 10)
              $display("output mismatch: got r=%0d c=%0d v=%0d exp r=%0d c=%0d v=%0d",
                       pix_row, pix_col, pix_data, er, ec, ev);
          end
        end
      end
      if (row_flags_valid && int'(pix_row) != last_flag_row) begin
        last_flag_row = int'(pix_row);
        for (int c = 0; c < C; c++) begin
          checks++;
          if (row_flag1[c] != exp_f1[pix_row][c] || row_flag2[c] != exp_f2[pix_row][c]) begin
            failures++;
            if (failures < 10)
              $display("flag mismatch r=%0d c=%0d got %0b%0b exp %0b%0b", pix_row, c,
                       row_flag1[c], row_flag2[c], exp_f1[pix_row][c], exp_f2[pix_row][c]);
          end
        end
      end
    end
  end

  task automatic run_frame(pixel_t t1, pixel_t t2, bit poke_busy);
    @(negedge clk);
    th1 = t1;
    th2 = t2;
    model_frame(t1, t2);
    busy_cycles = 0;
    frame_seen_done = 0;
    last_flag_row = -1;
    frame_start = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
    if (poke_busy) begin
      repeat (50) @(negedge clk);
      frame_start = 1'b1;      // must be ignored: a frame is in progress
      @(negedge clk);
      frame_start = 1'b0;
      if (busy) n_busy_start++;
    end
    while (!frame_seen_done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("busy still high after frame_done");
    end
    checks++;
    if (busy_cycles != exp_cycles) begin
      failures++;
      $display("frame length %0d cycles, expected %0d", busy_cycles, exp_cycles);
    end
    checks++;
    if (exp_q_v.size() != 0) begin
      failures++;
      $display("%0d expected pixels not output", exp_q_v.size());
      exp_q_r.delete(); exp_q_c.delete(); exp_q_v.delete();
    end
    // Memory contents against the model.
    for (int r = 0; r < R; r++) begin
      for (int c = 0; c < C; c++) begin
        checks++;
        if (dut.u_mem.written[r] == 1'b0 ||
            dut.u_mem.mem[r][c*PIX_W +: PIX_W] != ref_mem[r][c]) begin
          failures++;
          if (failures < 10)
            $display("memory mismatch r=%0d c=%0d got %0d exp %0d", r, c,
                     dut.u_mem.mem[r][c*PIX_W +: PIX_W], ref_mem[r][c]);
        end
      end
    end
    $display("frame th1=%0d th2=%0d: %0d pixels out of %0d, %0d cycles",
             t1, t2, got_pixels, R * C, busy_cycles);
    got_pixels = 0;
  endtask

  initial begin
    void'($urandom(12345));
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) ref_mem[r][c] = '0;
    make_scene(4, 1);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Moving "T", normal thresholds.
    run_frame(8'd4, 8'd4, 1'b1);
    make_scene(8, 1);   run_frame(8'd4, 8'd4, 1'b0);
    make_scene(12, 1);  run_frame(8'd4, 8'd4, 1'b0);
    make_scene(16, 1);  run_frame(8'd3, 8'd6, 1'b0);
    // Intra-only (th1 = 0) and inter-only (th2 = 0).
    make_scene(20, 1);  run_frame(8'd0, 8'd4, 1'b0);
    make_scene(24, 1);  run_frame(8'd4, 8'd0, 1'b0);
    // Every pixel output, then nothing output on a still scene.
    make_scene(28, 1);  run_frame(8'd0, 8'd0, 1'b0);
    make_scene(28, 0);  run_frame(8'd255, 8'd255, 1'b0);
    make_scene(32, 0);  run_frame(8'd2, 8'd2, 1'b0);

    $display("mechanisms: inter_skip=%0d intra_skip=%0d output=%0d empty_rows=%0d full_rows=%0d border_pred=%0d busy_start=%0d",
             n_inter_skip, n_intra_skip, n_out, n_empty_row, n_full_row, n_border, n_busy_start);
    checks++; if (n_inter_skip == 0) begin failures++; $display("no inter-frame skip"); end
    checks++; if (n_intra_skip == 0) begin failures++; $display("no intra-frame skip"); end
    checks++; if (n_out == 0)        begin failures++; $display("no output pixel"); end
    checks++; if (n_empty_row == 0)  begin failures++; $display("no empty row"); end
    checks++; if (n_full_row == 0)   begin failures++; $display("no full row"); end
    checks++; if (n_border == 0)     begin failures++; $display("no border prediction"); end
    checks++; if (n_busy_start == 0) begin failures++; $display("no frame_start while busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
