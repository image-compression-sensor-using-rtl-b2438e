// tb_timing_controller: a stand-in for the shift registers answers hin with
// row_done after a random number k of output pixels (row_done in the hin
// cycle when k = 0). Checks the LOAD / hin / scan order of every row, the
// row steps, frame_done after the last row, the frame length of
// sum(k + 2) cycles, and that frame_start is ignored during a frame.
module tb_timing_controller;

  localparam int unsigned R = 64;

  logic clk = 0, rst_n = 0, frame_start = 0;
  logic row_done, last_row;
  logic v_start, v_step, load, hin, busy, frame_done;
  int   checks = 0, failures = 0;

  timing_controller dut (.clk, .rst_n, .frame_start, .row_done, .last_row,
                         .v_start, .v_step, .load, .hin, .busy, .frame_done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Row pointer, as a v_shift would keep it.
  int row = -1;
  always @(posedge clk) begin
    if (v_start) row <= 0;
    else if (v_step) row <= (row == R - 1) ? -1 : row + 1;
  end
  assign last_row = (row == R - 1);

  // Horizontal scan stand-in.
  int k_of_row [R];
  int remaining = -1;
  always_comb row_done = (hin && k_of_row[row < 0 ? 0 : row] == 0) || (!hin && remaining == 1);
  always @(posedge clk) begin
    if (hin) remaining <= k_of_row[row];
    else if (remaining > 0) remaining <= remaining - 1;
  end

  // Order check: a LOAD cycle must be followed by a hin cycle.
  logic prev_load = 0;
  int   loads = 0, hins = 0, steps = 0, cycles = 0;
  always @(posedge clk) begin
    prev_load <= load;
    if (busy) cycles++;
    if (load) loads++;
    if (hin) hins++;
    if (v_step) steps++;
    if (rst_n && (prev_load != hin)) begin
      checks++;
      failures++;
      $display("hin not right after load");
    end
  end

  task automatic run(bit poke);
    int exp_cycles = 0;
    for (int r = 0; r < R; r++) begin
      k_of_row[r] = (r % 7 == 0) ? 0 : int'($urandom_range(64));
      exp_cycles += k_of_row[r] + 2;
    end
    loads = 0; hins = 0; steps = 0; cycles = 0;
    @(negedge clk);
    frame_start = 1;
    #1;
    checks++;
    if (!v_start) begin failures++; $display("no v_start"); end
    @(negedge clk);
    frame_start = 0;
    if (poke) begin
      repeat (30) @(negedge clk);
      frame_start = 1;
      #1;
      checks++;
      if (v_start) begin failures++; $display("frame_start accepted while busy"); end
      @(negedge clk);
      frame_start = 0;
    end
    while (!frame_done) @(negedge clk);
    checks++;
    if (!last_row || !row_done) begin failures++; $display("frame_done not at last row"); end
    @(negedge clk);
    checks++;
    if (busy || loads != R || hins != R || steps != R || cycles != exp_cycles) begin
      failures++;
      $display("busy=%0b loads=%0d hins=%0d steps=%0d cycles=%0d exp %0d",
               busy, loads, hins, steps, cycles, exp_cycles);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (busy || load || hin) begin failures++; $display("not idle after reset"); end
    run(1);
    run(0);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
