// tb_v_shift: the row token starts on row 0, steps one row per step, holds
// without step, leaves the register after the last row, and a start
// restarts it from row 0.
module tb_v_shift;

  logic        clk = 0, rst_n = 0, start = 0, step = 0;
  logic [63:0] sel;
  logic        last;
  int          checks = 0, failures = 0;

  v_shift dut (.clk, .rst_n, .start, .step, .sel, .last);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_row(int r);
    logic [63:0] e;
    e = (r < 0) ? '0 : 64'(1) << r;
    checks++;
    if (sel != e || last != (r == 63)) begin
      failures++;
      $display("expected row %0d, sel=%h last=%0b", r, sel, last);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    expect_row(-1);
    rst_n = 1;
    start = 1; @(negedge clk); start = 0;
    expect_row(0);
    for (int r = 1; r < 64; r++) begin
      @(negedge clk);            // no step: hold
      expect_row(r - 1);
      step = 1; @(negedge clk); step = 0;
      expect_row(r);
    end
    step = 1; @(negedge clk); step = 0;
    expect_row(-1);
    step = 1; @(negedge clk); step = 0;
    expect_row(-1);
    start = 1; @(negedge clk); start = 0;
    step = 1; @(negedge clk); step = 0;
    expect_row(1);
    start = 1; step = 1; @(negedge clk); start = 0; step = 0;
    expect_row(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
