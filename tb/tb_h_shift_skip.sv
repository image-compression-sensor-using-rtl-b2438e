// tb_h_shift_skip: for random column flag patterns (including none and all
// columns flagged), a hin token must select exactly the flagged columns, in
// column order, one per cycle in the cycles right after hin, and row_done
// must be high in the cycle of the last select (or in the hin cycle when no
// column is flagged) and at no other time.
module tb_h_shift_skip;

  localparam int unsigned C = 64;

  logic         clk = 0, rst_n = 0, hin = 0;
  logic [C-1:0] flag_and = '0, select;
  logic         row_done;
  int           checks = 0, failures = 0;

  h_shift_skip dut (.clk, .rst_n, .hin, .flag_and, .select, .row_done);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic scan(logic [C-1:0] f);
    int cols [$];
    for (int j = 0; j < C; j++) if (f[j]) cols.push_back(j);
    @(negedge clk);
    flag_and = f;
    hin = 1;
    #1;
    checks++;
    if (select != 0 || row_done != (cols.size() == 0)) begin
      failures++;
      $display("hin cycle: select=%h row_done=%0b k=%0d", select, row_done, cols.size());
    end
    @(negedge clk);
    hin = 0;
    #1;
    foreach (cols[i]) begin
      checks++;
      if (select != (C'(1) << cols[i]) || row_done != (i == cols.size() - 1)) begin
        failures++;
        if (failures < 10)
          $display("step %0d: select=%h exp col %0d, row_done=%0b", i, select, cols[i], row_done);
      end
      @(negedge clk);
      #1;
    end
    checks++;
    if (select != 0 || row_done) begin
      failures++;
      $display("token did not leave: select=%h row_done=%0b", select, row_done);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    scan('0);
    scan('1);
    scan(C'(1));
    scan(C'(1) << (C - 1));
    for (int k = 0; k < 200; k++) begin
      logic [C-1:0] f;
      for (int j = 0; j < C; j++) f[j] = ($urandom_range(99) < (k % 100));
      scan(f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
