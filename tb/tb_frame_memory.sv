// tb_frame_memory: rows read as zero until written; a written row reads back
// what was written, through its word line, without disturbing other rows;
// a write needs we; reset makes every row read as zero again.
module tb_frame_memory;
  import sensor_pkg::*;

  localparam int unsigned R = 64, C = 64;

  logic         clk = 0, rst_n = 0, we = 0;
  logic [R-1:0] wl = '0;
  pixel_t       wdata [C];
  pixel_t       rdata [C];
  pixel_t       model [R][C];
  bit           valid [R];
  int           checks = 0, failures = 0;

  frame_memory dut (.clk, .rst_n, .wl, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row(int r);
    wl = R'(1) << r;
    we = 0;
    #1;
    for (int j = 0; j < C; j++) begin
      checks++;
      if (rdata[j] != (valid[r] ? model[r][j] : pixel_t'(0))) begin
        failures++;
        if (failures < 10) $display("row %0d col %0d: got %0d", r, j, rdata[j]);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < R; r++) valid[r] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < R; r++) check_row(r);
    for (int k = 0; k < 500; k++) begin
      int r;
      bit w;
      @(negedge clk);
      r = $urandom_range(R - 1);
      w = $urandom_range(3) != 0;
      for (int j = 0; j < C; j++) wdata[j] = pixel_t'($urandom_range(255));
      wl = R'(1) << r;
      we = w;
      if (w) begin
        valid[r] = 1;
        for (int j = 0; j < C; j++) model[r][j] = wdata[j];
      end
      @(negedge clk);
      we = 0;
      check_row($urandom_range(R - 1));
      check_row(r);
    end
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < R; r++) valid[r] = 0;
    for (int r = 0; r < R; r++) check_row(r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
