// tb_column_readout: the selected column's value appears on the output line;
// nothing selected gives zero and valid low.
module tb_column_readout;
  import sensor_pkg::*;

  logic [63:0] select;
  pixel_t      pix [64];
  pixel_t      data;
  logic        valid;
  int          checks = 0, failures = 0;

  column_readout dut (.select, .pix, .data, .valid);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int j = 0; j < 64; j++) pix[j] = pixel_t'($urandom_range(255));
      select = '0;
      #1;
      checks++;
      if (valid || data != 0) begin failures++; $display("idle line not zero"); end
      for (int j = 0; j < 64; j++) begin
        select = 64'(1) << j;
        #1;
        checks++;
        if (!valid || data != pix[j]) begin
          failures++;
          if (failures < 10) $display("col %0d: data=%0d exp %0d", j, data, pix[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
