// tb_address_encoder: every one-hot input of a 64-line encoder gives its
// index, and no selected line gives valid low.
module tb_address_encoder;

  logic [63:0] onehot;
  logic [5:0]  addr;
  logic        valid;
  int          checks = 0, failures = 0;

  address_encoder dut (.onehot, .addr, .valid);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    onehot = '0;
    #1;
    checks++;
    if (valid !== 1'b0 || addr != 0) begin failures++; $display("empty input wrong"); end
    for (int i = 0; i < 64; i++) begin
      onehot = 64'(1) << i;
      #1;
      checks++;
      if (!valid || int'(addr) != i) begin
        failures++;
        $display("line %0d: addr=%0d valid=%0b", i, addr, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
