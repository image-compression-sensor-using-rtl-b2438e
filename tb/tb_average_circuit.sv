// tb_average_circuit: exhaustive check of the predictor over all pairs of
// neighbour values, plus the three border cases. The expected value is
// floor((b + c) / 2) worked out in integer arithmetic.
module tb_average_circuit;
  import sensor_pkg::*;

  pixel_t m_b, m_c, m_d_old, p_d;
  logic   b_valid, c_valid;
  int     checks = 0, failures = 0;

  average_circuit dut (.m_b, .m_c, .b_valid, .c_valid, .m_d_old, .p_d);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int exp);
    #1;
    checks++;
    if (int'(p_d) != exp) begin
      failures++;
      if (failures < 10)
        $display("b=%0d c=%0d bv=%0b cv=%0b old=%0d: p=%0d exp %0d",
                 m_b, m_c, b_valid, c_valid, m_d_old, p_d, exp);
    end
  endtask

  initial begin
    for (int b = 0; b < 256; b++)
      for (int c = 0; c < 256; c++) begin
        m_b = pixel_t'(b); m_c = pixel_t'(c); m_d_old = pixel_t'(b ^ c);
        b_valid = 1; c_valid = 1;
        check((b + c) / 2);
      end
    for (int k = 0; k < 200; k++) begin
      int b, c, o;
      b = $urandom_range(255); c = $urandom_range(255); o = $urandom_range(255);
      m_b = pixel_t'(b); m_c = pixel_t'(c); m_d_old = pixel_t'(o);
      b_valid = 1; c_valid = 0; check(b);
      b_valid = 0; c_valid = 1; check(c);
      b_valid = 0; c_valid = 0; check(o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
