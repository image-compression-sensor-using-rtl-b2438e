// average_circuit: intra-frame predictor of one column.
//
// Computes the predicted value of pixel D from its two already processed
// neighbours, B above it and C to its left:  P_D = (M_B + M_C) / 2, where
// M_B and M_C are the memory values (reconstructed values) of those pixels.
// The sum is formed at 9 bits and halved by dropping the least significant
// bit, so the result is rounded down.
//
// At the image border a neighbour is missing. Then the one neighbour that
// exists is the prediction, and at the top-left pixel, which has neither,
// the pixel's own memory value from the previous frame is used. The border
// rule and the rounding are this design's choices; the averaging itself is
// the original method's definition.
//
// Purely combinational.
module average_circuit
  import sensor_pkg::*;
(
  input  pixel_t m_b,       // memory value of the pixel above (row i-1)
  input  pixel_t m_c,       // memory value of the pixel to the left (column j-1)
  input  logic   b_valid,   // the pixel above exists
  input  logic   c_valid,   // the pixel to the left exists
  input  pixel_t m_d_old,   // own memory value, used when neither exists
  output pixel_t p_d        // predicted value of D
);

  logic [PIX_W:0] sum;

  always_comb begin
    sum = {1'b0, m_b} + {1'b0, m_c};
    unique case ({b_valid, c_valid})
      2'b11:   p_d = PIX_W'(sum >> 1);
      2'b10:   p_d = m_b;
      2'b01:   p_d = m_c;
      default: p_d = m_d_old;
    endcase
  end

endmodule
