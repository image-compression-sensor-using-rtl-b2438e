// comp_circuit: inter- and intra-frame decision of one pixel.
//
// Inter-frame step: the present pixel value x is compared with the value
// held for this pixel in the memory, Cm. flag1 is high when |x - Cm| >= th1.
// Intra-frame step: x is compared with the predicted value P_D from the
// average circuit. flag2 is high when |x - P_D| >= th2.
//
// The pixel is output only when both flags are high (flag_and). The memory
// value after this frame, m_new, follows the original method:
//   flag1 low             -> memory unchanged (m_old), output skipped
//   flag1 high, flag2 low -> memory gets the predicted value, output skipped
//   both high             -> memory gets the present value, pixel output
// The comparisons use ">=" for a high flag, as the flow chart prints; with
// th1 = 0 every pixel passes the inter-frame step (intra-only operation) and
// with th2 = 0 every pixel passes the intra-frame step (inter-only).
//
// flag2 is produced for every pixel, also when flag1 is low, so that the
// intra-frame flags can be observed on their own.
//
// Purely combinational.
module comp_circuit
  import sensor_pkg::*;
(
  input  pixel_t x,         // present pixel value
  input  pixel_t m_old,     // memory value Cm(i,j) before this frame
  input  pixel_t p_d,       // predicted value from the average circuit
  input  pixel_t th1,       // inter-frame threshold
  input  pixel_t th2,       // intra-frame threshold
  output logic   flag1,
  output logic   flag2,
  output logic   flag_and,  // pixel is output
  output pixel_t m_new      // memory value after this frame
);

  always_comb begin
    flag1    = abs_diff(x, m_old) >= th1;
    flag2    = abs_diff(x, p_d) >= th2;
    flag_and = flag1 && flag2;
    if (!flag1)      m_new = m_old;
    else if (!flag2) m_new = p_d;
    else             m_new = x;
  end

endmodule
