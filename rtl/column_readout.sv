// column_readout: the pixel output line shared by all columns.
//
// Each column connects its held pixel value to the common output line when
// the horizontal shift register selects it, the "pixel value out" switch
// of the column circuit. At most one column is selected at a time; the line
// carries zero when none is. Combinational. The original switches an analog
// column line; the OR of the selected 8-bit value is this design's form.
module column_readout
  import sensor_pkg::*;
#(
  parameter int unsigned COLS = N_COLS
) (
  input  logic [COLS-1:0] select,
  input  pixel_t          pix [COLS],
  output pixel_t          data,
  output logic            valid
);

  always_comb begin
    data = '0;
    for (int j = 0; j < COLS; j++)
      if (select[j]) data |= pix[j];
    valid = |select;
  end

endmodule
