// address_encoder: turns a one-hot select vector into a binary address.
//
// Used for the column address of each output pixel (from the selects of the
// horizontal shift register) and for the row address (from the vertical
// shift register). `valid` is high when a line is selected; with none
// selected the address is zero. Combinational. The original sensor names the
// block and its "address data" output; the binary code is this design's
// choice.
module address_encoder #(
  parameter int unsigned N  = sensor_pkg::N_COLS,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  onehot,
  output logic [AW-1:0] addr,
  output logic          valid
);

  always_comb begin
    addr = '0;
    for (int i = 0; i < N; i++)
      if (onehot[i]) addr |= AW'(i);
    valid = |onehot;
  end

endmodule
