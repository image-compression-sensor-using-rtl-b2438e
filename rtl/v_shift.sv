// v_shift: vertical shift register that selects one row.
//
// A one-hot pointer over ROWS rows. `start` puts the token on row 0; each
// `step` moves it one row down; a step from the last row empties the
// register, so no row is selected between frames. `start` wins over `step`.
// The sensor has two of these, one for the photodiode array and one for the
// memory, driven with the same controls. The original sensor names the block; its
// one-hot form and controls are this design's choice.
module v_shift #(
  parameter int unsigned ROWS = sensor_pkg::N_ROWS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            step,
  output logic [ROWS-1:0] sel,
  output logic            last     // the last row is selected
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sel <= '0;
    else if (start) sel <= ROWS'(1);
    else if (step)  sel <= sel << 1;
  end

  assign last = sel[ROWS-1];

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel))
    else $error("v_shift: more than one row selected");

endmodule
