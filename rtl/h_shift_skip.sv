// h_shift_skip: horizontal shift register with the skipping function.
//
// A chain of COLS h_shift_stage cells, column 0 first. A one-cycle token on
// `hin` starts the scan of a row. Columns whose flag_and is low are bypassed
// combinationally, so the token jumps in one cycle to the next column that
// must be output, where it is held for exactly one clock and raises that
// column's `select`. Only the pixels to be output therefore cost time: with
// k flagged columns the selects appear in the k cycles after the hin cycle,
// in column order, one per cycle.
//
// row_done is the token leaving the last column (next_hin of the last
// stage). It is high in the cycle of the last select, or in the hin cycle
// itself when no column is flagged. flag_and must stay stable during a scan.
module h_shift_skip #(
  parameter int unsigned COLS = sensor_pkg::N_COLS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            hin,
  input  logic [COLS-1:0] flag_and,
  output logic [COLS-1:0] select,
  output logic            row_done
);

  for (genvar j = 0; j < COLS; j++) begin : g_stage
    logic h_in;   // token arriving at this column
    logic nh;     // token leaving this column
    if (j == 0) begin : g_first
      assign h_in = hin;
    end else begin : g_next
      assign h_in = g_stage[j-1].nh;
    end
    h_shift_stage u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .flag_and (flag_and[j]),
      .hin      (h_in),
      .select   (select[j]),
      .next_hin (nh)
    );
  end

  assign row_done = g_stage[COLS-1].nh;

  a_one_select: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(select))
    else $error("h_shift_skip: more than one column selected");

endmodule
