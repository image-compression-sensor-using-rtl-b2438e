// h_shift_stage: one column stage of the skipping horizontal shift register.
//
// When the column's flag_and is high the token arriving on hin is stored in
// the stage's flip-flop for one clock; the stored token drives `select`, which
// puts the column's pixel value on the output line, and is passed on through
// next_hin. When flag_and is low the stage is bypassed: hin goes straight to
// next_hin in the same cycle and select stays low. This is the two-path
// stage of the original skipping shift register; the two non-overlapping
// shift clocks of the original are replaced by one clock edge.
module h_shift_stage (
  input  logic clk,
  input  logic rst_n,
  input  logic flag_and,
  input  logic hin,
  output logic select,
  output logic next_hin
);

  logic q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= flag_and && hin;
  end

  assign select   = q;
  assign next_hin = flag_and ? q : hin;

endmodule
