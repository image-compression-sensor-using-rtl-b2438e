// timing_controller: row-by-row sequencing of one frame.
//
// A frame starts with a one-cycle frame_start pulse while the sensor is idle.
// Each row then takes two phases:
//   LOAD  one cycle. The selected row of pixel values and memory values is
//         processed by the column array; at the end of the cycle the new
//         memory values are written and the flags and pixel values are held.
//   SCAN  the skipping horizontal shift register is started with a hin
//         token in the first SCAN cycle and runs until the token leaves the
//         last column (row_done). One flagged pixel is output per cycle.
// On row_done the row shift registers step to the next row; after the last
// row frame_done pulses and the controller returns to IDLE.
//
// A row with k output pixels takes k + 2 cycles (k = 0 included), so a frame
// takes sum(k_i + 2) cycles after the frame_start cycle. The original design gives
// the order of operations (read a row, predict and compare in all columns,
// read out the flagged pixels with the shift register); the phases and
// their lengths are this design's choice.
module timing_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic frame_start,
  input  logic row_done,     // token has left the horizontal shift register
  input  logic last_row,     // the last row is selected
  output logic v_start,      // put the row token on row 0
  output logic v_step,       // move the row token to the next row
  output logic load,         // process the selected row
  output logic hin,          // start the horizontal scan
  output logic busy,
  output logic frame_done
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_HIN, S_SCAN} state_t;

  state_t state, state_nx;

  always_comb begin
    state_nx   = state;
    v_start    = 1'b0;
    v_step     = 1'b0;
    load       = 1'b0;
    hin        = 1'b0;
    frame_done = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (frame_start) begin
          v_start  = 1'b1;
          state_nx = S_LOAD;
        end
      end
      S_LOAD: begin
        load     = 1'b1;
        state_nx = S_HIN;
      end
      S_HIN, S_SCAN: begin
        hin      = (state == S_HIN);
        state_nx = S_SCAN;
        if (row_done) begin
          v_step = 1'b1;
          if (last_row) begin
            frame_done = 1'b1;
            state_nx   = S_IDLE;
          end else begin
            state_nx   = S_LOAD;
          end
        end
      end
      default: state_nx = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;
  end

  assign busy = (state != S_IDLE);

endmodule
