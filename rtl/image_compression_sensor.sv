// image_compression_sensor: digital core of a 64 x 64 image sensor that
// outputs only the pixels that neither the previous frame nor the
// neighbouring pixels predict well.
//
// For every pixel two predictions are tried in turn:
//   inter-frame  the value kept in the frame memory for this pixel
//                (conditional replenishment); if |x - Cm| < th1 the pixel is
//                skipped and its memory kept;
//   intra-frame  the mean of the memory values of the pixel above and the
//                pixel to the left; if |x - P| < th2 the pixel is skipped
//                and its memory set to the prediction.
// Otherwise the pixel value is output together with its row and column
// address, and the memory takes the present value.
//
// Structure (column-parallel, one processing circuit per column):
//   u_vshift_pd / u_vshift_mem  row selection for the pixel array and the
//                               memory
//   u_mem                       frame memory Cm
//   u_cols                      previous/present row values, average and
//                               comp circuits of all columns
//   u_hshift                    skipping horizontal shift register
//   u_readout, u_col_enc,       output line and address encoders
//   u_row_enc
//   u_ctrl                      row sequencing
//
// The photodiode array and the A/D converter are analog and lie outside
// this module: pd_row_sel selects a row of the array, and pd_pixels must
// carry that row's 8-bit pixel codes in the same cycle (it is sampled in the
// LOAD cycle of the row). Processing is done on the codes, where the chip
// works on analog voltages and converts only the output pixels.
//
// Timing: frame_start (while busy is low) starts a frame. Each row takes
// k + 2 cycles, k being the number of pixels it outputs; pix_valid marks the
// output pixels, one per cycle, in row-major order. frame_done pulses with
// the last row's end. th1 and th2 must be stable during a frame.
module image_compression_sensor
  import sensor_pkg::*;
#(
  parameter int unsigned ROWS = N_ROWS,
  parameter int unsigned COLS = N_COLS,
  localparam int unsigned RAW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CAW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            frame_start,
  input  pixel_t          th1,            // inter-frame threshold
  input  pixel_t          th2,            // intra-frame threshold
  // pixel array interface
  output logic [ROWS-1:0] pd_row_sel,     // one-hot row select of the array
  input  pixel_t          pd_pixels [COLS],
  // compressed output
  output logic            pix_valid,
  output pixel_t          pix_data,
  output logic [RAW-1:0]  pix_row,
  output logic [CAW-1:0]  pix_col,
  // flags of the row being scanned (valid while row_flags_valid is high)
  output logic            row_flags_valid,
  output logic [COLS-1:0] row_flag1,
  output logic [COLS-1:0] row_flag2,
  // status
  output logic            busy,
  output logic            frame_done
);

  logic            v_start, v_step, load, hin, row_done, last_row, row_valid;
  logic [ROWS-1:0] mem_row_sel;
  logic [COLS-1:0] flag_and_q, select;
  pixel_t          m_old [COLS];
  pixel_t          m_new [COLS];
  pixel_t          pix_q [COLS];

  timing_controller u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .frame_start (frame_start),
    .row_done    (row_done),
    .last_row    (last_row),
    .v_start     (v_start),
    .v_step      (v_step),
    .load        (load),
    .hin         (hin),
    .busy        (busy),
    .frame_done  (frame_done)
  );

  v_shift #(.ROWS(ROWS)) u_vshift_pd (
    .clk   (clk),
    .rst_n (rst_n),
    .start (v_start),
    .step  (v_step),
    .sel   (pd_row_sel),
    .last  (last_row)
  );

  v_shift #(.ROWS(ROWS)) u_vshift_mem (
    .clk   (clk),
    .rst_n (rst_n),
    .start (v_start),
    .step  (v_step),
    .sel   (mem_row_sel),
    .last  ()
  );

  frame_memory #(.ROWS(ROWS), .COLS(COLS)) u_mem (
    .clk   (clk),
    .rst_n (rst_n),
    .wl    (mem_row_sel),
    .we    (load),
    .wdata (m_new),
    .rdata (m_old)
  );

  column_array #(.COLS(COLS)) u_cols (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (load),
    .first_row  (pd_row_sel[0]),
    .th1        (th1),
    .th2        (th2),
    .pix        (pd_pixels),
    .m_old      (m_old),
    .m_new      (m_new),
    .pix_q      (pix_q),
    .flag1_q    (row_flag1),
    .flag2_q    (row_flag2),
    .flag_and_q (flag_and_q)
  );

  h_shift_skip #(.COLS(COLS)) u_hshift (
    .clk      (clk),
    .rst_n    (rst_n),
    .hin      (hin),
    .flag_and (flag_and_q),
    .select   (select),
    .row_done (row_done)
  );

  column_readout #(.COLS(COLS)) u_readout (
    .select (select),
    .pix    (pix_q),
    .data   (pix_data),
    .valid  (pix_valid)
  );

  address_encoder #(.N(COLS)) u_col_enc (
    .onehot (select),
    .addr   (pix_col),
    .valid  ()
  );

  address_encoder #(.N(ROWS)) u_row_enc (
    .onehot (pd_row_sel),
    .addr   (pix_row),
    .valid  (row_valid)
  );

  // Flags of the current row are held from the end of its LOAD cycle until
  // the next LOAD; they are reported while the row is being scanned.
  assign row_flags_valid = busy && row_valid && !load;

endmodule
