// column_array: column-parallel pixel processing of one row.
//
// Every column owns an average circuit and a comp circuit. All columns of the
// selected row are decided in the same clock cycle from
//   pix       the present pixel values of the row,
//   m_old     the memory values of the row (from the frame memory),
//   prev_row  the "previous row capacitors": the memory values of the row
//             above, as they were left after that row was processed,
// and the "present row capacitor" of the left neighbour, which is that
// column's new memory value m_new in the same row. The prediction of column j
// therefore depends on the decision of column j-1: the row is a ripple chain
// from column 0 to column COLS-1. This makes M_B and M_C exactly the memory
// values named in the original method's definition.
//
// On `load` (one cycle per row) the previous-row registers take the row's
// new memory values, and the row's pixel values and flags are held for the
// horizontal skip-scan that follows. m_new is combinational and is written
// into the frame memory by the same `load` edge.
//
// first_row marks row 0, which has no row above it.
module column_array
  import sensor_pkg::*;
#(
  parameter int unsigned COLS = N_COLS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic            first_row,
  input  pixel_t          th1,
  input  pixel_t          th2,
  input  pixel_t          pix   [COLS],
  input  pixel_t          m_old [COLS],
  output pixel_t          m_new [COLS],
  output pixel_t          pix_q [COLS],   // held pixel values of the row
  output logic [COLS-1:0] flag1_q,
  output logic [COLS-1:0] flag2_q,
  output logic [COLS-1:0] flag_and_q
);

  pixel_t          prev_row [COLS];
  pixel_t          p_d      [COLS];
  logic [COLS-1:0] flag1, flag2, flag_and;

  for (genvar j = 0; j < COLS; j++) begin : g_col
    pixel_t m_left;   // present row capacitor of column j-1
    pixel_t m_out;    // new memory value of this column
    if (j == 0) begin : g_edge
      assign m_left = '0;
    end else begin : g_inner
      assign m_left = g_col[j-1].m_out;
    end
    assign m_new[j] = m_out;

    average_circuit u_avg (
      .m_b     (prev_row[j]),
      .m_c     (m_left),
      .b_valid (!first_row),
      .c_valid (j != 0),
      .m_d_old (m_old[j]),
      .p_d     (p_d[j])
    );

    comp_circuit u_comp (
      .x        (pix[j]),
      .m_old    (m_old[j]),
      .p_d      (p_d[j]),
      .th1      (th1),
      .th2      (th2),
      .flag1    (flag1[j]),
      .flag2    (flag2[j]),
      .flag_and (flag_and[j]),
      .m_new    (m_out)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < COLS; j++) begin
        prev_row[j] <= '0;
        pix_q[j]    <= '0;
      end
      flag1_q    <= '0;
      flag2_q    <= '0;
      flag_and_q <= '0;
    end else if (load) begin
      for (int j = 0; j < COLS; j++) begin
        prev_row[j] <= m_new[j];
        pix_q[j]    <= pix[j];
      end
      flag1_q    <= flag1;
      flag2_q    <= flag2;
      flag_and_q <= flag_and;
    end
  end

endmodule
