// frame_memory: the per-pixel memory Cm(i,j) of the sensor.
//
// Holds, for every pixel, the value the receiver is assumed to know: the last
// output value, or the predicted value that replaced it. A whole row is read
// and written at once, because all columns are processed in parallel. The
// row is chosen by a one-hot word-line vector from the memory's vertical
// shift register, as in the sensor floorplan; it is turned into a row index
// internally so that the array maps onto a RAM.
//
// Read is combinational (data of the selected row in the same cycle); write
// happens at the clock edge when `we` is high. A row that has not been
// written since reset reads as zero: one valid bit per row is cleared by
// reset, so the storage itself needs no reset. In the chip the memory is an
// analog capacitor cell; here it holds 8-bit codes.
module frame_memory
  import sensor_pkg::*;
#(
  parameter int unsigned ROWS = N_ROWS,
  parameter int unsigned COLS = N_COLS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [ROWS-1:0] wl,              // one-hot word line (row select)
  input  logic            we,
  input  pixel_t          wdata [COLS],
  output pixel_t          rdata [COLS]
);

  localparam int unsigned AW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned DW = COLS * PIX_W;

  logic [DW-1:0]   mem [ROWS];
  logic [ROWS-1:0] written;
  logic [AW-1:0]   addr;
  logic            any_wl;
  logic [DW-1:0]   wword;

  always_comb begin
    addr   = '0;
    any_wl = |wl;
    for (int r = 0; r < ROWS; r++)
      if (wl[r]) addr |= AW'(r);
    for (int j = 0; j < COLS; j++)
      wword[j*PIX_W +: PIX_W] = wdata[j];
  end

  always_ff @(posedge clk) begin
    if (we && any_wl) mem[addr] <= wword;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            written       <= '0;
    else if (we && any_wl) written[addr] <= 1'b1;
  end

  always_comb begin
    for (int j = 0; j < COLS; j++)
      rdata[j] = (any_wl && written[addr]) ? mem[addr][j*PIX_W +: PIX_W] : '0;
  end

  a_wl_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wl))
    else $error("frame_memory: more than one word line active");

endmodule
