// dps_frame_mem: the digital side of the digital-pixel-sensor (DPS) array.
//
// In a DPS every pixel converts its own photo signal to a number and keeps it
// in an in-pixel memory. This module is that memory for an IMG_ROWS x IMG_COLS
// array (100 x 100 by default) together with its block readout path. The
// analog front end and per-pixel converter are not modelled: converted values
// arrive one pixel per clock on the write port (pix_we/pix_row/pix_col/pix_data).
//
// Readout: the rows are grouped four at a time. For the column step given on
// rd_step, every group g drives its 4x8 block, rows 4g..4g+3 and columns
// 4*rd_step .. 4*rd_step+7, onto blk[g] at the same time, combinationally.
// Consecutive steps overlap by four columns so that a 5x5 kernel can be placed
// at every column of the step. The grouping and the 4x8 block size follow the
// design description; the stride of four columns, the write port and the 8-bit
// pixel value are this design's choices.
module dps_frame_mem
  import dps_pkg::*;
#(
  parameter int unsigned IMG_ROWS = 100,
  parameter int unsigned IMG_COLS = 100,
  localparam int unsigned NGROUP  = IMG_ROWS / GROUP_ROWS,
  localparam int unsigned NSTEP   = IMG_COLS / GROUP_ROWS - 1,
  localparam int unsigned RW      = $clog2(IMG_ROWS),
  localparam int unsigned CW      = $clog2(IMG_COLS),
  localparam int unsigned SW      = (NSTEP > 1) ? $clog2(NSTEP) : 1
) (
  input  logic          clk,
  // pixel write port (from the per-pixel converters)
  input  logic          pix_we,
  input  logic [RW-1:0] pix_row,
  input  logic [CW-1:0] pix_col,
  input  pix_t          pix_data,
  // block readout
  input  logic [SW-1:0] rd_step,
  output pix_t          blk [NGROUP][GROUP_ROWS][BLK_COLS]
);

  pix_t mem [IMG_ROWS][IMG_COLS];

  always_ff @(posedge clk) begin
    if (pix_we && 32'(pix_row) < IMG_ROWS && 32'(pix_col) < IMG_COLS)
      mem[pix_row][pix_col] <= pix_data;
  end

  // The block's first column; rd_step never exceeds NSTEP-1, so the block
  // stays inside the array (4*(NSTEP-1)+7 = IMG_COLS-1 when IMG_COLS is a
  // multiple of four).
  logic [CW+1:0] col0;
  assign col0 = (CW+2)'(rd_step) << 2;

  always_comb begin
    for (int g = 0; g < NGROUP; g++)
      for (int r = 0; r < GROUP_ROWS; r++)
        for (int c = 0; c < BLK_COLS; c++)
          blk[g][r][c] = mem[g*GROUP_ROWS + r][CW'(col0 + (CW+2)'(c))];
  end

endmodule
