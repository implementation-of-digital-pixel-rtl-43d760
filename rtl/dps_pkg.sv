// dps_pkg: types and constants shared by the motion-feature-extraction pipeline.
//
// The pipeline reads a frame from a digital-pixel-sensor (DPS) array, filters it
// with four 5x5 directional edge kernels, keeps the strongest direction per pixel,
// thresholds it into significant edge maps, merges those into one edge map and
// compares successive maps to find motion. This package holds what more than one
// stage needs: the pixel and gradient widths, the readout geometry (four-row
// groups, 4x8 blocks, 8x8 LFE windows, 5x5 kernels), the direction encoding and
// the per-pixel result of a local-feature-extraction (LFE) circuit.
//
// From the design description: 5x5 kernels, four-row groups, 4x8 blocks joined
// into 8x8 blocks, the four directions and their order (horizontal, -45 degree,
// vertical, +45 degree). Own choices: 8-bit pixels, kernel coefficients limited
// to -1/0/+1 (the only values the kernels use), the gradient width that holds
// the largest possible sum of 25 such taps.
package dps_pkg;

  localparam int unsigned PIX_W      = 8;   // pixel value width
  localparam int unsigned KSIZE      = 5;   // kernel is KSIZE x KSIZE
  localparam int unsigned GROUP_ROWS = 4;   // pixel rows per readout group
  localparam int unsigned BLK_COLS   = 8;   // columns in one readout block
  localparam int unsigned WIN        = 2 * GROUP_ROWS; // LFE window side (8x8)
  localparam int unsigned OUT_SIDE   = WIN - KSIZE + 1; // kernel positions per side (4)
  localparam int unsigned NDIR       = 4;

  // Signed gradient: 25 taps of +/-255 need 14 bits plus sign headroom.
  localparam int unsigned GRAD_W     = 15;
  // Magnitude of a gradient: |sum| <= 25*255 = 6375 < 2^13.
  localparam int unsigned MAG_W      = 13;

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [MAG_W-1:0]  mag_t;

  // Edge directions, in the order the kernels are numbered.
  typedef enum logic [1:0] {
    DIR_H    = 2'd0,   // horizontal edge
    DIR_M45  = 2'd1,   // -45 degree edge
    DIR_V    = 2'd2,   // vertical edge
    DIR_P45  = 2'd3    // +45 degree edge
  } dir_e;

  // Kernel coefficient: 2-bit signed, -1, 0 or +1.
  typedef logic signed [1:0] coef_t;
  typedef coef_t kernel_t [KSIZE][KSIZE];

  // Result of one kernel position: largest gradient magnitude and its direction.
  typedef struct packed {
    mag_t grad;
    dir_e dir;
  } lfe_res_t;

  // Default kernel coefficient, as printed in the kernel drawings:
  // horizontal: row 1 all +1, row 3 all -1;
  // vertical:   column 1 all +1, column 3 all -1;
  // -45 degree and +45 degree: five +1 and five -1 on either side of a diagonal.
  function automatic coef_t default_coef(input int unsigned d, input int unsigned r,
                                         input int unsigned c);
    coef_t k;
    k = 2'sd0;
    unique case (d)
      0: begin
        if (r == 1) k = 2'sd1;
        else if (r == 3) k = -2'sd1;
      end
      1: begin
        unique case ({r[2:0], c[2:0]})
          {3'd0, 3'd1}, {3'd1, 3'd2}, {3'd1, 3'd3}, {3'd2, 3'd3}, {3'd3, 3'd4}: k = 2'sd1;
          {3'd1, 3'd0}, {3'd2, 3'd1}, {3'd3, 3'd1}, {3'd3, 3'd2}, {3'd4, 3'd3}: k = -2'sd1;
          default: k = 2'sd0;
        endcase
      end
      2: begin
        if (c == 1) k = 2'sd1;
        else if (c == 3) k = -2'sd1;
      end
      default: begin
        // mirror image of the -45 degree kernel (column c -> 4-c)
        unique case ({r[2:0], c[2:0]})
          {3'd0, 3'd3}, {3'd1, 3'd2}, {3'd1, 3'd1}, {3'd2, 3'd1}, {3'd3, 3'd0}: k = 2'sd1;
          {3'd1, 3'd4}, {3'd2, 3'd3}, {3'd3, 3'd3}, {3'd3, 3'd2}, {3'd4, 3'd1}: k = -2'sd1;
          default: k = 2'sd0;
        endcase
      end
    endcase
    return k;
  endfunction

endpackage
