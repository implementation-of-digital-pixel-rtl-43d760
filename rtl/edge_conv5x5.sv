// edge_conv5x5: one kernel position of local feature extraction.
//
// Convolves a 5x5 pixel patch with the four directional kernels, takes the
// magnitude of each of the four gradient values and selects the largest one
// and its direction. The kernels hold -1/0/+1, so each tap adds, subtracts or
// skips a pixel; no multiplier is needed. On a tie the direction that comes
// first in the order horizontal, -45 degree, vertical, +45 degree wins.
// Purely combinational. Convolution, the maximum gradient value and the edge
// direction are from the design description; taking magnitudes and the tie
// rule are this design's choices.
module edge_conv5x5
  import dps_pkg::*;
(
  input  pix_t     patch [KSIZE][KSIZE],
  input  coef_t    kern  [NDIR][KSIZE][KSIZE],
  output lfe_res_t res
);

  mag_t mag [NDIR];

  always_comb begin
    logic signed [GRAD_W-1:0] acc;
    for (int d = 0; d < NDIR; d++) begin
      acc = '0;
      for (int r = 0; r < KSIZE; r++)
        for (int c = 0; c < KSIZE; c++)
          unique case (kern[d][r][c])
            2'sd1:   acc = acc + $signed({{(GRAD_W-PIX_W){1'b0}}, patch[r][c]});
            -2'sd1:  acc = acc - $signed({{(GRAD_W-PIX_W){1'b0}}, patch[r][c]});
            default: acc = acc;
          endcase
      mag[d] = acc[GRAD_W-1] ? MAG_W'(-acc) : MAG_W'(acc);
    end
  end

  always_comb begin
    res.grad = mag[0];
    res.dir  = DIR_H;
    for (int d = 1; d < NDIR; d++)
      if (mag[d] > res.grad) begin
        res.grad = mag[d];
        res.dir  = dir_e'(d);
      end
  end

endmodule
