// kernel_prog_ctrl: holds the four programmable 5x5 edge-filter kernels.
//
// The local-feature-extraction circuits all use the same four kernels, which
// this block stores and drives to them in parallel (kern[d][r][c], d in the
// order horizontal, -45 degree, vertical, +45 degree). After reset the kernels
// are the directional edge kernels of the design description (see
// dps_pkg::default_coef). A host can overwrite any coefficient, one per clock:
// kp_we with kp_dir/kp_row/kp_col selecting the tap and kp_coef its new value.
// Coefficients are -1, 0 or +1; a write of the unused code 2'b10 (-2) or to a
// row or column above 4 is ignored. A write takes effect on the next clock.
// That the kernels are programmable is taken from the block named kernel
// program control in the architecture drawing; its port and the coefficient
// range are this design's choices.
module kernel_prog_ctrl
  import dps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       kp_we,
  input  dir_e       kp_dir,
  input  logic [2:0] kp_row,
  input  logic [2:0] kp_col,
  input  coef_t      kp_coef,
  output coef_t      kern [NDIR][KSIZE][KSIZE]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int d = 0; d < NDIR; d++)
        for (int r = 0; r < KSIZE; r++)
          for (int c = 0; c < KSIZE; c++)
            kern[d][r][c] <= default_coef(d, r, c);
    end else if (kp_we && kp_row < 3'(KSIZE) && kp_col < 3'(KSIZE) && kp_coef != -2'sd2) begin
      kern[kp_dir][kp_row][kp_col] <= kp_coef;
    end
  end

endmodule
