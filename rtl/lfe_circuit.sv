// lfe_circuit: one local-feature-extraction (LFE) circuit.
//
// Each LFE circuit serves two neighbouring four-row groups of the pixel array.
// It joins the two 4x8 blocks it receives (upper group first) into an 8x8
// window. A 5x5 kernel fits in that window at 4x4 positions; in each clock
// the circuit handles the four positions of window row `phase` in parallel
// (edge_conv5x5 for each), so the whole window takes four clocks. For every
// position it delivers the largest directional gradient magnitude and its
// direction. Output is registered: res/out_valid/out_phase appear one clock
// after blk_hi/blk_lo/phase/in_valid.
//
// Position (phase, q) of the window with top-left pixel (4g, 4s) is centred
// on pixel (4g+phase+2, 4s+q+2) of the image. The two 4x8 inputs, the 8x8
// window and the 5x5 kernels follow the design description; doing one
// window row per clock is this design's choice.
module lfe_circuit
  import dps_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  logic [1:0] phase,
  input  pix_t     blk_hi [GROUP_ROWS][BLK_COLS],
  input  pix_t     blk_lo [GROUP_ROWS][BLK_COLS],
  input  coef_t    kern   [NDIR][KSIZE][KSIZE],
  output logic     out_valid,
  output logic [1:0] out_phase,
  output lfe_res_t res  [OUT_SIDE]
);

  pix_t     win   [WIN][BLK_COLS];
  pix_t     patch [OUT_SIDE][KSIZE][KSIZE];
  lfe_res_t res_d [OUT_SIDE];

  always_comb begin
    for (int r = 0; r < GROUP_ROWS; r++)
      for (int c = 0; c < BLK_COLS; c++) begin
        win[r][c]              = blk_hi[r][c];
        win[r + GROUP_ROWS][c] = blk_lo[r][c];
      end
    for (int q = 0; q < OUT_SIDE; q++)
      for (int r = 0; r < KSIZE; r++)
        for (int c = 0; c < KSIZE; c++)
          patch[q][r][c] = win[32'(phase) + r][q + c];
  end

  for (genvar q = 0; q < OUT_SIDE; q++) begin : g_pos
    edge_conv5x5 u_conv (
      .patch (patch[q]),
      .kern  (kern),
      .res   (res_d[q])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_phase <= '0;
      for (int q = 0; q < OUT_SIDE; q++) res[q] <= '0;
    end else begin
      out_valid <= in_valid;
      out_phase <= phase;
      if (in_valid) res <= res_d;
    end
  end

endmodule
