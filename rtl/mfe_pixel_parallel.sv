// mfe_pixel_parallel: pixel-parallel motion feature extraction.
//
// Keeps three one-bit maps of MAP_R x MAP_C edge-map positions (96 x 96 for a
// 100 x 100 array, the pixels at which a 5x5 kernel fits): the merged
// significant edge map (MSEM) of the current frame, the accumulated edge map
// (AEM) and the motion-feature map. Every clock in which in_valid is high it
// takes the MSEM bits of NLFE x 4 positions (rows 4g+phase, columns 4*step+q)
// and, for each of them at once:
//   AEM    := aem_init ? MSEM : AEM | MSEM      (first frame / later frames)
//   motion := MSEM xor AEM (the updated AEM)
// The new motion bits of the clock are also driven on mot_bits/mot_valid, one
// clock later, for the brake decision; frame_done pulses with the last of
// them. A frame of NSTEP*4 input clocks updates every position exactly once.
// The maps are read out combinationally, whole (msem_map, aem_map,
// motion_map). All maps clear to zero on reset.
// The AEM rule, the first-frame rule and the XOR are from the design
// description; that aem_init is a level input given per frame is this
// design's choice.
module mfe_pixel_parallel
  import dps_pkg::*;
#(
  parameter int unsigned IMG_ROWS = 100,
  parameter int unsigned IMG_COLS = 100,
  localparam int unsigned NLFE    = IMG_ROWS / GROUP_ROWS - 1,
  localparam int unsigned NSTEP   = IMG_COLS / GROUP_ROWS - 1,
  localparam int unsigned SW      = (NSTEP > 1) ? $clog2(NSTEP) : 1,
  localparam int unsigned MAP_R   = IMG_ROWS - KSIZE + 1,
  localparam int unsigned MAP_C   = IMG_COLS - KSIZE + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_last,
  input  logic [SW-1:0] step,
  input  logic [1:0]    phase,
  input  logic          msem [NLFE][OUT_SIDE],
  input  logic          aem_init,
  output logic          mot_valid,
  output logic          mot_bits [NLFE][OUT_SIDE],
  output logic          frame_done,
  output logic          msem_map   [MAP_R][MAP_C],
  output logic          aem_map    [MAP_R][MAP_C],
  output logic          motion_map [MAP_R][MAP_C]
);

  logic aem_new [NLFE][OUT_SIDE];

  always_comb begin
    for (int g = 0; g < NLFE; g++)
      for (int q = 0; q < OUT_SIDE; q++) begin
        aem_new[g][q] = aem_init ? msem[g][q]
                      : (aem_map[g*GROUP_ROWS + 32'(phase)][32'(step)*GROUP_ROWS + q] | msem[g][q]);
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < MAP_R; r++)
        for (int c = 0; c < MAP_C; c++) begin
          msem_map[r][c]   <= 1'b0;
          aem_map[r][c]    <= 1'b0;
          motion_map[r][c] <= 1'b0;
        end
      for (int g = 0; g < NLFE; g++)
        for (int q = 0; q < OUT_SIDE; q++) mot_bits[g][q] <= 1'b0;
      mot_valid  <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      mot_valid  <= in_valid;
      frame_done <= in_valid && in_last;
      if (in_valid) begin
        // Every map position compares its own (phase, step) coordinates,
        // so each bit has a fixed write enable and a fixed source.
        for (int r = 0; r < MAP_R; r++)
          for (int c = 0; c < MAP_C; c++)
            if (r % GROUP_ROWS == 32'(phase) && c / GROUP_ROWS == 32'(step)) begin
              msem_map[r][c]   <= msem[r / GROUP_ROWS][c % GROUP_ROWS];
              aem_map[r][c]    <= aem_new[r / GROUP_ROWS][c % GROUP_ROWS];
              motion_map[r][c] <= msem[r / GROUP_ROWS][c % GROUP_ROWS]
                                ^ aem_new[r / GROUP_ROWS][c % GROUP_ROWS];
            end
        for (int g = 0; g < NLFE; g++)
          for (int q = 0; q < OUT_SIDE; q++)
            mot_bits[g][q] <= msem[g][q] ^ aem_new[g][q];
      end
    end
  end

endmodule
