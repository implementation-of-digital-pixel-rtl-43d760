// row_parallel_unit: the row-parallel processing stage.
//
// Holds one local-feature-extraction circuit per pair of neighbouring four-row
// groups: NLFE = IMG_ROWS/4 - 1 circuits, 24 for a 100-row array. Circuit g
// takes the blocks of groups g and g+1, so the circuits together cover every
// row at which a 5x5 kernel fits (rows 2..IMG_ROWS-3). All circuits share the
// kernels from the kernel program control and run in lock step; the column
// step and the last-of-frame mark are delayed by the same one clock as
// the circuits' results so that they stay aligned with them.
//
// res[g][q] at out_step s, out_phase p belongs to edge-map position
// (row 4g+p, column 4s+q), i.e. image pixel (4g+p+2, 4s+q+2).
// The 24 circuits and their pairing of 4x8 blocks are from the design
// description and its architecture drawing.
module row_parallel_unit
  import dps_pkg::*;
#(
  parameter int unsigned IMG_ROWS = 100,
  parameter int unsigned IMG_COLS = 100,
  localparam int unsigned NGROUP  = IMG_ROWS / GROUP_ROWS,
  localparam int unsigned NLFE    = NGROUP - 1,
  localparam int unsigned NSTEP   = IMG_COLS / GROUP_ROWS - 1,
  localparam int unsigned SW      = (NSTEP > 1) ? $clog2(NSTEP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_last,
  input  logic [SW-1:0] step,
  input  logic [1:0]    phase,
  input  pix_t          blk  [NGROUP][GROUP_ROWS][BLK_COLS],
  input  coef_t         kern [NDIR][KSIZE][KSIZE],
  output logic          out_valid,
  output logic          out_last,
  output logic [SW-1:0] out_step,
  output logic [1:0]    out_phase,
  output lfe_res_t      res  [NLFE][OUT_SIDE]
);

  logic       lfe_valid [NLFE];
  logic [1:0] lfe_phase [NLFE];

  for (genvar g = 0; g < NLFE; g++) begin : g_lfe
    lfe_circuit u_lfe (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .phase     (phase),
      .blk_hi    (blk[g]),
      .blk_lo    (blk[g+1]),
      .kern      (kern),
      .out_valid (lfe_valid[g]),
      .out_phase (lfe_phase[g]),
      .res       (res[g])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_last  <= 1'b0;
      out_step  <= '0;
    end else begin
      out_last  <= in_valid && in_last;
      out_step  <= step;
    end
  end

  // All circuits are driven alike; circuit 0 speaks for them.
  assign out_valid = lfe_valid[0];
  assign out_phase = lfe_phase[0];

endmodule
