// motion_top: digital-pixel-sensor based motion feature extraction for an
// automatic braking system.
//
// A frame held in the pixel array (dps_frame_mem) is read out row-parallel:
// for each column step every four-row group puts out a 4x8 block, and each of
// the NLFE local-feature-extraction circuits (row_parallel_unit) joins two
// neighbouring blocks into an 8x8 window and filters it with the four 5x5
// directional kernels held by kernel_prog_ctrl, keeping the largest gradient
// and its direction per pixel. gfe_sem_merge thresholds these into four
// significant edge maps and ORs them into the merged significant edge map
// (MSEM). mfe_pixel_parallel updates the accumulated edge map (AEM) and the
// motion-feature map for all pixels of a clock at once, and brake_ctrl turns
// the number of motion pixels of the frame into the brake signal.
//
// Use: load the frame through the pixel write port (one pixel per clock, not
// while busy), optionally reprogram kernel taps, then pulse start (a start
// while busy, including the two clocks after readout, is ignored). aem_init is
// sampled with start: 1 makes this frame's MSEM the new AEM (first frame of a
// sequence), 0 accumulates. The frame takes NSTEP*4 clocks of readout (96 at
// 100x100); frame_done pulses two clocks after the last readout clock, i.e.
// NSTEP*4+2 clocks after start, and motion_count/brake are valid from the
// clock after frame_done. The three maps can be read a row at a time through
// map_rd_row at any time (combinational).
//
// The 100x100 array, 24 LFE circuits, 4x8 blocks, 8x8 windows, 5x5 kernels,
// threshold/merge and AEM/XOR rules follow the design description; the
// clocking, ports, threshold inputs and brake rule are this design's choices.
module motion_top
  import dps_pkg::*;
#(
  parameter int unsigned IMG_ROWS = 100,
  parameter int unsigned IMG_COLS = 100,
  localparam int unsigned NGROUP  = IMG_ROWS / GROUP_ROWS,
  localparam int unsigned NLFE    = NGROUP - 1,
  localparam int unsigned NSTEP   = IMG_COLS / GROUP_ROWS - 1,
  localparam int unsigned SW      = (NSTEP > 1) ? $clog2(NSTEP) : 1,
  localparam int unsigned RW      = $clog2(IMG_ROWS),
  localparam int unsigned CW      = $clog2(IMG_COLS),
  localparam int unsigned MAP_R   = IMG_ROWS - KSIZE + 1,
  localparam int unsigned MAP_C   = IMG_COLS - KSIZE + 1,
  localparam int unsigned MRW     = $clog2(MAP_R),
  localparam int unsigned CNT_W   = $clog2(MAP_R * MAP_C + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // pixel write port (digitised pixel values)
  input  logic             pix_we,
  input  logic [RW-1:0]    pix_row,
  input  logic [CW-1:0]    pix_col,
  input  pix_t             pix_data,
  // kernel programming
  input  logic             kp_we,
  input  dir_e             kp_dir,
  input  logic [2:0]       kp_row,
  input  logic [2:0]       kp_col,
  input  coef_t            kp_coef,
  // frame control
  input  logic             start,
  input  logic             aem_init,
  input  mag_t             edge_th,
  input  logic [CNT_W-1:0] brake_th,
  output logic             busy,
  output logic             frame_done,
  output logic [CNT_W-1:0] motion_count,
  output logic             brake,
  // map readout
  input  logic [MRW-1:0]   map_rd_row,
  output logic [MAP_C-1:0] msem_row,
  output logic [MAP_C-1:0] aem_row,
  output logic [MAP_C-1:0] motion_row
);

  // ---- readout control and pixel array
  logic [SW-1:0] rd_step;
  logic [1:0]    rd_phase;
  logic          rd_valid, rd_last, rd_busy;
  pix_t          blk [NGROUP][GROUP_ROWS][BLK_COLS];
  logic          aem_init_q;

  block_readout_ctrl #(.IMG_COLS(IMG_COLS)) u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start && !busy),
    .step  (rd_step),
    .phase (rd_phase),
    .valid (rd_valid),
    .last  (rd_last),
    .busy  (rd_busy)
  );

  dps_frame_mem #(.IMG_ROWS(IMG_ROWS), .IMG_COLS(IMG_COLS)) u_mem (
    .clk      (clk),
    .pix_we   (pix_we),
    .pix_row  (pix_row),
    .pix_col  (pix_col),
    .pix_data (pix_data),
    .rd_step  (rd_step),
    .blk      (blk)
  );

  // ---- kernels and row-parallel local feature extraction
  coef_t         kern [NDIR][KSIZE][KSIZE];
  logic          lfe_valid, lfe_last;
  logic [SW-1:0] lfe_step;
  logic [1:0]    lfe_phase;
  lfe_res_t      lfe_res [NLFE][OUT_SIDE];

  kernel_prog_ctrl u_kpc (
    .clk     (clk),
    .rst_n   (rst_n),
    .kp_we   (kp_we),
    .kp_dir  (kp_dir),
    .kp_row  (kp_row),
    .kp_col  (kp_col),
    .kp_coef (kp_coef),
    .kern    (kern)
  );

  row_parallel_unit #(.IMG_ROWS(IMG_ROWS), .IMG_COLS(IMG_COLS)) u_rpu (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rd_valid),
    .in_last   (rd_last),
    .step      (rd_step),
    .phase     (rd_phase),
    .blk       (blk),
    .kern      (kern),
    .out_valid (lfe_valid),
    .out_last  (lfe_last),
    .out_step  (lfe_step),
    .out_phase (lfe_phase),
    .res       (lfe_res)
  );

  // ---- global features: threshold and merge
  // The four per-direction significant edge maps (sem) exist only inside the
  // clock that produces them; the MSEM is what is kept.
  logic sem  [NDIR][NLFE][OUT_SIDE];
  logic msem [NLFE][OUT_SIDE];

  gfe_sem_merge #(.NLFE(NLFE)) u_gfe (
    .res     (lfe_res),
    .edge_th (edge_th),
    .sem     (sem),
    .msem    (msem)
  );

  // ---- pixel-parallel motion feature extraction
  logic mot_valid;
  logic mot_bits [NLFE][OUT_SIDE];
  logic msem_map   [MAP_R][MAP_C];
  logic aem_map    [MAP_R][MAP_C];
  logic motion_map [MAP_R][MAP_C];

  mfe_pixel_parallel #(.IMG_ROWS(IMG_ROWS), .IMG_COLS(IMG_COLS)) u_mfe (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (lfe_valid),
    .in_last    (lfe_last),
    .step       (lfe_step),
    .phase      (lfe_phase),
    .msem       (msem),
    .aem_init   (aem_init_q),
    .mot_valid  (mot_valid),
    .mot_bits   (mot_bits),
    .frame_done (frame_done),
    .msem_map   (msem_map),
    .aem_map    (aem_map),
    .motion_map (motion_map)
  );

  // ---- brake decision
  logic [NLFE*OUT_SIDE-1:0] mot_flat;
  always_comb
    for (int g = 0; g < NLFE; g++)
      for (int q = 0; q < OUT_SIDE; q++)
        mot_flat[g*OUT_SIDE + q] = mot_bits[g][q];

  brake_ctrl #(.N(NLFE*OUT_SIDE), .CNT_W(CNT_W)) u_brake (
    .clk          (clk),
    .rst_n        (rst_n),
    .mot_valid    (mot_valid),
    .mot_bits     (mot_flat),
    .frame_done   (frame_done),
    .brake_th     (brake_th),
    .motion_count (motion_count),
    .brake        (brake)
  );

  // ---- frame-level control
  logic pipe_busy;   // readout done but results still in flight
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aem_init_q <= 1'b0;
      pipe_busy  <= 1'b0;
    end else begin
      if (start && !busy) aem_init_q <= aem_init;
      if (rd_last) pipe_busy <= 1'b1;
      else if (frame_done) pipe_busy <= 1'b0;
    end
  end
  assign busy = rd_busy || pipe_busy || lfe_valid;

  // ---- map readout
  always_comb
    for (int c = 0; c < MAP_C; c++) begin
      msem_row[c]   = msem_map[map_rd_row][c];
      aem_row[c]    = aem_map[map_rd_row][c];
      motion_row[c] = motion_map[map_rd_row][c];
    end

  // The pixel array must not change under a running readout.
  a_no_write_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(pix_we && busy))
    else $error("pixel write while a frame is being processed");

endmodule
