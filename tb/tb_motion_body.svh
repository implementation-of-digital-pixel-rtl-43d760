// tb_motion_body.svh: body shared by the end-to-end testbenches of
// motion_top. The including module declares localparams R and C (image size)
// and instantiates motion_top as `dut` with .* connections.
//
// Each frame is a low-contrast random background with a bright square and two
// bright triangles (giving horizontal, vertical and both diagonal edges); the
// square moves from frame to frame. The testbench loads the frame through the
// pixel write port, starts the pipeline and compares, against the reference
// model, the frame latency, all three maps (read back row by row), the motion
// count and the brake output. Frames cover: a new accumulation (aem_init), accumulation
// over several frames, brake on and off, a reprogrammed kernel, a start pulse
// while busy, and each direction producing significant edges.

  import dps_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = C / 4 - 1, MR = R - 4, MC = C - 4;
  localparam int RW = $clog2(R), CW = $clog2(C), MRW = $clog2(MR), CNTW = $clog2(MR * MC + 1);

  logic clk = 0, rst_n = 0;
  logic pix_we = 0;
  logic [RW-1:0] pix_row = 0;
  logic [CW-1:0] pix_col = 0;
  pix_t pix_data = 0;
  logic kp_we = 0;
  dir_e kp_dir = DIR_H;
  logic [2:0] kp_row = 0, kp_col = 0;
  coef_t kp_coef = 0;
  logic start = 0, aem_init = 0;
  mag_t edge_th = 0;
  logic [CNTW-1:0] brake_th = 0;
  logic busy, frame_done, brake;
  logic [CNTW-1:0] motion_count;
  logic [MRW-1:0] map_rd_row = 0;
  logic [MC-1:0] msem_row, aem_row, motion_row;

  int checks = 0, failures = 0;
  // how often each mechanism happened
  int n_init = 0, n_accum = 0, n_brake_on = 0, n_brake_off = 0, n_reprog = 0, n_busy_start = 0,
      n_below_th = 0;
  int n_dir [4] = '{0, 0, 0, 0};

  kern_t k;
  int img [][];
  bit ra [][];

  always #5 clk = ~clk;

  task automatic make_frame(input int f);
    int sq  = MR / 5 + 1;           // side of the square
    int r0  = 2 + (f * 3) % (R - sq - 4);
    int c0  = 2 + (f * 5) % (C - sq - 4);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        img[r][c] = int'($urandom_range(12));
        if (r >= r0 && r < r0 + sq && c >= c0 && c < c0 + sq) img[r][c] = 200;
        if (r + c < C / 4) img[r][c] = 180;                  // +45 degree border
        if (c - r > (3 * C) / 4) img[r][c] = 160;            // -45 degree border
      end
  endtask

  task automatic load_frame();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        @(negedge clk);
        pix_we = 1; pix_row = RW'(r); pix_col = CW'(c); pix_data = pix_t'(img[r][c]);
      end
    @(negedge clk);
    pix_we = 0;
  endtask

  task automatic write_tap(input int d, input int r, input int c, input int v);
    @(negedge clk);
    kp_we = 1; kp_dir = dir_e'(d); kp_row = 3'(r); kp_col = 3'(c); kp_coef = coef_t'(v);
    @(negedge clk);
    kp_we = 0;
    k[d][r][c] = v;
    n_reprog++;
  endtask

  task automatic run_frame(input bit init, input int th, input int bth_sel);
    int cycles = 0, cnt = 0, bth;
    bit m [][];
    bit mo [][];
    m = new[MR]; mo = new[MR];
    foreach (m[r]) begin m[r] = new[MC]; mo[r] = new[MC]; end
    // reference
    for (int r = 0; r < MR; r++)
      for (int c = 0; c < MC; c++) begin
        int g, d;
        ref_max(img, r, c, k, g, d);
        m[r][c] = g > th;
        if (m[r][c]) n_dir[d]++;
        else if (g > 0) n_below_th++;
        ra[r][c] = init ? m[r][c] : (ra[r][c] | m[r][c]);
        mo[r][c] = m[r][c] ^ ra[r][c];
        cnt += int'(mo[r][c]);
      end
    // brake threshold: 0 = just reachable, 1 = unreachable
    bth = (bth_sel == 0) ? ((cnt > 0) ? cnt : 1) : cnt + 1;
    if (init) n_init++; else n_accum++;
    @(negedge clk);
    aem_init = init; edge_th = mag_t'(th); brake_th = CNTW'(bth);
    start = 1;
    @(negedge clk);
    start = 0;
    aem_init = !init;   // must have been sampled with start
    cycles = 1;
    while (!frame_done) begin
      if (cycles == 7 || cycles == 4 * NS + 1) begin start = 1; n_busy_start++; end else start = 0;
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low during frame"); end
      @(negedge clk);
      cycles++;
      if (cycles > 4 * NS + 50) break;
    end
    start = 0;
    checks++;
    if (cycles != 4 * NS + 2) begin failures++; $display("FAIL latency %0d expected %0d", cycles, 4 * NS + 2); end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after frame"); end
    checks++;
    if (int'(motion_count) != cnt) begin failures++; $display("FAIL motion_count %0d expected %0d", motion_count, cnt); end
    checks++;
    if (brake != (cnt >= bth)) begin failures++; $display("FAIL brake"); end
    if (brake) n_brake_on++; else n_brake_off++;
    for (int r = 0; r < MR; r++) begin
      map_rd_row = MRW'(r);
      #1;
      for (int c = 0; c < MC; c++) begin
        checks++;
        if (msem_row[c] != m[r][c] || aem_row[c] != ra[r][c] || motion_row[c] != mo[r][c]) begin
          failures++;
          if (failures < 10) $display("FAIL map r=%0d c=%0d got %b%b%b exp %b%b%b", r, c,
                                      msem_row[c], aem_row[c], motion_row[c], m[r][c], ra[r][c], mo[r][c]);
        end
      end
    end
    $display("frame done: init=%0d th=%0d motion=%0d brake=%0d", init, th, cnt, brake);
  endtask

  initial begin
    k = ref_kernels();
    img = new[R];
    ra = new[MR];
    foreach (img[r]) img[r] = new[C];
    foreach (ra[r]) ra[r] = new[MC];
    repeat (3) @(negedge clk);
    rst_n = 1;
    make_frame(0); load_frame(); run_frame(1'b1, 300, 0);
    make_frame(1); load_frame(); run_frame(1'b0, 300, 0);
    make_frame(2); load_frame(); run_frame(1'b0, 300, 1);
    // reprogram the horizontal kernel: move its +1 row up by one
    for (int c = 0; c < 5; c++) begin write_tap(0, 1, c, 0); write_tap(0, 0, c, 1); end
    make_frame(3); load_frame(); run_frame(1'b0, 250, 0);
    make_frame(4); load_frame(); run_frame(1'b1, 400, 0);
    checks++;
    if (n_init == 0 || n_accum == 0 || n_brake_on == 0 || n_brake_off == 0 || n_reprog == 0 ||
        n_busy_start == 0 || n_below_th == 0) begin
      failures++;
      $display("FAIL mechanism missing: init %0d accum %0d brake_on %0d brake_off %0d reprog %0d busy_start %0d below_th %0d",
               n_init, n_accum, n_brake_on, n_brake_off, n_reprog, n_busy_start, n_below_th);
    end
    for (int d = 0; d < 4; d++) begin
      checks++;
      if (n_dir[d] == 0) begin failures++; $display("FAIL direction %0d never significant", d); end
    end
    $display("mechanisms: init %0d accum %0d brake_on %0d brake_off %0d reprog %0d busy_start %0d below_th %0d dir %0d/%0d/%0d/%0d",
             n_init, n_accum, n_brake_on, n_brake_off, n_reprog, n_busy_start, n_below_th,
             n_dir[0], n_dir[1], n_dir[2], n_dir[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((R * C + 400) * 10 * 8);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
