// tb_edge_conv5x5: checks one kernel position (four convolutions, magnitude,
// maximum and direction) against the reference model for the default kernels,
// for random kernels, and for patches built to favour each direction.
module tb_edge_conv5x5;
  import dps_pkg::*;
  import tb_ref_pkg::*;

  pix_t     patch [KSIZE][KSIZE];
  coef_t    kern  [NDIR][KSIZE][KSIZE];
  lfe_res_t res;
  int checks = 0, failures = 0;
  int dir_seen [4] = '{0, 0, 0, 0};

  edge_conv5x5 dut (.patch(patch), .kern(kern), .res(res));

  task automatic check_one(input kern_t k);
    int img [][];
    int g, d;
    img = new[5];
    foreach (img[r]) begin
      img[r] = new[5];
      foreach (img[r][c]) img[r][c] = int'(patch[r][c]);
    end
    ref_max(img, 0, 0, k, g, d);
    #1;
    checks++;
    if (int'(res.grad) != g || int'(res.dir) != d) begin
      failures++;
      $display("FAIL grad %0d dir %0d, expected %0d %0d", res.grad, res.dir, g, d);
    end
    dir_seen[d]++;
  endtask

  initial begin
    kern_t k;
    k = ref_kernels();
    for (int d = 0; d < 4; d++)
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) kern[d][r][c] = coef_t'(k[d][r][c]);
    // random patches
    for (int n = 0; n < 300; n++) begin
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) patch[r][c] = pix_t'($urandom);
      check_one(k);
    end
    // step edges in each orientation
    for (int n = 0; n < 4; n++) begin
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++)
          unique case (n)
            0: patch[r][c] = (r < 2) ? 8'd200 : 8'd10;           // horizontal edge
            1: patch[r][c] = (c > r) ? 8'd220 : 8'd5;            // -45 degree
            2: patch[r][c] = (c < 2) ? 8'd250 : 8'd0;            // vertical edge
            default: patch[r][c] = (r + c < 4) ? 8'd230 : 8'd0; // +45 degree
          endcase
      check_one(k);
    end
    // extreme values: all-255 against all-0 halves
    for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) patch[r][c] = (r == 1) ? 8'd255 : 8'd0;
    check_one(k);
    // random kernels
    for (int n = 0; n < 200; n++) begin
      for (int d = 0; d < 4; d++)
        for (int r = 0; r < 5; r++)
          for (int c = 0; c < 5; c++) begin
            k[d][r][c] = int'($urandom_range(2)) - 1;
            kern[d][r][c] = coef_t'(k[d][r][c]);
          end
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) patch[r][c] = pix_t'($urandom);
      check_one(k);
    end
    for (int d = 0; d < 4; d++) begin
      checks++;
      if (dir_seen[d] == 0) begin failures++; $display("FAIL direction %0d never won", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
