// tb_lfe_circuit: drives random pairs of 4x8 blocks through one LFE circuit in
// all four phases and compares the 4 registered results of each phase with
// the reference model applied to the joined 8x8 window. Also checks the
// one-clock latency and that results hold when in_valid is low.
module tb_lfe_circuit;
  import dps_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] phase = 0;
  pix_t blk_hi [GROUP_ROWS][BLK_COLS];
  pix_t blk_lo [GROUP_ROWS][BLK_COLS];
  coef_t kern [NDIR][KSIZE][KSIZE];
  logic out_valid;
  logic [1:0] out_phase;
  lfe_res_t res [OUT_SIDE];
  int checks = 0, failures = 0;

  lfe_circuit dut (.*);

  always #5 clk = ~clk;

  initial begin
    kern_t k;
    int img [][];
    int g, d;
    k = ref_kernels();
    for (int dd = 0; dd < 4; dd++)
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) kern[dd][r][c] = coef_t'(k[dd][r][c]);
    img = new[8];
    foreach (img[r]) img[r] = new[8];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 8; c++) begin
          blk_hi[r][c] = pix_t'($urandom);
          blk_lo[r][c] = pix_t'($urandom);
          img[r][c]     = int'(blk_hi[r][c]);
          img[r + 4][c] = int'(blk_lo[r][c]);
        end
      for (int p = 0; p < 4; p++) begin
        phase = 2'(p); in_valid = 1;
        @(posedge clk); #1;
        checks++;
        if (!out_valid || out_phase != 2'(p)) begin failures++; $display("FAIL valid/phase"); end
        for (int q = 0; q < 4; q++) begin
          ref_max(img, p, q, k, g, d);
          checks++;
          if (int'(res[q].grad) != g || int'(res[q].dir) != d) begin
            failures++;
            $display("FAIL n=%0d p=%0d q=%0d got %0d/%0d exp %0d/%0d", n, p, q, res[q].grad, res[q].dir, g, d);
          end
        end
        @(negedge clk);
      end
      // idle clock: results must hold, valid must drop
      in_valid = 0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 8; c++) blk_hi[r][c] = '0;
      @(posedge clk); #1;
      ref_max(img, 3, 0, k, g, d);
      checks++;
      if (out_valid || int'(res[0].grad) != g) begin failures++; $display("FAIL hold"); end
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
