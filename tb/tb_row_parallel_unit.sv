// tb_row_parallel_unit: a 16x12 image (4 groups, 3 LFE circuits, 2 column
// steps). For every step and phase the blocks of all groups are driven from a
// random image and each circuit's four results are compared with the
// reference model at image position (4g+phase, 4*step+q). Checks the step,
// phase and last tags that travel with the results.
module tb_row_parallel_unit;
  import dps_pkg::*;
  import tb_ref_pkg::*;
  localparam int R = 16, C = 12, NG = R / 4, NL = NG - 1, NS = C / 4 - 1;

  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0;
  logic [0:0] step = 0;
  logic [1:0] phase = 0;
  pix_t blk [NG][GROUP_ROWS][BLK_COLS];
  coef_t kern [NDIR][KSIZE][KSIZE];
  logic out_valid, out_last;
  logic [0:0] out_step;
  logic [1:0] out_phase;
  lfe_res_t res [NL][OUT_SIDE];
  int checks = 0, failures = 0;

  row_parallel_unit #(.IMG_ROWS(R), .IMG_COLS(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    kern_t k;
    int img [][];
    int g, d;
    k = ref_kernels();
    for (int dd = 0; dd < 4; dd++)
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) kern[dd][r][c] = coef_t'(k[dd][r][c]);
    img = new[R];
    foreach (img[r]) img[r] = new[C];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 5; n++) begin
      foreach (img[r, c]) img[r][c] = int'($urandom_range(255));
      for (int s = 0; s < NS; s++)
        for (int p = 0; p < 4; p++) begin
          @(negedge clk);
          for (int gg = 0; gg < NG; gg++)
            for (int r = 0; r < 4; r++)
              for (int c = 0; c < 8; c++) blk[gg][r][c] = pix_t'(img[gg*4 + r][s*4 + c]);
          step = 1'(s); phase = 2'(p); in_valid = 1; in_last = (s == NS - 1 && p == 3);
          @(posedge clk); #1;
          checks++;
          if (!out_valid || int'(out_step) != s || int'(out_phase) != p || out_last != (s == NS - 1 && p == 3)) begin
            failures++; $display("FAIL tags s=%0d p=%0d", s, p);
          end
          for (int l = 0; l < NL; l++)
            for (int q = 0; q < 4; q++) begin
              ref_max(img, l*4 + p, s*4 + q, k, g, d);
              checks++;
              if (int'(res[l][q].grad) != g || int'(res[l][q].dir) != d) begin
                failures++;
                $display("FAIL l=%0d s=%0d p=%0d q=%0d got %0d/%0d exp %0d/%0d", l, s, p, q, res[l][q].grad, res[l][q].dir, g, d);
              end
            end
        end
      @(negedge clk); in_valid = 0; in_last = 0;
      @(posedge clk); #1;
      checks++;
      if (out_valid || out_last) begin failures++; $display("FAIL valid after frame"); end
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
