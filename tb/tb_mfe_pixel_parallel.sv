// tb_mfe_pixel_parallel: a 12x16 image (8x12 map, 2 row pairs, 3 column
// steps). Drives several frames of random MSEM bits in readout order, the
// first with aem_init set, and keeps reference MSEM/AEM/motion maps:
// AEM = init ? MSEM : AEM | MSEM, motion = MSEM xor AEM. Checks every map bit
// after each frame, the per-clock motion bits and the frame_done pulse.
module tb_mfe_pixel_parallel;
  import dps_pkg::*;
  localparam int R = 12, C = 16, NL = R / 4 - 1, NS = C / 4 - 1, MR = R - 4, MC = C - 4;

  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0, aem_init = 0;
  logic [1:0] step = 0;
  logic [1:0] phase = 0;
  logic msem [NL][OUT_SIDE];
  logic mot_valid, frame_done;
  logic mot_bits [NL][OUT_SIDE];
  logic msem_map [MR][MC];
  logic aem_map [MR][MC];
  logic motion_map [MR][MC];
  int checks = 0, failures = 0;
  bit rm [MR][MC], ra [MR][MC], rmo [MR][MC];
  bit exp_bits [NL][OUT_SIDE];
  int motion_seen = 0;

  mfe_pixel_parallel #(.IMG_ROWS(R), .IMG_COLS(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 6; f++) begin
      aem_init = (f == 0 || f == 4);
      for (int s = 0; s < NS; s++)
        for (int p = 0; p < 4; p++) begin
          @(negedge clk);
          if (s > 0 || p > 0) begin
            checks++;
            if (!mot_valid || frame_done) begin failures++; $display("FAIL mot_valid/frame_done"); end
            for (int l = 0; l < NL; l++)
              for (int q = 0; q < 4; q++) begin
                checks++;
                if (mot_bits[l][q] != exp_bits[l][q]) begin failures++; $display("FAIL mot_bits"); end
              end
          end
          step = 2'(s); phase = 2'(p); in_valid = 1; in_last = (s == NS - 1 && p == 3);
          for (int l = 0; l < NL; l++)
            for (int q = 0; q < 4; q++) begin
              automatic int r = l*4 + p, c = s*4 + q;
              msem[l][q] = ($urandom_range(2) == 0);
              rm[r][c] = msem[l][q];
              ra[r][c] = aem_init ? msem[l][q] : (ra[r][c] | msem[l][q]);
              rmo[r][c] = rm[r][c] ^ ra[r][c];
              exp_bits[l][q] = rmo[r][c];
              if (rmo[r][c]) motion_seen++;
            end
        end
      @(negedge clk);
      in_valid = 0; in_last = 0;
      checks++;
      if (!frame_done || !mot_valid) begin failures++; $display("FAIL frame_done missing"); end
      for (int l = 0; l < NL; l++)
        for (int q = 0; q < 4; q++) begin
          checks++;
          if (mot_bits[l][q] != exp_bits[l][q]) begin failures++; $display("FAIL last mot_bits"); end
        end
      @(negedge clk);
      checks++;
      if (frame_done) begin failures++; $display("FAIL frame_done too long"); end
      for (int r = 0; r < MR; r++)
        for (int c = 0; c < MC; c++) begin
          checks += 3;
          if (msem_map[r][c] != rm[r][c] || aem_map[r][c] != ra[r][c] || motion_map[r][c] != rmo[r][c]) begin
            failures++; $display("FAIL map f=%0d r=%0d c=%0d", f, r, c);
          end
        end
    end
    checks++;
    if (motion_seen == 0) begin failures++; $display("FAIL no motion bit ever set"); end
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
