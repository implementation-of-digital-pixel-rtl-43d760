// tb_dps_frame_mem: writes a random 12x16 frame, then reads every column step
// and compares each group's 4x8 block with the written pixels. Out-of-range
// writes must be ignored.
module tb_dps_frame_mem;
  import dps_pkg::*;
  localparam int R = 12, C = 16, NG = R / 4, NS = C / 4 - 1;

  logic clk = 0;
  logic pix_we = 0;
  logic [3:0] pix_row = 0, pix_col = 0;
  pix_t pix_data = 0;
  logic [1:0] rd_step = 0;
  pix_t blk [NG][GROUP_ROWS][BLK_COLS];
  int img [R][C];
  int checks = 0, failures = 0;

  dps_frame_mem #(.IMG_ROWS(R), .IMG_COLS(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          @(negedge clk);
          img[r][c] = int'($urandom_range(255));
          pix_we = 1; pix_row = 4'(r); pix_col = 4'(c); pix_data = pix_t'(img[r][c]);
        end
      // out-of-range row: must not alias onto any pixel
      @(negedge clk); pix_row = 4'(R); pix_col = 4'd0; pix_data = 8'hAA;
      @(negedge clk); pix_we = 0;
      for (int s = 0; s < NS; s++) begin
        rd_step = 2'(s);
        #1;
        for (int g = 0; g < NG; g++)
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 8; c++) begin
              checks++;
              if (int'(blk[g][r][c]) != img[g*4 + r][s*4 + c]) begin
                failures++;
                $display("FAIL s=%0d g=%0d r=%0d c=%0d", s, g, r, c);
              end
            end
      end
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
