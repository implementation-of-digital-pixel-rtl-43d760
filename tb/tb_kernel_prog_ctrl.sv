// tb_kernel_prog_ctrl: checks the kernels after reset against the reference
// table, then random tap writes (kept in a shadow copy), ignored writes
// (coefficient -2, row or column 5..7), and a second reset.
module tb_kernel_prog_ctrl;
  import dps_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, kp_we = 0;
  dir_e kp_dir = DIR_H;
  logic [2:0] kp_row = 0, kp_col = 0;
  coef_t kp_coef = 0;
  coef_t kern [NDIR][KSIZE][KSIZE];
  int checks = 0, failures = 0;
  kern_t shadow;

  kernel_prog_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic compare(input string what);
    for (int d = 0; d < 4; d++)
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) begin
          checks++;
          if (int'(kern[d][r][c]) != shadow[d][r][c]) begin
            failures++;
            $display("FAIL %s d=%0d r=%0d c=%0d got %0d exp %0d", what, d, r, c, kern[d][r][c], shadow[d][r][c]);
          end
        end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    shadow = ref_kernels();
    compare("reset");
    for (int n = 0; n < 200; n++) begin
      automatic int d = int'($urandom_range(3));
      automatic int r = int'($urandom_range(7));
      automatic int c = int'($urandom_range(7));
      automatic int v = int'($urandom_range(3));   // 0,1,2(-2),3(-1)
      @(negedge clk);
      kp_we = 1; kp_dir = dir_e'(d); kp_row = 3'(r); kp_col = 3'(c); kp_coef = coef_t'(v);
      if (r < 5 && c < 5 && v != 2) shadow[d][r][c] = (v == 3) ? -1 : v;
      @(negedge clk);
      kp_we = 0;
      compare("write");
    end
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    shadow = ref_kernels();
    compare("second reset");
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
