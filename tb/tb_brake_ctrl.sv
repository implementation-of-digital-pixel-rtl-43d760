// tb_brake_ctrl: feeds frames of random motion bits with random gaps and
// thresholds; checks the latched count and the brake decision at each frame
// end, including a count exactly at the threshold, and that the accumulator
// restarts for the next frame.
module tb_brake_ctrl;
  localparam int N = 8, W = 10;
  logic clk = 0, rst_n = 0, mot_valid = 0, frame_done = 0;
  logic [N-1:0] mot_bits = 0;
  logic [W-1:0] brake_th = 0;
  logic [W-1:0] motion_count;
  logic brake;
  int checks = 0, failures = 0;
  int brakes = 0, releases = 0;

  brake_ctrl #(.N(N), .CNT_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      automatic int cnt = 0;
      automatic int len = 4 + int'($urandom_range(20));
      for (int i = 0; i < len; i++) begin
        mot_valid = ($urandom_range(3) != 0) || (i == len - 1);
        mot_bits = N'($urandom);
        frame_done = (i == len - 1);
        if (mot_valid) cnt += $countones(mot_bits);
        if (frame_done)
          brake_th = (f % 3 == 0) ? W'(cnt) : W'($urandom_range(100));
        @(negedge clk);
      end
      mot_valid = 0; frame_done = 0;
      checks++;
      if (int'(motion_count) != cnt) begin failures++; $display("FAIL count %0d exp %0d", motion_count, cnt); end
      checks++;
      if (brake != (cnt >= int'(brake_th))) begin failures++; $display("FAIL brake"); end
      if (brake) brakes++; else releases++;
      // gap clocks with bits but no valid must not count
      mot_bits = '1;
      @(negedge clk);
    end
    checks++;
    if (brakes == 0 || releases == 0) begin failures++; $display("FAIL brake never toggled"); end
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
