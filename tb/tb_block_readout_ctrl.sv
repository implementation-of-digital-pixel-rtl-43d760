// tb_block_readout_ctrl: at the default 100 columns, checks that a frame is
// exactly 24 steps x 4 phases = 96 valid clocks in order, that last marks the
// final position, that a start during a frame is ignored, and that a second
// frame runs the same way.
module tb_block_readout_ctrl;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] step;
  logic [1:0] phase;
  logic valid, last, busy;
  int checks = 0, failures = 0;

  block_readout_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic run_frame(input bit poke_start);
    int n = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (valid) begin
      checks++;
      if (int'(step) != n / 4 || int'(phase) != n % 4) begin
        failures++; $display("FAIL at %0d: step %0d phase %0d", n, step, phase);
      end
      checks++;
      if (last != (n == 95)) begin failures++; $display("FAIL last at %0d", n); end
      if (poke_start && n == 10) start = 1; else start = 0;
      n++;
      @(negedge clk);
    end
    checks++;
    if (n != 96) begin failures++; $display("FAIL frame length %0d", n); end
    checks++;
    if (busy) begin failures++; $display("FAIL busy after frame"); end
    repeat (3) @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL restarted without start"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (busy) begin failures++; $display("FAIL busy after reset"); end
    run_frame(1'b1);
    run_frame(1'b0);
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
