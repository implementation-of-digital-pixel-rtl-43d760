// tb_motion_top_full: end-to-end test of motion_top at its default size,
// a 100x100 pixel array with 24 LFE circuits and 96x96 maps; see
// tb_motion_body.svh.
module tb_motion_top_full;
  localparam int R = 100, C = 100;
  motion_top dut (.*);
  `include "tb_motion_body.svh"
endmodule
