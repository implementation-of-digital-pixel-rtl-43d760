// tb_motion_top: end-to-end test of motion_top on a 24x24 image (5 LFE
// circuits, 5 column steps, 20x20 maps); see tb_motion_body.svh.
module tb_motion_top;
  localparam int R = 24, C = 24;
  motion_top #(.IMG_ROWS(R), .IMG_COLS(C)) dut (.*);
  `include "tb_motion_body.svh"
endmodule
