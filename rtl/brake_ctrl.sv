// brake_ctrl: automatic-brake decision from the motion features of a frame.
//
// Counts the motion-feature pixels of a frame as the pixel-parallel stage
// produces them (up to N per clock on mot_bits while mot_valid is high). The
// count restarts with the first clock after a frame_done. When frame_done
// arrives the total of the frame is latched in motion_count and the brake
// output is set for the following frame interval if the total reaches
// brake_th, and cleared otherwise; it keeps that value until the next frame
// ends. brake_th = 0 therefore brakes on every frame.
// That motion features activate the automatic brakes is from the design
// description; it does not say how, so the pixel count and threshold are
// this design's choice.
module brake_ctrl #(
  parameter int unsigned N     = 96,     // motion bits per clock
  parameter int unsigned CNT_W = 14      // wide enough for a frame's positions
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mot_valid,
  input  logic [N-1:0]     mot_bits,
  input  logic             frame_done,
  input  logic [CNT_W-1:0] brake_th,
  output logic [CNT_W-1:0] motion_count,
  output logic             brake
);

  logic [CNT_W-1:0] acc, acc_next;

  always_comb begin
    acc_next = acc;
    if (mot_valid)
      for (int i = 0; i < N; i++) acc_next = acc_next + CNT_W'(mot_bits[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc          <= '0;
      motion_count <= '0;
      brake        <= 1'b0;
    end else if (frame_done) begin
      acc          <= '0;
      motion_count <= acc_next;
      brake        <= (acc_next >= brake_th);
    end else begin
      acc <= acc_next;
    end
  end

endmodule
