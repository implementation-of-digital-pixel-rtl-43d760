// block_readout_ctrl: sequences the block readout of the pixel array.
//
// A frame is read as NSTEP column steps. At every step all four-row groups
// put their 4x8 block out at once (row-parallel), and the step is held for
// four clocks: in phase p the local-feature-extraction circuits place their
// kernels on window row p of the 8x8 block they see, so each phase produces
// one output row per circuit and four output columns. A frame therefore takes
// exactly NSTEP*4 clocks with valid high (96 for a 100-column image), after
// which the controller returns to idle and waits for the next start.
//
// Interface: start (one-clock pulse, ignored while busy), step/phase (the
// current position), valid (a position is being read), last (last position
// of the frame), busy. Synchronous active-low reset to idle.
//
// That a controller sequences the readout is from the design description;
// the four-phase schedule and the handshake are this design's choices.
module block_readout_ctrl
  import dps_pkg::*;
#(
  parameter int unsigned IMG_COLS = 100,
  localparam int unsigned NSTEP   = IMG_COLS / GROUP_ROWS - 1,
  localparam int unsigned SW      = (NSTEP > 1) ? $clog2(NSTEP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [SW-1:0] step,
  output logic [1:0]    phase,
  output logic          valid,
  output logic          last,
  output logic          busy
);

  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      phase <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          step  <= '0;
          phase <= '0;
        end
        S_RUN: begin
          phase <= phase + 2'd1;
          if (phase == 2'd3) begin
            if (step == SW'(NSTEP - 1)) begin
              state <= S_IDLE;
              step  <= '0;
            end else begin
              step <= step + SW'(1);
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy  = (state == S_RUN);
  assign valid = busy;
  assign last  = busy && step == SW'(NSTEP - 1) && phase == 2'd3;

endmodule
