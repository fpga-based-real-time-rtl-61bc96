// axis_frame_capture: gathers one camera frame into the frame memory.
//
// The accelerator sits in an AXI4-Stream video path (tuser marks the first
// pixel of a frame, tlast the last pixel of each line). Once armed, the
// block drops pixels until one arrives with tuser, then accepts WIDTH*HEIGHT
// pixels, converts each from RGB to gray (rgb2gray) and writes it to the
// frame memory as the complex word {re = gray, im = 0} at row*WIDTH+col.
// After the last pixel it pulses frame_done and holds tready low, stalling
// the video source, until arm pulses again. This follows the reference
// design, which fills an image array from the video stream and halts the
// flow once the array is full. Line length comes from WIDTH; tlast is not
// checked. Timing: one pixel per clock when tvalid is high, memory write in
// the same clock.
module axis_frame_capture
  import fft_pkg::*;
#(
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned HEIGHT = 32,
  localparam int unsigned AW = $clog2(WIDTH * HEIGHT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          arm,
  input  logic [23:0]   s_axis_tdata,
  input  logic          s_axis_tvalid,
  output logic          s_axis_tready,
  input  logic          s_axis_tuser,
  input  logic          s_axis_tlast,
  output logic          frame_done,
  output logic          we,
  output logic [AW-1:0] waddr,
  output cplx_t         wdata
);
  typedef enum logic [1:0] {C_HALT, C_WAIT_SOF, C_FILL} cstate_e;

  cstate_e       state;
  logic [AW-1:0] cnt;
  logic [7:0]    gray;
  logic          take;

  rgb2gray u_gray (.rgb(s_axis_tdata), .gray(gray));

  assign s_axis_tready = (state != C_HALT);
  // in C_WAIT_SOF only the start-of-frame pixel is stored
  assign take  = s_axis_tvalid && ((state == C_FILL) || (state == C_WAIT_SOF && s_axis_tuser));
  assign we    = take;
  assign waddr = (state == C_WAIT_SOF) ? '0 : cnt;
  assign wdata = '{re: sample_t'({1'b0, gray}), im: '0};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= C_WAIT_SOF;
      cnt        <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      case (state)
        C_HALT: if (arm) state <= C_WAIT_SOF;
        C_WAIT_SOF: if (take) begin
          cnt   <= AW'(1);
          state <= C_FILL;
        end
        C_FILL: if (take) begin
          if (cnt == AW'(WIDTH * HEIGHT - 1)) begin
            cnt        <= '0;
            state      <= C_HALT;
            frame_done <= 1'b1;
          end else begin
            cnt <= cnt + AW'(1);
          end
        end
        default: state <= C_HALT;
      endcase
    end
  end

  // AXI4-Stream: a presented pixel must stay until it is accepted
  logic stalled_q;
  always_ff @(posedge clk) begin
    stalled_q <= rst_n && s_axis_tvalid && !s_axis_tready;
    if (rst_n && stalled_q)
      a_hold: assert (s_axis_tvalid) else $error("axis_frame_capture: tvalid dropped while stalled");
  end
endmodule
