// fft_ip_top: real-time video 2D FFT accelerator (FFT IP core) and the LED
// bring-up block.
//
// The accelerator sits in a camera's AXI4-Stream video path. It takes one
// WIDTH x HEIGHT frame of 24-bit RGB pixels, turns it into gray, computes
// its two-dimensional FFT in place, and sends the spectrum out again as a
// video frame of gray pixels showing the log magnitude, stretched to the
// full 0..255 range. The frame cycle has three phases that share one
// complex frame memory (frame_mem):
//   capture   - axis_frame_capture fills the memory from s_axis, then holds
//               s_axis_tready low, stalling the camera side;
//   transform - fft2d runs a 1D FFT over every row, then every column;
//   output    - spectrum_out converts each word to log(1 + |z|), finds the
//               minimum and maximum, and streams the normalised pixels on
//               m_axis.
// When output finishes the capture block is re-armed and waits for the
// next start of frame. With inverse_mode high (sampled when a frame has
// been captured) the transform phase also runs the inverse 2D FFT and the
// output phase sends its real part, so the output frame reproduces the
// gray input; this checks the transform end to end.
//
// Interfaces: AXI4-Stream video in and out (tuser = start of frame, tlast
// = end of line, RGB in [23:16],[15:8],[7:0]); clk with synchronous
// active-low rst_n. flat_frame is high when the last spectrum sent had
// equal log magnitudes everywhere (so it was sent as all zeros). The LED
// flip block has its own HLS-style ports and
// active-high ap_rst, side by side with the accelerator, as on the board.
//
// The processing chain (gray conversion, rows-then-columns FFT, log
// magnitude with min/max normalisation, gray copied to colour) follows the
// reference design; the phase control, memory sharing and all widths are
// this design's choices.
module fft_ip_top
  import fft_pkg::*;
#(
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned HEIGHT = 32,
  localparam int unsigned AW = $clog2(WIDTH * HEIGHT)
) (
  input  logic        clk,
  input  logic        rst_n,
  // video in
  input  logic [23:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic        s_axis_tuser,
  input  logic        s_axis_tlast,
  // video out
  output logic [23:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tuser,
  output logic        m_axis_tlast,
  // control and status
  input  logic        inverse_mode,
  output logic        frame_busy,
  output logic        flat_frame,
  // LED flip block
  input  logic        ap_rst,
  input  logic        ap_start,
  output logic        ap_done,
  output logic        ap_idle,
  output logic        ap_ready,
  input  logic        led_i,
  output logic        led_o,
  output logic        led_o_ap_vld
);
  phase_e phase;
  logic   rt_mode;
  logic   cap_done, cap_arm, f2_start, f2_done, f2_busy, so_start, so_done, so_busy;
  logic [2:0] f2_passes;

  logic          cap_we, f2_we, so_we, m_we;
  logic [AW-1:0] cap_waddr, f2_waddr, so_waddr, m_waddr;
  logic [AW-1:0] f2_raddr, so_raddr, m_raddr;
  cplx_t         cap_wdata, f2_wdata, so_wdata, m_wdata, m_rdata;

  axis_frame_capture #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_cap (
    .clk(clk), .rst_n(rst_n), .arm(cap_arm),
    .s_axis_tdata(s_axis_tdata), .s_axis_tvalid(s_axis_tvalid),
    .s_axis_tready(s_axis_tready), .s_axis_tuser(s_axis_tuser),
    .s_axis_tlast(s_axis_tlast),
    .frame_done(cap_done), .we(cap_we), .waddr(cap_waddr), .wdata(cap_wdata)
  );

  fft2d #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_fft2d (
    .clk(clk), .rst_n(rst_n), .start(f2_start), .roundtrip(rt_mode),
    .busy(f2_busy), .done(f2_done),
    .mem_we(f2_we), .mem_waddr(f2_waddr), .mem_wdata(f2_wdata),
    .mem_raddr(f2_raddr), .mem_rdata(m_rdata), .passes(f2_passes)
  );

  spectrum_out #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_out (
    .clk(clk), .rst_n(rst_n), .start(so_start), .roundtrip(rt_mode),
    .busy(so_busy), .done(so_done), .flat_frame(flat_frame),
    .mem_we(so_we), .mem_waddr(so_waddr), .mem_wdata(so_wdata),
    .mem_raddr(so_raddr), .mem_rdata(m_rdata),
    .m_axis_tdata(m_axis_tdata), .m_axis_tvalid(m_axis_tvalid),
    .m_axis_tready(m_axis_tready), .m_axis_tuser(m_axis_tuser),
    .m_axis_tlast(m_axis_tlast)
  );

  frame_mem #(.DEPTH(WIDTH * HEIGHT)) u_mem (
    .clk(clk), .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
    .raddr(m_raddr), .rdata(m_rdata)
  );

  // the phase decides who owns the frame memory
  always_comb begin
    unique case (phase)
      PH_TRANSFORM: begin m_we = f2_we; m_waddr = f2_waddr; m_wdata = f2_wdata; m_raddr = f2_raddr; end
      PH_OUTPUT:    begin m_we = so_we; m_waddr = so_waddr; m_wdata = so_wdata; m_raddr = so_raddr; end
      default:      begin m_we = cap_we; m_waddr = cap_waddr; m_wdata = cap_wdata; m_raddr = '0; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase    <= PH_CAPTURE;
      rt_mode  <= 1'b0;
      f2_start <= 1'b0;
      so_start <= 1'b0;
      cap_arm  <= 1'b0;
    end else begin
      f2_start <= 1'b0;
      so_start <= 1'b0;
      cap_arm  <= 1'b0;
      unique case (phase)
        PH_CAPTURE: if (cap_done) begin
          phase    <= PH_TRANSFORM;
          rt_mode  <= inverse_mode;
          f2_start <= 1'b1;
        end
        PH_TRANSFORM: if (f2_done) begin
          phase    <= PH_OUTPUT;
          so_start <= 1'b1;
        end
        PH_OUTPUT: if (so_done) begin
          phase   <= PH_CAPTURE;
          cap_arm <= 1'b1;
        end
        default: phase <= PH_CAPTURE;
      endcase
    end
  end

  assign frame_busy = (phase != PH_CAPTURE);

  led_flip u_led (
    .ap_clk(clk), .ap_rst(ap_rst), .ap_start(ap_start), .ap_done(ap_done),
    .ap_idle(ap_idle), .ap_ready(ap_ready), .led_i(led_i), .led_o(led_o),
    .led_o_ap_vld(led_o_ap_vld)
  );

  // each phase hands over only when the previous unit has finished
  always_ff @(posedge clk) begin
    if (rst_n && phase == PH_CAPTURE)
      a_out_idle: assert (!so_busy && !f2_busy) else $error("fft_ip_top: unit busy during capture");
  end
endmodule
