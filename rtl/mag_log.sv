// mag_log: log magnitude of a complex sample, log2(1 + |z|).
//
// This is the per-pixel half of the reference design's conversion from a
// complex spectrum to an image: output = log(1 + sqrt(re^2 + im^2)).
// Pipeline: clock 1 registers re^2 + im^2, 20 clocks of isqrt_pipe give
// floor(|z|), one clock of log2_fx adds 1 and takes the base-2 log with
// LOG_FRAC fraction bits. One sample per clock, latency 22 clocks; in_tag
// (the pixel address) travels with the sample; rst_n (synchronous, active
// low) clears the valid flags. Base 2 and the rounding
// down of |z| are this design's choices.
module mag_log
  import fft_pkg::*;
#(
  parameter int unsigned TAG_W = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  cplx_t            in_data,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [LOG_W-1:0] out_log,
  output logic [TAG_W-1:0] out_tag
);
  localparam int unsigned SQ_W = 2 * CPLX_W;
  localparam int unsigned RT_W = CPLX_W;
  localparam int unsigned LAT  = 1 + RT_W;  // clocks up to the root

  logic [SQ_W-1:0] sq;
  logic            sq_v;
  logic            rt_v;
  logic [RT_W-1:0] rt;
  logic [TAG_W-1:0] tag_sr [LAT];
  logic [LOG_W-1:0] lg;

  logic signed [SQ_W-1:0] re_x, im_x;
  assign re_x = SQ_W'(in_data.re);
  assign im_x = SQ_W'(in_data.im);

  always_ff @(posedge clk) begin
    sq   <= SQ_W'(re_x * re_x) + SQ_W'(im_x * im_x);
    sq_v <= rst_n && in_valid;
    tag_sr[0] <= in_tag;
    for (int i = 1; i < int'(LAT); i++) tag_sr[i] <= tag_sr[i-1];
  end

  isqrt_pipe #(.IN_W(SQ_W)) u_sqrt (
    .clk(clk), .rst_n(rst_n), .in_valid(sq_v), .radicand(sq), .out_valid(rt_v), .root(rt)
  );

  log2_fx #(.IN_W(RT_W + 1), .FRAC_W(LOG_FRAC)) u_log (
    .x((RT_W+1)'(rt) + (RT_W+1)'(1)), .y(lg)
  );

  always_ff @(posedge clk) begin
    out_valid <= rst_n && rt_v;
    out_log   <= lg;
    out_tag   <= tag_sr[LAT-1];
  end
endmodule
