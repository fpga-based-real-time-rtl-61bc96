// rgb2gray: converts one 24-bit RGB pixel to an 8-bit gray value.
//
// The reference design converts the camera's 3-channel 24-bit image to an
// 8-bit gray image before the FFT. The weights used here are the usual
// luma weights 0.299, 0.587 and 0.114 held in Q15 (9798, 19235, 3735, which
// sum to 2^15) with round-to-nearest; these numbers are this design's choice.
// Purely combinational. Byte order: R in [23:16], G in [15:8], B in [7:0].
module rgb2gray (
  input  logic [23:0] rgb,
  output logic [7:0]  gray
);
  localparam logic [15:0] WR = 16'd9798;
  localparam logic [15:0] WG = 16'd19235;
  localparam logic [15:0] WB = 16'd3735;

  logic [24:0] acc;

  always_comb begin
    acc  = 25'(rgb[23:16]) * 25'(WR) + 25'(rgb[15:8]) * 25'(WG)
         + 25'(rgb[7:0]) * 25'(WB) + 25'd16384;
    gray = acc[22:15];
  end
endmodule
