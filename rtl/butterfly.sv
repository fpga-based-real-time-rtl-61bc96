// butterfly: radix-2 decimation-in-time butterfly on complex samples.
//
// Computes t = b * W, x = a + t, y = a - t, where W is a Q2.14 twiddle
// factor. The product is rounded to nearest before the add. With scale set
// (inverse transform) both outputs are halved with rounding, which over the
// log2(N) stages gives the 1/N of the inverse DFT. Results are saturated to
// the sample width; at the default sizes the forward transform never needs
// it. Rounding, halving and saturation are this design's choices. Purely
// combinational; the caller registers the outputs.
module butterfly
  import fft_pkg::*;
(
  input  cplx_t                  a,
  input  cplx_t                  b,
  input  logic signed [TW_W-1:0] w_re,
  input  logic signed [TW_W-1:0] w_im,
  input  logic                   scale,
  output cplx_t                  x,
  output cplx_t                  y
);
  localparam int unsigned PW = CPLX_W + TW_W + 1;  // product sum width
  localparam int unsigned SW = CPLX_W + 6;          // working width

  logic signed [PW-1:0] pr, pi;
  logic signed [SW-1:0] tr, ti, xr, xi, yr, yi;

  // halve with round-half-up when scale is set
  function automatic logic signed [SW-1:0] half(input logic signed [SW-1:0] v, input logic s);
    return s ? (v + SW'(1)) >>> 1 : v;
  endfunction

  always_comb begin
    pr = PW'(b.re) * PW'(w_re) - PW'(b.im) * PW'(w_im);
    pi = PW'(b.re) * PW'(w_im) + PW'(b.im) * PW'(w_re);
    tr = SW'((pr + (PW'(1) <<< (TW_FRAC - 1))) >>> TW_FRAC);
    ti = SW'((pi + (PW'(1) <<< (TW_FRAC - 1))) >>> TW_FRAC);
    xr = half(SW'(a.re) + tr, scale);
    xi = half(SW'(a.im) + ti, scale);
    yr = half(SW'(a.re) - tr, scale);
    yi = half(SW'(a.im) - ti, scale);
    x.re = sat_sample(xr);
    x.im = sat_sample(xi);
    y.re = sat_sample(yr);
    y.im = sat_sample(yi);
  end
endmodule
