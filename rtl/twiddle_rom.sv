// twiddle_rom: twiddle factors W_N^k = exp(-j*2*pi*k/N) for a radix-2 FFT.
//
// Gives the factor for k = 0 .. NMAX/2-1 as Q2.14 signed values (1.0 =
// 16384). The forward transform uses cos - j*sin; with inverse set the
// factor is conjugated (cos + j*sin). Shorter transforms of length N use
// index k*(NMAX/N). The table is a constant computed while the design is
// elaborated, from a Taylor series for sine and cosine, rounded to nearest:
// w_re[k] = round(2^14 * cos(2*pi*k/NMAX)),
// w_im[k] = -round(2^14 * sin(2*pi*k/NMAX)).
// The software design computed these factors at run time; a table is this
// design's choice. Combinational lookup.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int unsigned NMAX = 64,
  localparam int unsigned KW = $clog2(NMAX) - 1
) (
  input  logic [KW-1:0]         k,
  input  logic                  inverse,
  output logic signed [TW_W-1:0] w_re,
  output logic signed [TW_W-1:0] w_im
);
  typedef logic signed [TW_W-1:0] tw_t;
  typedef tw_t tw_table_t [NMAX/2];

  // sin (sel = 0) or cos (sel = 1) by Taylor series, |x| <= pi
  function automatic real trig(input real x, input bit sel);
    real term, sum;
    int  n0;
    n0   = sel ? 0 : 1;
    term = sel ? 1.0 : x;
    sum  = term;
    for (int n = n0; n < n0 + 40; n += 2) begin
      term = -term * x * x / real'((n + 1) * (n + 2));
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic tw_table_t make_table(input bit want_cos);
    tw_table_t t;
    real x, v, s;
    for (int i = 0; i < int'(NMAX / 2); i++) begin
      x = 2.0 * 3.14159265358979323846 * real'(i) / real'(NMAX);
      v = trig(x, want_cos) * real'(1 << TW_FRAC);
      s = (v >= 0.0) ? v + 0.5 : v - 0.5;
      t[i] = tw_t'($rtoi(s));
    end
    return t;
  endfunction

  localparam tw_table_t COS_T = make_table(1'b1);
  localparam tw_table_t SIN_T = make_table(1'b0);

  always_comb begin
    w_re = COS_T[k];
    w_im = inverse ? SIN_T[k] : -SIN_T[k];
  end
endmodule
