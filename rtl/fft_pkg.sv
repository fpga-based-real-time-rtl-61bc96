// fft_pkg: types and constants shared by the 2D FFT video accelerator.
//
// A sample of the transform is a complex number whose real and imaginary
// parts are CPLX_W-bit signed integers. The 20-bit width is the total width
// of the fixed-point complex type of the reference design; the binary point
// sits at the LSB here, because an 8-bit pixel multiplied by the 2^11 gain of
// an unscaled 64x32 2D FFT needs exactly 20 signed bits, so the forward
// transform cannot overflow at the default image size. Twiddle factors are
// TW_W-bit signed values in Q2.14 (1.0 = 2^TW_FRAC).
package fft_pkg;

  localparam int unsigned PIX_W   = 8;   // gray pixel width
  localparam int unsigned CPLX_W  = 20;  // width of one complex component
  localparam int unsigned TW_W    = 16;  // twiddle component width
  localparam int unsigned TW_FRAC = 14;  // twiddle fraction bits
  localparam int unsigned LOG_FRAC = 8;  // fraction bits of the log magnitude
  localparam int unsigned LOG_W   = 5 + LOG_FRAC;

  typedef logic signed [CPLX_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;


  // Phases of the accelerator's frame cycle.
  typedef enum logic [1:0] {
    PH_CAPTURE   = 2'd0,  // camera frame flows into the frame memory
    PH_TRANSFORM = 2'd1,  // 2D FFT in place
    PH_OUTPUT    = 2'd2   // conversion to pixels and video out
  } phase_e;

  // Saturate a wide signed value to a sample.
  function automatic sample_t sat_sample(input logic signed [CPLX_W+5:0] v);
    localparam logic signed [CPLX_W+5:0] MAXV = (1 <<< (CPLX_W-1)) - 1;
    localparam logic signed [CPLX_W+5:0] MINV = -(1 <<< (CPLX_W-1));
    if (v > MAXV)      return sample_t'(MAXV);
    else if (v < MINV) return sample_t'(MINV);
    else               return sample_t'(v);
  endfunction

endpackage
