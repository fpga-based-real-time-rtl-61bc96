// fft1d: in-place radix-2 FFT of one image line.
//
// How it works: samples are written through the load port in natural order
// and land in the line buffer at their bit-reversed address (rader_bitrev).
// After start, the engine runs log2(N) stages; each stage performs N/2
// decimation-in-time butterflies, one per clock, reading two words of the
// line buffer, combining them with a twiddle factor from twiddle_rom and
// writing both results back in place. In stage s (span m = 2^s) butterfly c
// pairs p = (c / (m/2)) * m + c % (m/2) with q = p + m/2 and uses twiddle
// index (c % (m/2)) * NMAX/m. The result is then read in natural order
// through the combinational read port.
//
// The length N = 2^len_log2 (2 <= N <= NMAX) is chosen per call and must
// already be set while the line is loaded, so one
// engine transforms both the rows and the columns of an image. With inverse
// set the conjugate twiddles are used and every stage halves its outputs.
//
// Timing: busy rises the clock after start and a one-clock done pulse
// follows after exactly len_log2 * N/2 butterfly clocks. Loads and reads
// are only allowed while busy is low. The algorithm (bit-reversal, twiddle,
// butterfly) follows the software FFT of the reference design; the
// one-butterfly-per-clock schedule is this design's own.
module fft1d
  import fft_pkg::*;
#(
  parameter int unsigned NMAX = 64,
  localparam int unsigned LOGN = $clog2(NMAX),
  localparam int unsigned LW = $clog2(LOGN + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ld_en,
  input  logic [LOGN-1:0] ld_idx,
  input  cplx_t           ld_data,
  input  logic [LW-1:0]   len_log2,
  input  logic            inverse,
  input  logic            start,
  output logic            busy,
  output logic            done,
  input  logic [LOGN-1:0] rd_idx,
  output cplx_t           rd_data
);
  cplx_t line_buf [NMAX];

  logic [LW-1:0]   stage;      // 1 .. len_log2
  logic [LOGN-1:0] bcnt;       // butterfly counter within the stage
  logic [LW-1:0]   len_r;
  logic            inv_r;

  logic [LOGN-1:0] ld_addr;
  logic [LOGN-1:0] p_idx, q_idx, j_idx, halfm, grp;
  logic [LOGN-2:0] tw_k;
  logic signed [TW_W-1:0] w_re, w_im;
  cplx_t bf_x, bf_y;
  logic last_bfly, last_stage;

  rader_bitrev #(.LOGN(LOGN)) u_rev (
    .idx(ld_idx), .len_log2(len_log2), .rev(ld_addr)
  );

  always_comb begin
    halfm = LOGN'(1) << (stage - LW'(1));
    j_idx = bcnt & (halfm - LOGN'(1));
    grp   = bcnt >> (stage - LW'(1));
    p_idx = (grp << stage) | j_idx;
    q_idx = p_idx + halfm;
    tw_k  = (LOGN-1)'(j_idx << (LW'(LOGN) - stage));
    last_bfly  = (bcnt == (LOGN'(1) << (len_r - LW'(1))) - LOGN'(1));
    last_stage = (stage == len_r);
  end

  twiddle_rom #(.NMAX(NMAX)) u_tw (
    .k(tw_k), .inverse(inv_r), .w_re(w_re), .w_im(w_im)
  );

  butterfly u_bf (
    .a(line_buf[p_idx]), .b(line_buf[q_idx]),
    .w_re(w_re), .w_im(w_im), .scale(inv_r),
    .x(bf_x), .y(bf_y)
  );

  always_ff @(posedge clk) begin
    if (busy) begin
      line_buf[p_idx] <= bf_x;
      line_buf[q_idx] <= bf_y;
    end else if (ld_en) begin
      line_buf[ld_addr] <= ld_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      stage <= LW'(1);
      bcnt  <= '0;
      len_r <= LW'(1);
      inv_r <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          stage <= LW'(1);
          bcnt  <= '0;
          len_r <= len_log2;
          inv_r <= inverse;
        end
      end else if (last_bfly) begin
        bcnt <= '0;
        if (last_stage) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          stage <= stage + LW'(1);
        end
      end else begin
        bcnt <= bcnt + LOGN'(1);
      end
    end
  end

  assign rd_data = line_buf[rd_idx];

  // a transform must be at least two points long and at most NMAX
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (start && !busy)
        a_len: assert (len_log2 >= 1 && len_log2 <= LW'(LOGN)) else $error("fft1d: bad length");
      if (busy)
        a_no_load_busy: assert (!ld_en) else $error("fft1d: load while busy");
    end
  end
endmodule
