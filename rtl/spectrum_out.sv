// spectrum_out: turns the transformed frame into gray pixels and streams
// them out as AXI4-Stream video.
//
// Forward mode follows the conversion function of the reference design:
//   L(i)  = log(1 + sqrt(re^2 + im^2))        (pass 1, mag_log)
//   pixel = (L(i) - min L) / (max L - min L) * 255   (pass 2)
// Pass 1 reads every word of the frame memory, one per clock, through the
// mag_log pipeline and writes L back into the real part of the same word,
// tracking the minimum and maximum. Then udiv_seq computes the scale
// R = round(255 * 2^16 / (max - min)) once, so pass 2 needs only a multiply
// per pixel: pixel = min(255, ((L - min) * R + 2^15) >> 16). A frame whose
// L values are all equal gives all-zero pixels (flat_frame is set).
//
// Roundtrip mode (after a forward plus inverse 2D FFT) skips pass 1 and
// sends the real part clamped to 0..255.
//
// Output: the gray byte is copied into all three colour bytes of tdata;
// tuser marks the first pixel, tlast the last pixel of each line. Pass 2
// sends a continuous stream, one pixel per clock while tready is high: a
// read is issued whenever the two-entry output buffer plus the read in
// flight leave room, so the one-clock memory latency is hidden and
// back-pressure simply pauses the reads. The buffer head drives tdata, so
// the data stays put while tready is low. done pulses one clock after the
// last pixel is accepted. Base-2 log, the reciprocal and the
// rounding are this design's choices.
module spectrum_out
  import fft_pkg::*;
#(
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned HEIGHT = 32,
  localparam int unsigned NPIX = WIDTH * HEIGHT,
  localparam int unsigned AW   = $clog2(NPIX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          roundtrip,
  output logic          busy,
  output logic          done,
  output logic          flat_frame,
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output cplx_t         mem_wdata,
  output logic [AW-1:0] mem_raddr,
  input  cplx_t         mem_rdata,
  output logic [23:0]   m_axis_tdata,
  output logic          m_axis_tvalid,
  input  logic          m_axis_tready,
  output logic          m_axis_tuser,
  output logic          m_axis_tlast
);
  typedef enum logic [2:0] {O_IDLE, O_P1, O_P1_DRAIN, O_DIV, O_DIV_WAIT, O_P2} ostate_e;

  localparam int unsigned DW = 24;  // divider width
  localparam logic [DW-1:0] SCALE_NUM = DW'(255 << 16);

  ostate_e        state;
  logic           rt_r;
  logic [AW:0]    rd_cnt;     // next address to read (reads issued)
  logic [AW:0]    wr_cnt;     // pass-1 results written
  logic           rd_v;       // read issued last clock (pass 1)
  logic [AW-1:0]  rd_tag;
  logic [LOG_W-1:0] lmin, lmax;
  logic [DW-1:0]  recip;

  logic             ml_v;
  logic [LOG_W-1:0] ml_log;
  logic [AW-1:0]    ml_tag;

  logic             div_start, div_busy, div_done;
  logic [DW-1:0]    div_q;
  logic [LOG_W-1:0] range_w, diff;
  logic [LOG_W+DW-1:0] prod;
  logic [7:0]       pix;

  // pass-2 output buffer: {pixel, tuser, tlast}
  logic [9:0]       ob_dat [2];
  logic             ob_wr, ob_rd;
  logic [1:0]       ob_cnt;
  logic             inflight;   // a pass-2 read returns this clock
  logic [AW-1:0]    infl_idx;
  logic [AW:0]      sent;
  logic             pop, issue;

  mag_log #(.TAG_W(AW)) u_ml (
    .clk(clk), .rst_n(rst_n), .in_valid(rd_v), .in_data(mem_rdata), .in_tag(rd_tag),
    .out_valid(ml_v), .out_log(ml_log), .out_tag(ml_tag)
  );

  udiv_seq #(.W(DW)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start),
    .dividend(SCALE_NUM + DW'(range_w >> 1)), .divisor(DW'(range_w)),
    .busy(div_busy), .done(div_done), .quotient(div_q)
  );

  assign range_w   = lmax - lmin;
  assign div_start = (state == O_DIV);
  assign mem_raddr = rd_cnt[AW-1:0];
  assign mem_we    = ml_v;
  assign mem_waddr = ml_tag;
  assign mem_wdata = '{re: sample_t'(ml_log), im: '0};
  assign busy      = (state != O_IDLE);

  // pixel value of the word arriving from the memory in pass 2
  always_comb begin
    diff = LOG_W'(mem_rdata.re) - lmin;
    prod = (LOG_W+DW)'(diff) * (LOG_W+DW)'(recip) + (LOG_W+DW)'(1 << 15);
    if (rt_r) begin
      if (mem_rdata.re < 0)        pix = 8'd0;
      else if (mem_rdata.re > 255) pix = 8'd255;
      else                         pix = mem_rdata.re[7:0];
    end else if (prod[LOG_W+DW-1:16] > (LOG_W+DW-16)'(255)) begin
      pix = 8'd255;
    end else begin
      pix = prod[23:16];
    end
  end

  // output stream from the buffer head
  assign m_axis_tvalid = (ob_cnt != 2'd0);
  assign m_axis_tdata  = {3{ob_dat[ob_rd][9:2]}};
  assign m_axis_tuser  = ob_dat[ob_rd][1];
  assign m_axis_tlast  = ob_dat[ob_rd][0];
  assign pop   = m_axis_tvalid && m_axis_tready;
  // room for one more read once this clock's pop is counted
  assign issue = (state == O_P2) && (rd_cnt != (AW+1)'(NPIX))
              && ((3'(ob_cnt) + 3'(inflight) - 3'(pop)) < 3'd2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ob_wr <= 1'b0; ob_rd <= 1'b0; ob_cnt <= '0; inflight <= 1'b0; infl_idx <= '0;
      ob_dat[0] <= '0; ob_dat[1] <= '0;
    end else begin
      inflight <= issue;
      infl_idx <= rd_cnt[AW-1:0];
      if (inflight) begin
        ob_dat[ob_wr] <= {pix, infl_idx == '0, (infl_idx % AW'(WIDTH)) == AW'(WIDTH - 1)};
        ob_wr         <= ~ob_wr;
      end
      if (pop) ob_rd <= ~ob_rd;
      ob_cnt <= ob_cnt + 2'(inflight) - 2'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= O_IDLE;
      rt_r <= 1'b0; rd_cnt <= '0; wr_cnt <= '0; rd_v <= 1'b0; rd_tag <= '0;
      lmin <= '1; lmax <= '0; recip <= '0; flat_frame <= 1'b0; done <= 1'b0; sent <= '0;
    end else begin
      done <= 1'b0;
      rd_v <= 1'b0;
      if (ml_v) begin
        wr_cnt <= wr_cnt + 1'b1;
        if (ml_log < lmin) lmin <= ml_log;
        if (ml_log > lmax) lmax <= ml_log;
      end
      case (state)
        O_IDLE: if (start) begin
          rt_r   <= roundtrip;
          rd_cnt <= '0;
          wr_cnt <= '0;
          lmin   <= '1;
          lmax   <= '0;
          sent   <= '0;
          state  <= roundtrip ? O_P2 : O_P1;
        end
        O_P1: begin
          rd_v   <= 1'b1;
          rd_tag <= rd_cnt[AW-1:0];
          rd_cnt <= rd_cnt + 1'b1;
          if (rd_cnt == (AW+1)'(NPIX - 1)) state <= O_P1_DRAIN;
        end
        O_P1_DRAIN: if (wr_cnt == (AW+1)'(NPIX)) begin
          rd_cnt <= '0;
          if (lmax == lmin) begin
            flat_frame <= 1'b1;
            recip      <= '0;
            state      <= O_P2;
          end else begin
            flat_frame <= 1'b0;
            state      <= O_DIV;
          end
        end
        O_DIV:      state <= O_DIV_WAIT;
        O_DIV_WAIT: if (div_done) begin
          recip <= div_q;
          state <= O_P2;
        end
        O_P2: begin
          if (issue) rd_cnt <= rd_cnt + 1'b1;
          if (pop) begin
            sent <= sent + 1'b1;
            if (sent == (AW+1)'(NPIX - 1)) begin
              rd_cnt <= '0;
              done   <= 1'b1;
              state  <= O_IDLE;
            end
          end
        end
        default: state <= O_IDLE;
      endcase
    end
  end

  // AXI4-Stream: data must not change while a pixel waits for tready
  logic        stalled_q;
  logic [23:0] tdata_q;
  always_ff @(posedge clk) begin
    stalled_q <= rst_n && m_axis_tvalid && !m_axis_tready;
    tdata_q   <= m_axis_tdata;
    if (rst_n && stalled_q)
      a_stable: assert (m_axis_tvalid && m_axis_tdata == tdata_q)
        else $error("spectrum_out: output changed while stalled");
  end
endmodule
