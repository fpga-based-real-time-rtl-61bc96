// fft2d: two-dimensional FFT of the image held in the frame memory.
//
// The 2D transform is done as in the reference design: a 1D FFT of every
// row first, then a 1D FFT of every column of the row results. A single
// fft1d engine is reused. For each line the controller reads the line from
// the frame memory (one word per clock, one clock of read latency) into the
// engine, starts it, waits for done, and writes the line back in place.
// With roundtrip set, two more passes follow with the inverse transform
// (rows, then columns), so the memory ends holding the original image
// (the inverse includes the 1/(WIDTH*HEIGHT) scaling).
//
// Pass order: 0 rows forward, 1 columns forward, 2 rows inverse,
// 3 columns inverse. Word address of pixel (row r, column c) is r*WIDTH+c.
//
// Timing per line of N points: N read clocks, 1 clock to load the last word
// and start, N/2*log2(N) butterfly clocks, 1 clock for done, N write clocks.
// done pulses for one clock after the last write of the last pass. The
// sequencing is this design's; the reference design gives only the row-then-column
// order and the inverse capability.
module fft2d
  import fft_pkg::*;
#(
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned HEIGHT = 32,
  localparam int unsigned NMAX = (WIDTH > HEIGHT) ? WIDTH : HEIGHT,
  localparam int unsigned LOGN = $clog2(NMAX),
  localparam int unsigned LW   = $clog2(LOGN + 1),
  localparam int unsigned AW   = $clog2(WIDTH * HEIGHT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          roundtrip,
  output logic          busy,
  output logic          done,
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output cplx_t         mem_wdata,
  output logic [AW-1:0] mem_raddr,
  input  cplx_t         mem_rdata,
  output logic [2:0]    passes
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_LOAD_LAST, S_RUN, S_STORE} state_e;

  localparam int unsigned LG_W = $clog2(WIDTH);
  localparam int unsigned LG_H = $clog2(HEIGHT);

  state_e          state;
  logic [1:0]      pass;       // 0..3
  logic            rt_r;
  logic [LOGN-1:0] line;       // row or column being processed
  logic [LOGN-1:0] elem;       // element within the line
  logic [LOGN-1:0] elem_d;     // element whose read data arrives now

  logic            col_pass;
  logic [LOGN-1:0] line_len_m1, line_cnt_m1;
  logic [LW-1:0]   len_log2;
  logic            f_ld_en, f_start, f_busy, f_done;
  cplx_t           f_rd_data;

  always_comb begin
    col_pass    = pass[0];
    line_len_m1 = col_pass ? LOGN'(HEIGHT - 1) : LOGN'(WIDTH - 1);
    line_cnt_m1 = col_pass ? LOGN'(WIDTH - 1)  : LOGN'(HEIGHT - 1);
    len_log2    = col_pass ? LW'(LG_H) : LW'(LG_W);
  end

  function automatic logic [AW-1:0] addr_of(input logic cp, input logic [LOGN-1:0] ln,
                                            input logic [LOGN-1:0] el);
    // rows: line = row, element = column; columns: line = column, element = row
    if (cp) return AW'(el) * AW'(WIDTH) + AW'(ln);
    else    return AW'(ln) * AW'(WIDTH) + AW'(el);
  endfunction

  assign mem_raddr = addr_of(col_pass, line, elem);
  assign mem_waddr = addr_of(col_pass, line, elem);
  assign mem_wdata = f_rd_data;
  assign mem_we    = (state == S_STORE);
  assign f_ld_en   = (state == S_LOAD && elem != '0) || (state == S_LOAD_LAST);
  assign f_start   = (state == S_LOAD_LAST);
  assign busy      = (state != S_IDLE);

  fft1d #(.NMAX(NMAX)) u_fft1d (
    .clk(clk), .rst_n(rst_n),
    .ld_en(f_ld_en), .ld_idx(elem_d), .ld_data(mem_rdata),
    .len_log2(len_log2), .inverse(pass[1]),
    .start(f_start), .busy(f_busy), .done(f_done),
    .rd_idx(elem), .rd_data(f_rd_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      pass   <= '0;
      rt_r   <= 1'b0;
      line   <= '0;
      elem   <= '0;
      elem_d <= '0;
      done   <= 1'b0;
      passes <= '0;
    end else begin
      done   <= 1'b0;
      elem_d <= elem;
      case (state)
        S_IDLE: if (start) begin
          state  <= S_LOAD;
          pass   <= '0;
          rt_r   <= roundtrip;
          line   <= '0;
          elem   <= '0;
          passes <= '0;
        end
        S_LOAD: begin
          if (elem == line_len_m1) state <= S_LOAD_LAST;
          else                     elem  <= elem + LOGN'(1);
        end
        S_LOAD_LAST: begin
          elem  <= '0;
          state <= S_RUN;
        end
        S_RUN: if (f_done) state <= S_STORE;
        S_STORE: begin
          if (elem != line_len_m1) begin
            elem <= elem + LOGN'(1);
          end else begin
            elem <= '0;
            if (line != line_cnt_m1) begin
              line  <= line + LOGN'(1);
              state <= S_LOAD;
            end else begin
              line   <= '0;
              passes <= passes + 3'd1;
              if (pass == 2'd3 || (pass == 2'd1 && !rt_r)) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else begin
                pass  <= pass + 2'd1;
                state <= S_LOAD;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (WIDTH >= 2 && HEIGHT >= 2 && (WIDTH & (WIDTH - 1)) == 0 && (HEIGHT & (HEIGHT - 1)) == 0)
      else $error("fft2d: WIDTH and HEIGHT must be powers of two");
  end
endmodule
