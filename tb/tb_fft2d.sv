// tb_fft2d: runs the 2D FFT controller at its default 64x32 size over a
// frame memory filled with a random gray image and compares every word with
// a row-then-column DFT computed in real arithmetic (tolerance 40 LSB on
// values up to 2^19, the rounding of 11 stages). Then runs a roundtrip (forward and inverse) on a new
// image and expects the image back within 4 LSB (rounding bias of the halving stages), with four passes reported.
// Also checks the clock count of the forward transform against
// sum over lines of (2N + 2 + N/2*log2 N) + 1.
module tb_fft2d;
  import fft_pkg::*;
  localparam int W = 64, H = 32, AW = 11;
  logic clk = 0, rst_n, start, roundtrip, busy, done;
  logic mem_we, m_we;
  logic [AW-1:0] mem_waddr, mem_raddr, m_waddr, tb_addr;
  cplx_t mem_wdata, mem_rdata, m_wdata, tb_data;
  logic tb_we;
  logic [2:0] passes;
  int checks = 0, failures = 0;
  real ar [H][W], ai [H][W];

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  fft2d #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  assign m_we    = busy ? mem_we : tb_we;
  assign m_waddr = busy ? mem_waddr : tb_addr;
  assign m_wdata = busy ? mem_wdata : tb_data;
  frame_mem #(.DEPTH(W * H)) u_mem (.clk(clk), .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
                                    .raddr(busy ? mem_raddr : tb_addr), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill_random();
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      @(negedge clk);
      ar[r][c] = real'($urandom % 256); ai[r][c] = 0.0;
      tb_we = 1; tb_addr = AW'(r * W + c);
      tb_data = '{re: sample_t'($rtoi(ar[r][c])), im: '0};
    end
    @(negedge clk) tb_we = 0;
  endtask

  task automatic read_word(input int a, output cplx_t d);
    @(negedge clk) tb_addr = AW'(a);
    @(negedge clk) d = mem_rdata;
  endtask

  task automatic run(input bit rt, output int cyc);
    @(negedge clk) roundtrip = rt; start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc, expc;
    real tr [H][W], ti [H][W], br [H][W], bi [H][W];
    rst_n = 0; start = 0; roundtrip = 0; tb_we = 0; tb_addr = 0; tb_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // forward transform
    fill_random();
    run(0, cyc);
    expc = H * (2 * W + 2 + W / 2 * 6) + W * (2 * H + 2 + H / 2 * 5) + 1;
    checks++;
    if (cyc < expc - 2 || cyc > expc + 2) begin
      failures++; $display("FAIL forward took %0d clocks, expected %0d", cyc, expc);
    end
    checks++;
    if (passes != 3'd2) begin failures++; $display("FAIL passes %0d", passes); end
    // reference: rows then columns
    for (int r = 0; r < H; r++) for (int k = 0; k < W; k++) begin
      tr[r][k] = 0; ti[r][k] = 0;
      for (int c = 0; c < W; c++) begin
        real a;
        a = -2.0 * 3.14159265358979 * real'((c * k) % W) / W;
        tr[r][k] += ar[r][c] * $cos(a) - ai[r][c] * $sin(a);
        ti[r][k] += ar[r][c] * $sin(a) + ai[r][c] * $cos(a);
      end
    end
    for (int c = 0; c < W; c++) for (int k = 0; k < H; k++) begin
      br[k][c] = 0; bi[k][c] = 0;
      for (int r = 0; r < H; r++) begin
        real a;
        a = -2.0 * 3.14159265358979 * real'((r * k) % H) / H;
        br[k][c] += tr[r][c] * $cos(a) - ti[r][c] * $sin(a);
        bi[k][c] += tr[r][c] * $sin(a) + ti[r][c] * $cos(a);
      end
    end
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      cplx_t d;
      read_word(r * W + c, d);
      checks++;
      if (rabs(real'(d.re) - br[r][c]) > 40.0 || rabs(real'(d.im) - bi[r][c]) > 40.0) begin
        failures++;
        if (failures < 10) $display("FAIL X[%0d][%0d] = (%0d,%0d) expected (%f,%f)",
                                    r, c, d.re, d.im, br[r][c], bi[r][c]);
      end
    end

    // roundtrip
    fill_random();
    run(1, cyc);
    checks++;
    if (passes != 3'd4) begin failures++; $display("FAIL roundtrip passes %0d", passes); end
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      cplx_t d;
      read_word(r * W + c, d);
      checks++;
      if (rabs(real'(d.re) - ar[r][c]) > 4.0 || rabs(real'(d.im)) > 4.0) begin
        failures++;
        if (failures < 10) $display("FAIL roundtrip [%0d][%0d] = (%0d,%0d) expected %f",
                                    r, c, d.re, d.im, ar[r][c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
