// tb_spectrum_out: the conversion and video output stage on an 8x4 frame.
// The testbench owns a frame memory it preloads, then starts the block and
// collects the output stream while tready toggles at random.
//  1. forward mode on random complex words: each pixel must equal, within
//     one level, round((L - Lmin) * 255 / (Lmax - Lmin)) where L is the
//     log2 rule (leading one plus 8 following bits) of 1 + floor(|z|),
//     computed here from the words;
//  2. a flat frame (all |z| equal): all pixels 0 and flat_frame set;
//  3. roundtrip mode: the real part clamped to 0..255;
//  4. test 3 again with tready always high: the frame must leave as a
//     continuous stream, one pixel per clock.
// Every pixel is checked for tuser (first pixel only), tlast (end of each
// line), equal colour bytes, and the data staying put while stalled.
module tb_spectrum_out;
  import fft_pkg::*;
  localparam int W = 8, H = 4, N = W * H, AW = 5;
  logic clk = 0, rst_n, start, roundtrip, busy, done, flat_frame;
  logic mem_we;
  logic [AW-1:0] mem_waddr, mem_raddr, tb_addr;
  cplx_t mem_wdata, mem_rdata, tb_data;
  logic tb_we;
  logic [23:0] m_axis_tdata;
  logic m_axis_tvalid, m_axis_tready, m_axis_tuser, m_axis_tlast;
  int checks = 0, failures = 0, stalls = 0;
  int exp_pix [N];
  int npix;
  bit ready_always = 0;
  int cyc = 0, t_first = 0, t_last = 0;

  always @(posedge clk) cyc++;

  spectrum_out #(.WIDTH(W), .HEIGHT(H)) dut (.*);
  frame_mem #(.DEPTH(N)) u_mem (.clk(clk), .we(busy ? mem_we : tb_we),
    .waddr(busy ? mem_waddr : tb_addr), .wdata(busy ? mem_wdata : tb_data),
    .raddr(busy ? mem_raddr : tb_addr), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream monitor
  always @(posedge clk) if (rst_n) begin
    if (m_axis_tvalid && !m_axis_tready) stalls++;
    if (m_axis_tvalid && m_axis_tready) begin
      int d;
      d = int'(m_axis_tdata[7:0]) - exp_pix[npix];
      checks++;
      if (d > 1 || d < -1 || m_axis_tdata[23:16] != m_axis_tdata[7:0] || m_axis_tdata[15:8] != m_axis_tdata[7:0]
          || m_axis_tuser != (npix == 0) || m_axis_tlast != ((npix % W) == W - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL pixel %0d = %h (user %b last %b) expected %0d",
                                    npix, m_axis_tdata, m_axis_tuser, m_axis_tlast, exp_pix[npix]);
      end
      if (npix == 0) t_first = cyc;
      t_last = cyc;
      npix++;
    end
  end

  always @(negedge clk) m_axis_tready = ready_always || (($urandom % 3) != 0);

  function automatic int lg(input longint v);  // log2 rule, 8 fraction bits
    int p;
    p = 0;
    while ((64'd1 << (p + 1)) <= v) p++;
    return (p << 8) | int'(((v - (64'sd1 << p)) * 256) >> p);
  endfunction

  task automatic load(input cplx_t words [N]);
    for (int i = 0; i < N; i++) begin
      @(negedge clk) tb_we = 1; tb_addr = AW'(i); tb_data = words[i];
    end
    @(negedge clk) tb_we = 0;
  endtask

  task automatic go(input bit rt);
    npix = 0;
    @(negedge clk) roundtrip = rt; start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (npix != N) begin failures++; $display("FAIL %0d pixels sent", npix); end
  endtask

  initial begin
    cplx_t words [N];
    int l [N], lmin, lmax;
    rst_n = 0; start = 0; roundtrip = 0; tb_we = 0; tb_addr = 0; tb_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. forward conversion
    lmin = 1 << 30; lmax = 0;
    for (int i = 0; i < N; i++) begin
      longint m;
      int sh;
      sh = $urandom % 18;
      words[i].re = sample_t'($signed(20'($urandom)) >>> sh);
      words[i].im = sample_t'($signed(20'($urandom)) >>> sh);
      m = longint'($floor($sqrt(real'(words[i].re) ** 2 + real'(words[i].im) ** 2)));
      while (m * m > longint'(words[i].re) * words[i].re + longint'(words[i].im) * words[i].im) m--;
      while ((m + 1) * (m + 1) <= longint'(words[i].re) * words[i].re + longint'(words[i].im) * words[i].im) m++;
      l[i] = lg(m + 1);
      if (l[i] < lmin) lmin = l[i];
      if (l[i] > lmax) lmax = l[i];
    end
    for (int i = 0; i < N; i++)
      exp_pix[i] = int'($floor(real'(l[i] - lmin) * 255.0 / real'(lmax - lmin) + 0.5));
    load(words);
    go(0);
    checks++;
    if (flat_frame) begin failures++; $display("FAIL flat_frame on a varied frame"); end

    // 2. flat frame
    for (int i = 0; i < N; i++) begin
      words[i] = (i % 2) ? '{re: 300, im: -400} : '{re: -500, im: 0};
      exp_pix[i] = 0;
    end
    load(words);
    go(0);
    checks++;
    if (!flat_frame) begin failures++; $display("FAIL flat_frame not set"); end

    // 3. roundtrip: real part clamped
    for (int i = 0; i < N; i++) begin
      int v;
      v = int'($urandom % 900) - 300;
      words[i] = '{re: sample_t'(v), im: sample_t'(int'($urandom % 7) - 3)};
      exp_pix[i] = (v < 0) ? 0 : (v > 255) ? 255 : v;
    end
    load(words);
    go(1);

    // 4. continuous stream
    ready_always = 1;
    load(words);
    go(1);
    checks++;
    if (t_last - t_first != N - 1) begin
      failures++; $display("FAIL stream took %0d clocks for %0d pixels", t_last - t_first + 1, N);
    end
    ready_always = 0;

    checks++;
    if (stalls == 0) begin failures++; $display("FAIL output never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
