// tb_workload_128x64: the accelerator built for the 128x64 test images
// (WIDTH=128, HEIGHT=64), run through the same three frames as the
// default-size end-to-end test: forward mode on a random image, roundtrip
// mode, and a single bright pixel (flat spectrum). With 20-bit samples a
// 128x64 transform holds gray levels up to 63 without saturating
// (63 * 8192 < 2^19), so the test images use colour values up to 63; the
// checks, tolerances and counted mechanisms are those of tb_fft_ip_top,
// except that bins below |X| = 256 are not compared: thirteen stages of
// rounding leave those bins' logs too uncertain.
module tb_workload_128x64;
  import fft_pkg::*;
  localparam int W = 128, H = 64, N = W * H, NF = 3;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n;
  logic [23:0] s_axis_tdata, m_axis_tdata;
  logic s_axis_tvalid, s_axis_tready, s_axis_tuser, s_axis_tlast;
  logic m_axis_tvalid, m_axis_tready, m_axis_tuser, m_axis_tlast;
  logic inverse_mode, frame_busy, flat_frame;
  logic ap_rst, ap_start, ap_done, ap_idle, ap_ready, led_i, led_o, led_o_ap_vld;

  int checks = 0, failures = 0;
  int gray_img [NF][N];
  logic [23:0] rgb_img [NF][N];
  int out_img [N];
  int cnt_in_stall = 0, cnt_drop = 0, cnt_out_bp = 0, cnt_fwd = 0, cnt_rt = 0, cnt_flat = 0, cnt_led = 0;
  int cyc = 0, t_captured = 0;

  fft_ip_top #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (s_axis_tvalid && !s_axis_tready) cnt_in_stall++;
    if (m_axis_tvalid && !m_axis_tready) cnt_out_bp++;
    if (s_axis_tvalid && s_axis_tready && !s_axis_tuser && dut.u_cap.state == 2'd1) cnt_drop++;
    if (dut.u_cap.frame_done) t_captured = cyc;
    if (led_o_ap_vld) cnt_led++;
  end

  always @(negedge clk) m_axis_tready = ($urandom % 4) != 0;

  // build the test images
  initial begin
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < N; i++) begin
        logic [23:0] px;
        px = (f == 2) ? ((i == 0) ? 24'h3F3F3F : 24'h000000) : (24'($urandom) & 24'h3F3F3F);
        rgb_img[f][i]  = px;
        gray_img[f][i] = int'($floor(0.299 * px[23:16] + 0.587 * px[15:8] + 0.114 * px[7:0] + 0.5));
      end
  end

  // video source
  task automatic send(input logic [23:0] px, input bit sof, input bit eol);
    if ($urandom % 8 == 0) begin s_axis_tvalid = 0; @(negedge clk); end
    s_axis_tdata = px; s_axis_tuser = sof; s_axis_tlast = eol; s_axis_tvalid = 1;
    @(posedge clk);
    while (!s_axis_tready) @(posedge clk);
    @(negedge clk);
    s_axis_tvalid = 0;
  endtask

  initial begin
    s_axis_tvalid = 0; s_axis_tdata = 0; s_axis_tuser = 0; s_axis_tlast = 0;
    @(posedge rst_n);
    for (int f = 0; f < NF; f++) begin
      for (int j = 0; j < 3; j++) send(24'h808080, 0, 0);  // mid-frame pixels
      inverse_mode = (f == 1);
      for (int i = 0; i < N; i++) send(rgb_img[f][i], i == 0, (i % W) == W - 1);
    end
  end

  // LED demo calls
  initial begin
    ap_rst = 1; ap_start = 0; led_i = 0;
    repeat (5) @(negedge clk);
    ap_rst = 0;
    for (int i = 0; i < 4; i++) begin
      led_i = i[0]; ap_start = 1;
      @(negedge clk) ap_start = 0;
      checks++;
      if (!led_o_ap_vld || led_o != !led_i) begin failures++; $display("FAIL LED call %0d", i); end
      repeat (3) @(negedge clk);
    end
  end

  task automatic collect();
    int n;
    n = 0;
    while (n < N) begin
      @(posedge clk);
      if (m_axis_tvalid && m_axis_tready) begin
        checks++;
        if (m_axis_tuser != (n == 0) || m_axis_tlast != ((n % W) == W - 1)) begin
          failures++; $display("FAIL framing at pixel %0d", n);
        end
        out_img[n] = int'(m_axis_tdata[7:0]);
        n++;
      end
    end
  endtask

  task automatic check_forward(input int f);
    real xr [H][W], xi [H][W], tr [H][W], ti [H][W], l [H][W], lmin, lmax, hw_min, hw_max;
    int compared;
    for (int r = 0; r < H; r++) for (int k = 0; k < W; k++) begin
      tr[r][k] = 0; ti[r][k] = 0;
      for (int c = 0; c < W; c++) begin
        real a;
        a = -2.0 * PI * real'((c * k) % W) / W;
        tr[r][k] += gray_img[f][r * W + c] * $cos(a);
        ti[r][k] += gray_img[f][r * W + c] * $sin(a);
      end
    end
    lmin = 1.0e9; lmax = -1.0;
    for (int c = 0; c < W; c++) for (int k = 0; k < H; k++) begin
      real m;
      xr[k][c] = 0; xi[k][c] = 0;
      for (int r = 0; r < H; r++) begin
        real a;
        a = -2.0 * PI * real'((r * k) % H) / H;
        xr[k][c] += tr[r][c] * $cos(a) - ti[r][c] * $sin(a);
        xi[k][c] += tr[r][c] * $sin(a) + ti[r][c] * $cos(a);
      end
      m = $sqrt(xr[k][c] ** 2 + xi[k][c] ** 2);
      l[k][c] = $ln(1.0 + m) / $ln(2.0);
      if (l[k][c] < lmin) lmin = l[k][c];
      if (l[k][c] > lmax) lmax = l[k][c];
    end
    // The extremes decide the whole mapping. The maximum (the DC bin) is
    // accurate; the minimum comes from the smallest bin, whose log is
    // rounding-limited. Both are checked against the exact values, then the
    // block's own extremes are used to map the exact L of every bin.
    hw_min = real'(dut.u_out.lmin) / 256.0;
    hw_max = real'(dut.u_out.lmax) / 256.0;
    checks += 2;
    if (rabs(hw_max - lmax) > 0.1) begin failures++; $display("FAIL max L %f expected %f", hw_max, lmax); end
    if (rabs(hw_min - lmin) > 1.5) begin failures++; $display("FAIL min L %f expected %f", hw_min, lmin); end
    lmin = hw_min;
    lmax = hw_max;
    compared = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      real e;
      if ($sqrt(xr[r][c] ** 2 + xi[r][c] ** 2) < 256.0) continue;
      e = (l[r][c] - lmin) / (lmax - lmin) * 255.0;
      compared++;
      checks++;
      if (rabs(real'(out_img[r * W + c]) - e) > 4.0) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d bin [%0d][%0d] = %0d expected %f", f, r, c, out_img[r * W + c], e);
      end
    end
    checks++;
    if (compared < N * 9 / 10) begin failures++; $display("FAIL only %0d bins compared", compared); end
  endtask

  initial begin
    rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      collect();
      checks++;
      if (cyc - t_captured > 3333333) begin
        failures++; $display("FAIL frame %0d took %0d clocks", f, cyc - t_captured);
      end
      $display("frame %0d: %0d clocks from last input pixel to last output pixel", f, cyc - t_captured);
      if (f == 0) begin
        cnt_fwd++;
        check_forward(0);
      end else if (f == 1) begin
        cnt_rt++;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (out_img[i] - gray_img[1][i] > 5 || gray_img[1][i] - out_img[i] > 5) begin
            failures++;
            if (failures < 10) $display("FAIL roundtrip pixel %0d = %0d expected %0d", i, out_img[i], gray_img[1][i]);
          end
        end
      end else begin
        cnt_fwd++;
        if (flat_frame) cnt_flat++;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (out_img[i] != 0) begin failures++; if (failures < 10) $display("FAIL flat pixel %0d = %0d", i, out_img[i]); end
        end
      end
    end
    $display("mechanisms: input stall %0d, dropped %0d, output back-pressure %0d, forward %0d, roundtrip %0d, flat %0d, LED %0d",
             cnt_in_stall, cnt_drop, cnt_out_bp, cnt_fwd, cnt_rt, cnt_flat, cnt_led);
    checks += 7;
    if (cnt_in_stall == 0) begin failures++; $display("FAIL no input stall"); end
    if (cnt_drop == 0)     begin failures++; $display("FAIL no dropped pixel"); end
    if (cnt_out_bp == 0)   begin failures++; $display("FAIL no output back-pressure"); end
    if (cnt_fwd == 0)      begin failures++; $display("FAIL no forward frame"); end
    if (cnt_rt == 0)       begin failures++; $display("FAIL no roundtrip frame"); end
    if (cnt_flat == 0)     begin failures++; $display("FAIL no flat frame"); end
    if (cnt_led == 0)      begin failures++; $display("FAIL no LED call"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
