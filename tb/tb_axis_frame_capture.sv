// tb_axis_frame_capture: streams pixels with random gaps into the capture
// block: a few pixels before the start of frame (must be dropped), then a
// full 64x32 frame, then more pixels that must be stalled (tready low, no
// writes) until arm, then a second frame that starts with the held pixel. Every memory write is checked
// for address and for gray = round(0.299R + 0.587G + 0.114B) within one
// level; frame_done must pulse once per frame.
module tb_axis_frame_capture;
  import fft_pkg::*;
  localparam int W = 64, H = 32, AW = 11;
  logic clk = 0, rst_n, arm;
  logic [23:0] s_axis_tdata;
  logic s_axis_tvalid, s_axis_tready, s_axis_tuser, s_axis_tlast, frame_done, we;
  logic [AW-1:0] waddr;
  cplx_t wdata;
  int checks = 0, failures = 0;
  int exp_gray [W * H];
  int nwrites = 0, ndone = 0, stall_cycles = 0;

  axis_frame_capture #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (we) begin
      int d;
      d = int'(wdata.re) - exp_gray[waddr];
      checks++;
      if (d > 1 || d < -1 || wdata.im != 0 || int'(waddr) != nwrites % (W * H)) begin
        failures++;
        if (failures < 10) $display("FAIL write %0d at %0d = %0d expected %0d", nwrites, waddr, wdata.re, exp_gray[waddr]);
      end
      nwrites++;
    end
    if (frame_done) ndone++;
    if (s_axis_tvalid && !s_axis_tready) stall_cycles++;
  end

  // send one pixel, waiting for acceptance
  task automatic send(input logic [23:0] px, input bit sof, input bit eol);
    while ($urandom % 4 == 0) begin
      s_axis_tvalid = 0; @(negedge clk);
    end
    s_axis_tdata = px; s_axis_tuser = sof; s_axis_tlast = eol; s_axis_tvalid = 1;
    @(posedge clk);
    while (!s_axis_tready) @(posedge clk);
    @(negedge clk);
    s_axis_tvalid = 0;
  endtask

  task automatic frame(input int first);
    for (int i = first; i < W * H; i++) begin
      logic [23:0] px;
      px = 24'($urandom);
      exp_gray[i] = int'($floor(0.299 * px[23:16] + 0.587 * px[15:8] + 0.114 * px[7:0] + 0.5));
      send(px, i == 0, (i % W) == W - 1);
    end
  endtask

  initial begin
    rst_n = 0; arm = 0; s_axis_tvalid = 0; s_axis_tdata = 0; s_axis_tuser = 0; s_axis_tlast = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 5; i++) send(24'h123456, 0, 0);  // no start of frame yet: dropped
    checks++;
    if (nwrites != 0) begin failures++; $display("FAIL pixels before SOF were stored"); end
    frame(0);
    @(negedge clk);
    checks += 2;
    if (ndone != 1) begin failures++; $display("FAIL frame_done count %0d", ndone); end
    if (s_axis_tready) begin failures++; $display("FAIL tready high after a full frame"); end
    // the source keeps offering a pixel: it must be held off
    s_axis_tvalid = 1; s_axis_tuser = 1; s_axis_tdata = 24'hFFFFFF;
    repeat (20) @(negedge clk);
    checks++;
    if (nwrites != W * H || stall_cycles < 19) begin
      failures++; $display("FAIL stall: writes %0d stall cycles %0d", nwrites, stall_cycles);
    end
    // after arm the held pixel is taken as the first pixel of the next frame
    exp_gray[0] = 255;
    arm = 1; @(negedge clk); arm = 0;
    while (!s_axis_tready) @(negedge clk);
    @(negedge clk);
    s_axis_tvalid = 0;
    frame(1);
    repeat (3) @(negedge clk);
    checks++;
    if (ndone != 2 || nwrites != 2 * W * H) begin failures++; $display("FAIL second frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
