// tb_frame_mem: writes random complex words at random addresses, keeps a
// reference copy, and checks reads one clock after the address, including
// read-during-write of the same address (old word expected).
module tb_frame_mem;
  import fft_pkg::*;
  localparam int DEPTH = 2048;
  logic clk = 0;
  logic we;
  logic [10:0] waddr, raddr;
  cplx_t wdata, rdata;
  cplx_t ref_mem [DEPTH];
  bit    valid [DEPTH];
  int checks = 0, failures = 0;

  frame_mem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t expect_d;
    bit    expect_v;
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) valid[i] = 0;
    expect_v = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // result of the read issued in the previous clock
      if (expect_v) begin
        checks++;
        if (rdata != expect_d) begin
          failures++;
          if (failures < 10) $display("FAIL read %h expected %h", rdata, expect_d);
        end
      end
      we    = ($urandom % 2) == 0;
      waddr = 11'($urandom);
      wdata = cplx_t'({$urandom, $urandom});
      raddr = (i % 7 == 0) ? waddr : 11'($urandom);
      expect_v = valid[raddr];
      expect_d = ref_mem[raddr];
      @(posedge clk);
      #1;
      if (we) begin ref_mem[waddr] = wdata; valid[waddr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
