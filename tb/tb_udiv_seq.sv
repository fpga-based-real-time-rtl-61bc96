// tb_udiv_seq: random and corner divisions against the simulator's integer
// division, and the W-clock latency (done seen W clocks after the start clock).
module tb_udiv_seq;
  localparam int W = 24;
  logic clk = 0, rst_n, start, busy, done;
  logic [W-1:0] dividend, divisor, quotient;
  int checks = 0, failures = 0;

  udiv_seq #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] n, d);
    int cyc;
    @(negedge clk);
    dividend = n; divisor = d; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (quotient != ((d == 0) ? {W{1'b1}} : n / d)) begin
      failures++;
      $display("FAIL %0d / %0d = %0d", n, d, quotient);
    end
    if (cyc != W) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    rst_n = 0; start = 0; dividend = 0; divisor = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(255 << 16, 1); run(255 << 16, 8191); run(0, 5); run(24'hFFFFFF, 24'hFFFFFF); run(7, 0);
    for (int i = 0; i < 500; i++) run(W'($urandom), W'(($urandom % 8192) + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
