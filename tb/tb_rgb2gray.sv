// tb_rgb2gray: checks the RGB to gray conversion against the luma formula
// round(0.299 R + 0.587 G + 0.114 B) computed in real arithmetic (one
// level of tolerance for the Q15 weights), plus exact corner colours.
module tb_rgb2gray;
  logic [23:0] rgb;
  logic [7:0]  gray;
  int checks = 0, failures = 0;

  rgb2gray dut (.rgb(rgb), .gray(gray));

  task automatic check(input logic [7:0] r, g, b);
    real e; int ei, d;
    rgb = {r, g, b};
    #1;
    e  = 0.299 * r + 0.587 * g + 0.114 * b;
    ei = int'($floor(e + 0.5));
    d  = int'(gray) - ei;
    checks++;
    if (d > 1 || d < -1) begin
      failures++;
      $display("FAIL rgb=%h gray=%0d expected %0d", {r, g, b}, gray, ei);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0); check(255, 255, 255); check(255, 0, 0); check(0, 255, 0); check(0, 0, 255);
    rgb = 24'hFFFFFF; #1; checks++; if (gray != 8'd255) failures++;
    rgb = 24'h000000; #1; checks++; if (gray != 8'd0) failures++;
    rgb = 24'hFF0000; #1; checks++; if (gray != 8'd76) failures++;
    for (int i = 0; i < 2000; i++) check(8'($urandom), 8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
