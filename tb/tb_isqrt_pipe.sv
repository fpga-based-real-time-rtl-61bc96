// tb_isqrt_pipe: feeds one random radicand per clock (with gaps) and checks
// every root r by r*r <= x < (r+1)*(r+1) in 64-bit arithmetic, in order and
// exactly 20 clocks after entry.
module tb_isqrt_pipe;
  localparam int IN_W = 40;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  logic [IN_W-1:0] radicand;
  logic [IN_W/2-1:0] root;
  longint q_x [$];
  int     q_t [$];
  int cyc = 0;
  int checks = 0, failures = 0;

  isqrt_pipe #(.IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (out_valid) begin
    longint x, r;
    int t;
    x = q_x.pop_front(); t = q_t.pop_front();
    r = longint'(root);
    checks++;
    if (!(r * r <= x && (r + 1) * (r + 1) > x) || (cyc - t) != IN_W / 2) begin
      failures++;
      if (failures < 10) $display("FAIL sqrt(%0d) = %0d after %0d clocks", x, r, cyc - t);
    end
  end

  initial begin
    in_valid = 0; radicand = 0;
    repeat (25) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      case (i % 5)
        0: radicand = IN_W'({$urandom, $urandom});
        1: radicand = IN_W'($urandom % 1000);
        2: begin radicand = IN_W'($urandom % 1000000); radicand = radicand * radicand; end
        3: radicand = {IN_W{1'b1}};
        default: radicand = IN_W'({$urandom, $urandom}) >> ($urandom % 40);
      endcase
      if (in_valid) begin q_x.push_back(longint'(radicand)); q_t.push_back(cyc); end
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (q_x.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
