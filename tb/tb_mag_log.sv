// tb_mag_log: random complex samples, one per clock with gaps; each result
// must carry its own tag, arrive 22 clocks after entry, and lie within
// 0.1 of log2(1 + floor(|z|)) computed in real arithmetic.
module tb_mag_log;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  cplx_t in_data;
  logic [10:0] in_tag, out_tag;
  logic [12:0] out_log;
  real exp_q [$];
  int  tag_q [$], t_q [$];
  int  cyc = 0, checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction


  mag_log #(.TAG_W(11)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (out_valid) begin
    real e; int tg, t;
    e = exp_q.pop_front(); tg = tag_q.pop_front(); t = t_q.pop_front();
    checks++;
    if (rabs(real'(out_log) / 256.0 - e) > 0.1 || int'(out_tag) != tg || cyc - t != 22) begin
      failures++;
      if (failures < 10) $display("FAIL log %f expected %f tag %0d/%0d lat %0d",
                                  real'(out_log) / 256.0, e, out_tag, tg, cyc - t);
    end
  end

  initial begin
    in_valid = 0; in_data = '0; in_tag = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int sh;
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      sh = $urandom % 20;
      in_data.re = sample_t'($signed(20'($urandom)) >>> sh);
      in_data.im = sample_t'($signed(20'($urandom)) >>> sh);
      if (i == 5) in_data = '0;
      if (i == 6) in_data = '{re: -524288, im: -524288};
      in_tag = 11'($urandom);
      if (in_valid) begin
        real m;
        m = $sqrt(real'(in_data.re) * real'(in_data.re) + real'(in_data.im) * real'(in_data.im));
        m = $floor(m);  // the block uses the integer part of |z|
        exp_q.push_back($ln(1.0 + m) / $ln(2.0));
        tag_q.push_back(int'(in_tag));
        t_q.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
