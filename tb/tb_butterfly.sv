// tb_butterfly: random samples and twiddles against a + b*W and a - b*W
// in real arithmetic (within one LSB), halved in inverse mode, plus the
// saturation of a sum that overflows.
module tb_butterfly;
  import fft_pkg::*;
  cplx_t a, b, x, y;
  logic signed [15:0] w_re, w_im;
  logic scale;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction


  butterfly dut (.*);

  task automatic cmp(input string what, input real got, input real exp_v);
    checks++;
    if (rabs(got - exp_v) > 1.01) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %f expected %f", what, got, exp_v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      real ph, tr, ti, f;
      a.re = sample_t'($signed(20'($urandom)) >>> 2);
      a.im = sample_t'($signed(20'($urandom)) >>> 2);
      b.re = sample_t'($signed(20'($urandom)) >>> 2);
      b.im = sample_t'($signed(20'($urandom)) >>> 2);
      ph   = 6.283185307 * ($urandom % 1000) / 1000.0;
      w_re = 16'($rtoi($floor(16384.0 * $cos(ph) + 0.5)));
      w_im = 16'($rtoi($floor(-16384.0 * $sin(ph) + 0.5)));
      scale = i[0];
      #1;
      tr = (real'(b.re) * w_re - real'(b.im) * w_im) / 16384.0;
      ti = (real'(b.re) * w_im + real'(b.im) * w_re) / 16384.0;
      f  = scale ? 0.5 : 1.0;
      cmp("x.re", real'(x.re), f * (a.re + tr));
      cmp("x.im", real'(x.im), f * (a.im + ti));
      cmp("y.re", real'(y.re), f * (a.re - tr));
      cmp("y.im", real'(y.im), f * (a.im - ti));
    end
    // saturation: 400000 + 400000 exceeds 2^19-1
    a = '{re: 400000, im: -400000}; b = '{re: 400000, im: -400000};
    w_re = 16384; w_im = 0; scale = 0;
    #1;
    checks += 4;
    if (x.re != 20'sd524287)  failures++;
    if (x.im != -20'sd524288) failures++;
    if (y.re != 0 || y.im != 0) failures += 2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
