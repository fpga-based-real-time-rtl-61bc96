// tb_fft1d: loads random lines into the 1D engine and compares the result
// with a DFT computed in real arithmetic in the testbench: 64- and 32-point
// forward transforms (tolerance 6 LSB) and 64- and 16-point inverse
// transforms (result divided by N, tolerance 2 LSB). Also checks that done
// arrives exactly len_log2 * N/2 clocks after start.
module tb_fft1d;
  import fft_pkg::*;
  localparam int NMAX = 64;
  logic clk = 0, rst_n, ld_en, inverse, start, busy, done;
  logic [5:0] ld_idx, rd_idx;
  logic [2:0] len_log2;
  cplx_t ld_data, rd_data;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction


  fft1d #(.NMAX(NMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int lg, input bit inv);
    int n, cyc;
    real xr[NMAX], xi[NMAX];
    n = 1 << lg;
    @(negedge clk);
    len_log2 = 3'(lg);  // the load addresses depend on the length
    for (int i = 0; i < n; i++) begin
      if (inv) begin
        xr[i] = real'($signed(16'($urandom)) >>> 1);
        xi[i] = real'($signed(16'($urandom)) >>> 1);
      end else begin
        xr[i] = real'($urandom % 256);
        xi[i] = real'(int'($urandom % 256) - 128);
      end
      ld_en = 1; ld_idx = 6'(i);
      ld_data = '{re: sample_t'($rtoi(xr[i])), im: sample_t'($rtoi(xi[i]))};
      @(negedge clk);
    end
    ld_en = 0; len_log2 = 3'(lg); inverse = inv; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != lg * n / 2 + 1) begin
      failures++;
      $display("FAIL cycles %0d expected %0d", cyc, lg * n / 2 + 1);
    end
    for (int k = 0; k < n; k++) begin
      real er, ei, s, tol;
      er = 0; ei = 0;
      for (int i = 0; i < n; i++) begin
        real ang;
        ang = (inv ? 2.0 : -2.0) * 3.14159265358979 * real'(i * k % n) / real'(n);
        er += xr[i] * $cos(ang) - xi[i] * $sin(ang);
        ei += xr[i] * $sin(ang) + xi[i] * $cos(ang);
      end
      s   = inv ? 1.0 / real'(n) : 1.0;
      tol = inv ? 2.0 : 6.0;
      rd_idx = 6'(k);
      #1;
      checks++;
      if (rabs(real'(rd_data.re) - er * s) > tol || rabs(real'(rd_data.im) - ei * s) > tol) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d inv=%0d k=%0d got (%0d,%0d) expected (%f,%f)",
                   n, inv, k, rd_data.re, rd_data.im, er * s, ei * s);
      end
    end
  endtask

  initial begin
    rst_n = 0; ld_en = 0; start = 0; inverse = 0; len_log2 = 6; ld_idx = 0; rd_idx = 0; ld_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(6, 0); run(5, 0); run(6, 1); run(4, 1); run(1, 0); run(6, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
