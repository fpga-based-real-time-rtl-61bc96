// tb_twiddle_rom: every table entry, forward and inverse, against
// 16384*cos and 16384*sin from the simulator's maths functions
// (at most one LSB apart).
module tb_twiddle_rom;
  localparam int NMAX = 64;
  logic [4:0] k;
  logic inverse;
  logic signed [15:0] w_re, w_im;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction


  twiddle_rom #(.NMAX(NMAX)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int inv = 0; inv < 2; inv++) begin
      for (int i = 0; i < NMAX / 2; i++) begin
        real c, s;
        k = 5'(i); inverse = inv[0];
        #1;
        c = 16384.0 * $cos(2.0 * 3.14159265358979 * i / NMAX);
        s = 16384.0 * $sin(2.0 * 3.14159265358979 * i / NMAX);
        if (!inverse) s = -s;
        checks += 2;
        if (rabs(real'(w_re) - c) > 1.0) begin
          failures++; $display("FAIL k=%0d re=%0d expected %f", i, w_re, c);
        end
        if (rabs(real'(w_im) - s) > 1.0) begin
          failures++; $display("FAIL k=%0d inv=%0d im=%0d expected %f", i, inv, w_im, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
