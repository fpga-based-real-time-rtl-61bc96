// tb_log2_fx: checks the fixed-point log2 against the real log2 (within
// the 0.087 error of the linear mantissa plus one LSB) and, exactly,
// against the defining rule: integer part = floor(log2 x), fraction =
// floor((x - 2^p) * 256 / 2^p).
module tb_log2_fx;
  logic [20:0] x;
  logic [12:0] y;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction


  log2_fx #(.IN_W(21), .FRAC_W(8)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int unsigned v);
    int p; longint f; real got;
    x = 21'(v);
    #1;
    p = 0;
    while ((64'd1 << (p + 1)) <= v) p++;
    f = ((longint'(v) - (64'sd1 << p)) * 256) >> p;
    got = real'(y) / 256.0;
    checks += 2;
    if (y != 13'((p << 8) | f)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%h expected %h", v, y, (p << 8) | f);
    end
    if (rabs(got - $ln(real'(v)) / $ln(2.0)) > 0.0865 + 1.0 / 256.0) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d log %f", v, got);
    end
  endtask

  initial begin
    for (int v = 1; v < 2000; v++) check(v);
    for (int i = 0; i < 3000; i++) check(($urandom % 2097151) + 1);
    check(2097151); check(1 << 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
