// tb_rader_bitrev: every index of every length 2..64 against a bit
// reversal computed by a loop in the testbench.
module tb_rader_bitrev;
  localparam int LOGN = 6;
  logic [LOGN-1:0] idx, rev;
  logic [2:0]      len_log2;
  int checks = 0, failures = 0;

  rader_bitrev #(.LOGN(LOGN)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 1; l <= LOGN; l++) begin
      for (int i = 0; i < (1 << l); i++) begin
        int e;
        e = 0;
        for (int b = 0; b < l; b++) if (i & (1 << b)) e |= 1 << (l - 1 - b);
        idx = LOGN'(i); len_log2 = 3'(l);
        #1;
        checks++;
        if (int'(rev) != e) begin
          failures++;
          $display("FAIL len=%0d idx=%0d rev=%0d expected %0d", 1 << l, i, rev, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
