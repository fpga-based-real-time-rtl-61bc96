// tb_led_flip: calls the flip block with both button levels and checks the
// inverted LED output, the one-clock done/ready/valid pulses and idle.
module tb_led_flip;
  logic ap_clk = 0, ap_rst, ap_start, ap_done, ap_idle, ap_ready, led_i, led_o, led_o_ap_vld;
  int checks = 0, failures = 0;

  led_flip dut (.*);

  always #5 ap_clk = ~ap_clk;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (10000) @(posedge ap_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ap_rst = 1; ap_start = 0; led_i = 0;
    repeat (3) @(posedge ap_clk);
    #1 ap_rst = 0;
    @(posedge ap_clk); #1;
    chk(ap_idle && !ap_done && !led_o_ap_vld, "idle after reset");
    for (int i = 0; i < 40; i++) begin
      bit lv;
      lv = 1'($urandom);
      led_i = lv; ap_start = 1;
      #1 chk(!ap_idle, "not idle while started");
      @(posedge ap_clk); #1;
      ap_start = 0;
      chk(ap_done && ap_ready && led_o_ap_vld, "done pulse");
      chk(led_o == !lv, "led_o is the inverted input");
      @(posedge ap_clk); #1;
      chk(!ap_done && !led_o_ap_vld && ap_idle, "pulse lasts one clock");
      chk(led_o == !lv, "led_o holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
