// led_flip: the "signal flip" block of the LED bring-up demo.
//
// A small block with HLS-style block-level handshake (ap_start, ap_done,
// ap_idle, ap_ready) and a registered output with its own valid strobe.
// Each call, started by ap_start while idle, drives led_o with the inverse
// of led_i; one clock later ap_done, ap_ready and led_o_ap_vld pulse for a
// clock and led_o holds its value until the next call. The ARM side pulses
// ap_start with the button level on led_i, so the LED follows the
// inverted button. The port names follow the demo's waveform; the
// one-clock latency is this design's choice. ap_rst is active high.
module led_flip (
  input  logic ap_clk,
  input  logic ap_rst,
  input  logic ap_start,
  output logic ap_done,
  output logic ap_idle,
  output logic ap_ready,
  input  logic led_i,
  output logic led_o,
  output logic led_o_ap_vld
);
  logic running;

  always_ff @(posedge ap_clk) begin
    if (ap_rst) begin
      running      <= 1'b0;
      led_o        <= 1'b0;
      led_o_ap_vld <= 1'b0;
      ap_done      <= 1'b0;
    end else begin
      led_o_ap_vld <= 1'b0;
      ap_done      <= 1'b0;
      if (ap_start && !running) begin
        running      <= 1'b1;
        led_o        <= ~led_i;
        led_o_ap_vld <= 1'b1;
        ap_done      <= 1'b1;
      end else begin
        running <= 1'b0;
      end
    end
  end

  assign ap_ready = ap_done;
  assign ap_idle  = !running && !ap_start;
endmodule
