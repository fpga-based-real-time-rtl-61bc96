// udiv_seq: sequential unsigned divider, quotient = dividend / divisor.
//
// Restoring division, one quotient bit per clock: after start, W clocks
// later done pulses and quotient holds floor(dividend/divisor). A zero
// divisor gives an all-ones quotient. Used once per frame to form the
// scale factor of the gray-level normalisation. This design's own block.
module udiv_seq #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient
);
  logic [W-1:0] rem, den, num;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0] trial;

  assign trial = {rem, num[W-1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; cnt <= '0;
      rem <= '0; den <= '0; num <= '0; quotient <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; cnt <= '0; rem <= '0;
          den <= divisor; num <= dividend; quotient <= '0;
        end
      end else begin
        num <= num << 1;
        if (trial >= {1'b0, den}) begin
          rem      <= W'(trial - {1'b0, den});
          quotient <= {quotient[W-2:0], 1'b1};
        end else begin
          rem      <= W'(trial);
          quotient <= {quotient[W-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(W+1))'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
