// isqrt_pipe: pipelined integer square root, floor(sqrt(radicand)).
//
// Digit-by-digit (restoring) method: each of the IN_W/2 stages brings down
// the next two radicand bits into the partial remainder, tries to subtract
// 4*q+1 (q = root so far) and so decides one root bit. Every stage is
// registered, so one radicand enters per clock and its root leaves
// IN_W/2 clocks later with out_valid. IN_W must be even. rst_n
// (synchronous, active low) clears only the valid flags. The algorithm is
// this design's choice; the reference design only calls a square root on
// re^2 + im^2.
module isqrt_pipe #(
  parameter int unsigned IN_W = 40,
  localparam int unsigned OUT_W = IN_W / 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  radicand,
  output logic             out_valid,
  output logic [OUT_W-1:0] root
);
  localparam int unsigned RW = OUT_W + 2;  // remainder width

  logic [IN_W-1:0]  x_q [OUT_W+1];  // radicand bits not yet used, MSB first
  logic [RW-1:0]    r_q [OUT_W+1];
  logic [OUT_W-1:0] q_q [OUT_W+1];
  logic             v_q [OUT_W+1];

  always_comb begin
    x_q[0] = radicand;
    r_q[0] = '0;
    q_q[0] = '0;
    v_q[0] = in_valid;
  end

  for (genvar i = 0; i < int'(OUT_W); i++) begin : g_stage
    logic [RW+1:0] trial, cand;
    always_comb begin
      trial = {r_q[i], x_q[i][IN_W-1 -: 2]};
      cand  = {(RW+2-OUT_W-2)'(0), q_q[i], 2'b01};
    end
    always_ff @(posedge clk) begin
      v_q[i+1] <= rst_n && v_q[i];
      x_q[i+1] <= x_q[i] << 2;
      if (trial >= cand) begin
        r_q[i+1] <= RW'(trial - cand);
        q_q[i+1] <= {q_q[i][OUT_W-2:0], 1'b1};
      end else begin
        r_q[i+1] <= RW'(trial);
        q_q[i+1] <= {q_q[i][OUT_W-2:0], 1'b0};
      end
    end
  end

  assign out_valid = v_q[OUT_W];
  assign root      = q_q[OUT_W];
endmodule
