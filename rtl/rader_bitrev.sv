// rader_bitrev: bit-reversed index for the radix-2 FFT.
//
// The FFT pairs samples by first placing them in bit-reversed order, the job
// of the 'rader' routine of the software FFT this design follows. This block
// reverses the low len_log2 bits of idx, so one circuit serves every
// power-of-two length up to 2^LOGN (rows and columns of an image differ).
// Bits of idx above len_log2 are ignored. Combinational.
module rader_bitrev #(
  parameter int unsigned LOGN = 6,
  localparam int unsigned LW = $clog2(LOGN + 1)
) (
  input  logic [LOGN-1:0] idx,
  input  logic [LW-1:0]   len_log2,
  output logic [LOGN-1:0] rev
);
  logic [LOGN-1:0] full;

  always_comb begin
    for (int i = 0; i < LOGN; i++) full[i] = idx[LOGN-1-i];
    // full reverses all LOGN bits; shift so only the low len_log2 bits count
    rev = full >> (LOGN - int'(len_log2));
  end
endmodule
