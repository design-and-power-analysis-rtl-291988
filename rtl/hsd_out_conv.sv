// hsd_out_conv: converts an N-digit HSD number into an (N+1)-bit two's
// complement integer.
//
// With the signed-digit code value = x^a - 2*x^s, the number equals the
// vector of all lo bits minus the vector of hi bits shifted left by one
// digit, which one carry-propagate subtraction yields.  N+1 bits hold
// every HSD value (at most 2^N - 1, at least -(2^N - 1)).  The method
// follows the thesis; the output width is this design's.  Combinational.
module hsd_out_conv #(
  parameter int N = 32
) (
  input  logic [N-1:0]        hi,
  input  logic [N-1:0]        lo,
  output logic signed [N:0]   value
);

  // modulo 2^(N+1); the true value always fits N+1 signed bits
  assign value = $signed({1'b0, lo} - {hi, 1'b0});

endmodule
