// hsd_pack: packs an HSD number from its two N-bit vectors (hi, lo) into
// the storage word of N + (number of signed digits) bits.
//
// Word layout: bits [N-1:0] hold lo (unsigned bits and the x^a bits of the
// signed digits, by digit position); the bits above hold the x^s bits of
// the signed digits in ascending digit order.  hi bits at unsigned
// positions are dropped (they are always 0).  Pure wiring.
module hsd_pack
  import hsd_pkg::*;
#(
  parameter int N  = 32,
  parameter int D  = 0,
  localparam int W = hsd_width(N, D)
) (
  input  logic [N-1:0] hi,
  input  logic [N-1:0] lo,
  output logic [W-1:0] word
);

  assign word[N-1:0] = lo;
  for (genvar i = 0; i < N; i++) begin : g_hi
    if (is_signed_pos(i, N, D)) begin : g_s
      assign word[N + n_signed_below(i, N, D)] = hi[i];
    end
  end

endmodule
