// hsd_unpack: inverse of hsd_pack.  Splits a packed HSD storage word of
// N + (number of signed digits) bits into its hi and lo vectors; hi is 0
// at every unsigned position.  Pure wiring.
module hsd_unpack
  import hsd_pkg::*;
#(
  parameter int N  = 32,
  parameter int D  = 0,
  localparam int W = hsd_width(N, D)
) (
  input  logic [W-1:0] word,
  output logic [N-1:0] hi,
  output logic [N-1:0] lo
);

  assign lo = word[N-1:0];
  for (genvar i = 0; i < N; i++) begin : g_hi
    if (is_signed_pos(i, N, D)) begin : g_s
      assign hi[i] = word[N + n_signed_below(i, N, D)];
    end else begin : g_u
      assign hi[i] = 1'b0;
    end
  end

endmodule
