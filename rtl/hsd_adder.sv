// hsd_adder: N-digit hybrid signed-digit adder.
//
// Adds two HSD numbers of the same format (see hsd_pkg: N digits, signed
// digits every D+1 positions and at the top) and returns their sum in that
// format plus a carry out of the top digit in {-1,0,1}, so that
//   value(x) + value(y) = value(z) + 2^N * (cout.v - cout.w).
// Each unsigned position holds an hsd_u_cell, each signed position an
// hsd_s_cell.  A carry produced at a signed digit ripples through at most
// the D unsigned cells above it and ends in the sum of the next signed
// digit, so the longest carry chain is D+1 cells and the delay does not
// grow with N (D = N gives an ordinary ripple-carry adder, D = 0 a fully
// carry-free signed-digit adder).
//
// Each signed cell receives a look-ahead bit computed from the operand
// digits one position down: from an unsigned position, a|b (then the
// carry leaving it is >= 0, else <= 0); from a signed position, "neither
// digit is -1" (same meaning).  The carry into digit 0 is zero.
// Purely combinational.
module hsd_adder
  import hsd_pkg::*;
#(
  parameter int N = 32,  // number of digits
  parameter int D = 0    // distance between signed digits (0..N)
) (
  input  logic [N-1:0] x_hi,
  input  logic [N-1:0] x_lo,
  input  logic [N-1:0] y_hi,
  input  logic [N-1:0] y_lo,
  output logic [N-1:0] z_hi,
  output logic [N-1:0] z_lo,
  output hsd_carry_t   cout
);

  hsd_carry_t c [N+1];       // c[i] is the carry into digit i
  logic       nonneg [N+1];  // carry into digit i is known to be >= 0

  assign c[0]      = '0;
  assign nonneg[0] = 1'b1;
  assign cout      = c[N];

  for (genvar i = 0; i < N; i++) begin : g_digit
    if (is_signed_pos(i, N, D)) begin : g_s
      logic [1:0] zd;
      hsd_s_cell u_cell (
        .x          ({x_hi[i], x_lo[i]}),
        .y          ({y_hi[i], y_lo[i]}),
        .cin_nonneg (nonneg[i]),
        .cin        (c[i]),
        .z          (zd),
        .cout       (c[i+1])
      );
      assign z_hi[i]     = zd[1];
      assign z_lo[i]     = zd[0];
      // neither operand digit is -1
      assign nonneg[i+1] = ~(x_hi[i] & x_lo[i]) & ~(y_hi[i] & y_lo[i]);
    end else begin : g_u
      hsd_u_cell u_cell (
        .a    (x_lo[i]),
        .b    (y_lo[i]),
        .cin  (c[i]),
        .e    (z_lo[i]),
        .cout (c[i+1])
      );
      assign z_hi[i]     = 1'b0;
      assign nonneg[i+1] = x_lo[i] | y_lo[i];
    end
  end

endmodule
