// hsd_addsub: N-digit hybrid signed-digit adder/subtractor.
//
// add_sub = 0 computes x + y, add_sub = 1 computes x - y.  For subtraction
// y is replaced by its HSD complement (hsd_complement) through a
// multiplexer in front of the HSD adder, and the adder's carry out is
// lowered by the borrow the complement produced at its top digit.  The
// result carry `cout` is a two's complement value in [-2, 1]:
//   value(x) +/- value(y) = value(z) + 2^N * cout.
// The subtracted form of y is always a valid HSD number of the same
// format, so the adder itself needs no change; the borrows that the +1
// signed digits of y hand to the digit above are absorbed inside the
// complement logic, and only the top one reaches the carry-out adjustment.
//
// ARCH = 1 is the basic adder/subtractor (ripple increment inside each
// unsigned group of the complement); ARCH = 2 builds that increment as
// carry look-ahead logic.  Purely combinational.
module hsd_addsub
  import hsd_pkg::*;
#(
  parameter int N    = 32,
  parameter int D    = 0,
  parameter int ARCH = 1
) (
  input  logic              add_sub,  // 0: add, 1: subtract
  input  logic [N-1:0]      x_hi,
  input  logic [N-1:0]      x_lo,
  input  logic [N-1:0]      y_hi,
  input  logic [N-1:0]      y_lo,
  output logic [N-1:0]      z_hi,
  output logic [N-1:0]      z_lo,
  output logic signed [1:0] cout
);

  logic [N-1:0] yc_hi, yc_lo, ym_hi, ym_lo;
  logic         borrow;
  hsd_carry_t   ac;

  hsd_complement #(.N(N), .D(D), .ARCH(ARCH)) u_comp (
    .a_hi       (y_hi),
    .a_lo       (y_lo),
    .b_hi       (yc_hi),
    .b_lo       (yc_lo),
    .borrow_out (borrow)
  );

  assign ym_hi = add_sub ? yc_hi : y_hi;
  assign ym_lo = add_sub ? yc_lo : y_lo;

  hsd_adder #(.N(N), .D(D)) u_add (
    .x_hi (x_hi),
    .x_lo (x_lo),
    .y_hi (ym_hi),
    .y_lo (ym_lo),
    .z_hi (z_hi),
    .z_lo (z_lo),
    .cout (ac)
  );

  // carry-out adjustment: (v - w) - borrow
  assign cout = $signed({1'b0, ac.v}) - $signed({1'b0, ac.w})
              - $signed({1'b0, add_sub & borrow});

endmodule
