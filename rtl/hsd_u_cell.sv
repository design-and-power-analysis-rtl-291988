// hsd_u_cell: adder cell for an unsigned digit position of an HSD adder.
//
// Adds two operand bits a and b and an incoming carry cin in {-1,0,1}
// (encoded {v,w}, value v - w).  The total t = a + b + cin lies in
// [-1, 3] and is written uniquely as t = 2*cout + e with the sum bit e in
// {0,1} and cout in {-1,0,1}:  t = -1 gives cout = -1, e = 1;  t = 2 or 3
// gives cout = 1.  The cell therefore passes a carry chain of either sign
// through, which is what bounds the longest chain to the distance between
// signed digits plus one.
//
// The cell's function follows the thesis (sum bit unsigned, carries in
// {-1,0,1} held as a difference of two bits); its gate-level equations are
// this design's own.  Purely combinational.
module hsd_u_cell
  import hsd_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  hsd_carry_t cin,
  output logic       e,
  output hsd_carry_t cout
);

  always_comb begin
    // parity of a + b + v - w equals parity of a + b + v + w
    e = a ^ b ^ cin.v ^ cin.w;
    // t >= 2 : at least two of {a, b, v} are set and w is clear, or all three
    cout.v = (a & b & cin.v) | (~cin.w & ((a & b) | (a & cin.v) | (b & cin.v)));
    // t = -1 : both bits zero and a negative carry comes in
    cout.w = ~a & ~b & ~cin.v & cin.w;
  end

endmodule
