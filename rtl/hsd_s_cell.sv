// hsd_s_cell: adder cell for a signed digit position of an HSD adder.
//
// Adds two signed digits x, y in {-1,0,1} (code {s,a}, value a - 2s) and
// an incoming carry cin in {-1,0,1}.  The cell first splits x + y into an
// outgoing carry cout and an interim digit u with x + y = 2*cout + u, then
// forms the result digit z = u + cin.  The split uses only x, y and one
// look-ahead bit, cin_nonneg, which tells whether the incoming carry is
// known to be >= 0 (otherwise it is known to be <= 0):
//
//   x + y        cin_nonneg = 1      cin_nonneg = 0
//     2          cout  1, u  0       cout  1, u  0
//     1          cout  1, u -1       cout  0, u  1
//     0          cout  0, u  0       cout  0, u  0
//    -1          cout  0, u -1       cout -1, u  1
//    -2          cout -1, u  0       cout -1, u  0
//
// so u and cin never have the same nonzero sign and z stays in {-1,0,1}.
// cout does not depend on cin: this is where every carry chain stops.
// The look-ahead bit comes from the operand digits one position down
// (see hsd_adder), the same idea as the modified binary signed-digit
// addition rules in which the digit pair to the right selects the carry.
//
// The cell's function (signed-digit operands and result, carries as a
// difference of two bits, carry chains ending at signed digits) follows
// the thesis; the selection table above is this design's own
// construction.  Purely combinational.
module hsd_s_cell
  import hsd_pkg::*;
(
  input  logic [1:0]  x,          // {s,a}
  input  logic [1:0]  y,          // {s,a}
  input  logic        cin_nonneg, // incoming carry is known to be >= 0
  input  hsd_carry_t  cin,
  output logic [1:0]  z,          // {s,a}
  output hsd_carry_t  cout
);

  logic signed [2:0] sum_xy, u, zval;

  always_comb begin
    sum_xy = $signed({2'b00, x[0]}) - $signed({1'b0, x[1], 1'b0})
           + $signed({2'b00, y[0]}) - $signed({1'b0, y[1], 1'b0});
    cout = '0;
    u    = '0;
    unique case (sum_xy)
      3'sd2:  begin cout.v = 1'b1; u = 3'sd0; end
      3'sd1:  if (cin_nonneg) begin cout.v = 1'b1; u = -3'sd1; end
              else            begin                u =  3'sd1; end
      -3'sd1: if (cin_nonneg) begin                u = -3'sd1; end
              else            begin cout.w = 1'b1; u =  3'sd1; end
      -3'sd2: begin cout.w = 1'b1; u = 3'sd0; end
      default: begin end
    endcase
    zval = u + $signed({2'b00, cin.v}) - $signed({2'b00, cin.w});
    // encode {s,a}: 0 -> 00, 1 -> 01, -1 -> 11
    z = {zval[2], zval != 3'sd0};
  end

endmodule
