// hsd_in_conv: converts an N-bit unsigned binary word into an N-digit HSD
// number (hi/lo vectors, see hsd_pkg).
//
// Each signed digit i is paired with the digit above it (when all digits
// are signed, digits 0-1, 2-3, ... form the pairs).  A pair whose binary
// bits read 01 (value 1) is written as +1 above and -1 below; pairs 00, 10
// and 11 are copied bit for bit, as are all digits outside a pair (the
// unsigned digits of a group and a top signed digit left without a
// partner).  No carries are involved, so the conversion is one gate level
// deep.  This recoding follows the thesis, which chooses the +1,-1 form
// for value 1 so that negative digits enter the unit.  Combinational.
// hi is constant 0 at every digit that is not the low member of a pair,
// and such digits' lo bits are wires from bin.
module hsd_in_conv
  import hsd_pkg::*;
#(
  parameter int N = 32,
  parameter int D = 0
) (
  input  logic [N-1:0] bin,
  output logic [N-1:0] hi,
  output logic [N-1:0] lo
);

  for (genvar i = 0; i < N; i++) begin : g_digit
    if (is_pair_low(i, N, D)) begin : g_low
      // pair (bin[i+1], bin[i]) = 01 -> digit i = -1, digit i+1 = 1
      assign hi[i] = bin[i] & ~bin[i+1];
      assign lo[i] = bin[i];
    end else if (i > 0 && is_pair_low(i - 1, N, D)) begin : g_high
      assign hi[i] = 1'b0;
      assign lo[i] = bin[i] | bin[i-1];
    end else begin : g_copy
      assign hi[i] = 1'b0;
      assign lo[i] = bin[i];
    end
  end

endmodule
