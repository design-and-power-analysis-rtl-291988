// hsd_complement: negation of an N-digit HSD number (the B-operand
// complement logic of the HSD adder/subtractor).
//
// With every digit signed (D = 0) negation is a digit-wise code change,
// 1 <-> -1: b_a = a_a, b_s = a_a & ~a_s.
//
// Otherwise the number is read as groups, each a run of unsigned digits
// topped by one signed digit.  Within a group
//   -(S*2^k + U) = (W - S - 1)*2^k + (~U + 1 mod 2^k)
// where W is the carry out of the increment ~U + 1 (W = 1 only if U = 0).
// The unsigned digits are therefore inverted and incremented, and the
// signed digit A is re-encoded from A and W:
//   A = -1 : B = W          A = 0 : B = W - 1
//   A = +1 : B = W and a borrow of -1 passes to the digit above
// i.e. B_s = ~W & ~A_a & ~A_s,  B_a = B_s | (A_a & W).
// The borrow out of a +1 digit depends only on A, never on the increment
// chain.  It is taken by the next group by starting that group's
// increment with ~borrow instead of 1 (so the group computes ~U + 1 - 1).
// The borrow out of the top digit, or the inverted final increment carry
// when there is no signed digit, leaves as borrow_out: the true value is
//   -value(a) = value(b) - 2^N * borrow_out.
//
// ARCH selects how the in-group increment carries are formed: 1 ripples
// them digit by digit, 2 computes each one directly as the AND of the
// inverted bits below it in its group (carry look-ahead).  Both give the
// same result.  Purely combinational.  In the all-signed format (the
// default) b_lo is a_lo and borrow_out is 0, so those outputs are plain
// wires or constants there.
module hsd_complement
  import hsd_pkg::*;
#(
  parameter int N    = 32,
  parameter int D    = 0,
  parameter int ARCH = 1   // 1: ripple increment, 2: look-ahead increment
) (
  input  logic [N-1:0] a_hi,
  input  logic [N-1:0] a_lo,
  output logic [N-1:0] b_hi,
  output logic [N-1:0] b_lo,
  output logic         borrow_out
);

  if (D == 0) begin : g_sd
    assign b_lo       = a_lo;
    assign b_hi       = a_lo & ~a_hi;
    assign borrow_out = 1'b0;
  end else begin : g_hsd
    logic [N:0] inc;     // increment carry into each digit (W at signed digits)
    logic [N:0] start;   // carry that starts the group containing each digit

    // group starts: digit 0, and every digit just above a signed digit
    always_comb begin
      start[0] = 1'b1;
      for (int i = 0; i < N; i++) begin
        if (is_signed_pos(i, N, D)) begin
          start[i+1] = ~(a_lo[i] & ~a_hi[i]);   // no borrow from a +1 digit
        end else begin
          start[i+1] = start[i];
        end
      end
    end

    if (ARCH == 2) begin : g_cla
      // inc[i] = group start carry AND the inverted bits of the group below i
      for (genvar i = 0; i <= N; i++) begin : g_inc
        localparam int F = first_of_group(i);
        if (i > F) begin : g_and
          assign inc[i] = start[i] & (&(~a_lo[i-1:F]));
        end else begin : g_first
          assign inc[i] = start[i];
        end
      end
    end else begin : g_ripple
      always_comb begin
        inc[0] = 1'b1;
        for (int i = 0; i < N; i++) begin
          if (is_signed_pos(i, N, D)) inc[i+1] = start[i+1];
          else                        inc[i+1] = inc[i] & ~a_lo[i];
        end
      end
    end

    always_comb begin
      for (int i = 0; i < N; i++) begin
        if (is_signed_pos(i, N, D)) begin
          b_hi[i] = ~inc[i] & ~a_lo[i] & ~a_hi[i];
          b_lo[i] = b_hi[i] | (a_lo[i] & inc[i]);
        end else begin
          b_hi[i] = 1'b0;
          b_lo[i] = ~a_lo[i] ^ inc[i];
        end
      end
      borrow_out = ~inc[N];
    end
  end

  // lowest digit index of the group that digit i belongs to
  function automatic int first_of_group(int i);
    int f = 0;
    for (int k = 0; k < i; k++) if (is_signed_pos(k, N, D)) f = k + 1;
    return f;
  endfunction

endmodule
