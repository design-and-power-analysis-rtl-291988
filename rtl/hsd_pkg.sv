// hsd_pkg: shared types and elaboration-time helpers for the hybrid
// signed-digit (HSD) datapath.
//
// An N-digit HSD number mixes unsigned digits {0,1} with signed digits
// {-1,0,1}.  A distance parameter D sets how far apart the signed digits
// are: D = 0 makes every digit signed (a pure binary signed-digit number),
// D = N makes every digit unsigned (plain binary).  For 0 < D < N the
// signed digits sit at positions D, 2D+1, 3D+2, ... (every D+1 digits,
// counted so that the lowest group is D unsigned digits followed by one
// signed digit), and the most significant digit is always signed so that
// the representation reaches negative values.
//
// Inside the datapath an HSD number travels as two N-bit vectors:
//   lo[i] : the unsigned bit, or the low bit x^a of a signed digit
//   hi[i] : the high bit x^s of a signed digit (0 at unsigned positions)
// Signed digits use the two-bit code {x^s,x^a} with value x^a - 2*x^s:
// 00 = 0, 01 = 1, 11 = -1 (10 is never produced).  In storage the word is
// packed to N + (number of signed digits) bits, see hsd_width().
//
// Carries between digit positions take values {-1,0,1} and travel as a
// pair {v,w} with value v - w.
package hsd_pkg;

  // Carry in {-1,0,1}: value = v - w.
  typedef struct packed {
    logic v;
    logic w;
  } hsd_carry_t;

  // Is digit position i a signed digit in an n-digit number of distance d?
  function automatic bit is_signed_pos(int i, int n, int d);
    if (d <= 0) return 1'b1;
    if (d >= n) return 1'b0;
    return ((i + 1) % (d + 1) == 0) || (i == n - 1);
  endfunction

  // Number of signed digits.
  function automatic int n_signed(int n, int d);
    int cnt = 0;
    for (int i = 0; i < n; i++) if (is_signed_pos(i, n, d)) cnt++;
    return cnt;
  endfunction

  // Number of signed digits below position i (index of digit i's x^s bit
  // among the packed sign bits).
  function automatic int n_signed_below(int i, int n, int d);
    int cnt = 0;
    for (int k = 0; k < i; k++) if (is_signed_pos(k, n, d)) cnt++;
    return cnt;
  endfunction

  // Width of a packed HSD word: one bit per unsigned digit, two per signed.
  function automatic int hsd_width(int n, int d);
    return n + n_signed(n, d);
  endfunction

  // Input conversion pairs a signed digit i with the digit above it, unless
  // digit i is itself the upper member of the pair below (all-signed case)
  // or is the most significant digit.
  function automatic bit is_pair_low(int i, int n, int d);
    bit low = 1'b0;  // low-member flag of position k-1 while scanning up
    for (int k = 0; k <= i; k++)
      low = is_signed_pos(k, n, d) && (k + 1 < n) && !low;
    return low;
  endfunction

endpackage
