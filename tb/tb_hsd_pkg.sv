// tb_hsd_pkg: reference models shared by the HSD testbenches.  Values are
// computed straight from the digit definitions (unsigned digit = bit,
// signed digit = lo - 2*hi), independently of the adder and converter
// structure under test.
package tb_hsd_pkg;
  import hsd_pkg::*;

  localparam int NMAX = 32;

  // numerical value of an HSD number given as hi/lo vectors
  function automatic longint hsd_value(logic [NMAX-1:0] hi, logic [NMAX-1:0] lo, int n);
    longint v = 0;
    for (int i = 0; i < n; i++)
      v += (longint'(lo[i]) - 2 * longint'(hi[i])) <<< i;
    return v;
  endfunction

  // is every digit a legal code for its position (no 10 code, hi=0 at
  // unsigned positions)?
  function automatic bit hsd_legal(logic [NMAX-1:0] hi, logic [NMAX-1:0] lo, int n, int d);
    for (int i = 0; i < n; i++) begin
      if (is_signed_pos(i, n, d)) begin
        if (hi[i] && !lo[i]) return 1'b0;
      end else if (hi[i]) return 1'b0;
    end
    return 1'b1;
  endfunction

  // random legal HSD number; bias > 0 makes the digits 0 or extreme more
  // often, which produces long carry chains
  function automatic void hsd_random(output logic [NMAX-1:0] hi, output logic [NMAX-1:0] lo,
                                     input int n, input int d, input int style);
    int r;
    hi = '0;
    lo = '0;
    for (int i = 0; i < n; i++) begin
      r = $urandom_range(0, 2);
      if (style == 1) r = 1;              // all +1 / all ones
      if (style == 2) r = 2;              // all -1 (or all zero at unsigned)
      if (style == 3) r = 0;              // all zero
      if (is_signed_pos(i, n, d)) begin
        case (r)
          0: begin hi[i] = 1'b0; lo[i] = 1'b0; end
          1: begin hi[i] = 1'b0; lo[i] = 1'b1; end
          default: begin hi[i] = 1'b1; lo[i] = 1'b1; end
        endcase
      end else begin
        lo[i] = (r == 1) ? 1'b1 : (r == 2) ? 1'b0 : 1'($urandom_range(0, 1));
        if (style == 3) lo[i] = 1'b0;
      end
    end
  endfunction

  // packed storage word: lo bits first, then the hi bits of the signed
  // digits in ascending digit order (zero-extended to 2*NMAX bits)
  function automatic logic [2*NMAX-1:0] hsd_pack_word(logic [NMAX-1:0] hi, logic [NMAX-1:0] lo,
                                                     int n, int d);
    logic [2*NMAX-1:0] w = '0;
    int p = n;
    for (int i = 0; i < n; i++) w[i] = lo[i];
    for (int i = 0; i < n; i++)
      if (is_signed_pos(i, n, d)) begin
        w[p] = hi[i];
        p++;
      end
    return w;
  endfunction

  function automatic void hsd_unpack_word(input logic [2*NMAX-1:0] w, input int n, input int d,
                                          output logic [NMAX-1:0] hi, output logic [NMAX-1:0] lo);
    int p = n;
    hi = '0;
    lo = '0;
    for (int i = 0; i < n; i++) lo[i] = w[i];
    for (int i = 0; i < n; i++)
      if (is_signed_pos(i, n, d)) begin
        hi[i] = w[p];
        p++;
      end
  endfunction

endpackage
