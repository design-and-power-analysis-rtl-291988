// tb_hsd_s_cell: exhaustive test of the signed-digit adder cell.  For all
// digit pairs and every incoming carry consistent with the look-ahead bit
// (cin_nonneg = 1: cin in {0,1}; 0: cin in {-1,0}) it checks
//   x + y + cin = z + 2*cout,   z in {-1,0,1} with a legal code,
// and that cout is the same for every cin the look-ahead bit allows, i.e.
// no carry passes through a signed digit.
module tb_hsd_s_cell;
  import hsd_pkg::*;

  logic [1:0] x, y, z;
  logic       nn;
  hsd_carry_t cin, cout;
  int checks = 0, failures = 0;

  hsd_s_cell dut (.x(x), .y(y), .cin_nonneg(nn), .cin(cin), .z(z), .cout(cout));

  function automatic int dv(logic [1:0] c);
    return int'(c[0]) - 2 * int'(c[1]);
  endfunction

  function automatic logic [1:0] enc(int v);
    return (v == 0) ? 2'b00 : (v == 1) ? 2'b01 : 2'b11;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hsd_carry_t first;
    first = '0;
    for (int xv = -1; xv <= 1; xv++)
      for (int yv = -1; yv <= 1; yv++)
        for (int n = 0; n <= 1; n++) begin
          for (int cv = 0; cv <= 1; cv++) begin
            int c;
            c = (n == 1) ? cv : -cv;   // cin = 0 first, then +1 or -1
            x = enc(xv); y = enc(yv); nn = n[0];
            cin.v = (c == 1); cin.w = (c == -1);
            #1;
            checks++;
            if (xv + yv + c != dv(z) + 2 * (int'(cout.v) - int'(cout.w)) || z == 2'b10) begin
              failures++;
              $display("FAIL x=%0d y=%0d nn=%0d cin=%0d -> z=%b cout=%b%b", xv, yv, n, c, z, cout.v, cout.w);
            end
            if (cv == 0) first = cout;
            else begin
              checks++;
              if (cout != first) begin
                failures++;
                $display("FAIL carry-out depends on carry-in x=%0d y=%0d nn=%0d", xv, yv, n);
              end
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
