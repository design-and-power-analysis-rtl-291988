// tb_hsd_cells: exhaustive test of the unsigned-digit adder cell.  For all
// a, b and all four carry codes {v,w} (value v - w) it checks
// a + b + cin = e + 2*cout and that cout has a canonical code (never
// v = w = 1).
module tb_hsd_cells;
  import hsd_pkg::*;

  logic       a, b, e;
  hsd_carry_t cin, cout;
  int checks = 0, failures = 0;

  hsd_u_cell dut (.a(a), .b(b), .cin(cin), .e(e), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      int t, got;
      {a, b, cin.v, cin.w} = 4'(k);
      #1;
      t   = int'(a) + int'(b) + int'(cin.v) - int'(cin.w);
      got = int'(e) + 2 * (int'(cout.v) - int'(cout.w));
      checks++;
      if (t != got || (cout.v && cout.w)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b%b -> e=%b cout=%b%b", a, b, cin.v, cin.w, e, cout.v, cout.w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
