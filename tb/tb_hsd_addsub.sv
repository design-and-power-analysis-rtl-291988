// tb_hsd_addsub: random and corner-case test of the HSD adder/subtractor
// at several signed-digit distances, basic (ARCH 1) and look-ahead
// (ARCH 2) complement, with add_sub chosen at random per vector.  Checks
//   value(x) +/- value(y) = value(z) + 2^32 * cout
// and legal digit codes in z.  Counts vectors whose subtraction borrowed
// at the top (cout < 0) to make sure the carry-out adjustment is exercised.
module tb_hsd_addsub;
  import hsd_pkg::*;
  import tb_hsd_pkg::*;

  localparam int N  = 32;
  localparam int ND = 9;
  localparam int DS [ND] = '{0, 1, 2, 3, 8, 16, 30, 31, 32};
  localparam int NVEC = 20000;

  logic [N-1:0]      x_hi [ND], x_lo [ND], y_hi [ND], y_lo [ND];
  logic [N-1:0]      z_hi [2][ND], z_lo [2][ND];
  logic signed [1:0] co [2][ND];
  logic              op [ND];
  int checks = 0, failures = 0, neg_cout = 0, sub_ops = 0;

  for (genvar k = 0; k < ND; k++) begin : g_dut
    for (genvar a = 0; a < 2; a++) begin : g_arch
      hsd_addsub #(.N(N), .D(DS[k]), .ARCH(a + 1)) dut (
        .add_sub(op[k]), .x_hi(x_hi[k]), .x_lo(x_lo[k]), .y_hi(y_hi[k]), .y_lo(y_lo[k]),
        .z_hi(z_hi[a][k]), .z_lo(z_lo[a][k]), .cout(co[a][k]));
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NVEC; t++) begin
      for (int k = 0; k < ND; k++) begin
        hsd_random(x_hi[k], x_lo[k], N, DS[k], (t < 16) ? t % 4 : 0);
        hsd_random(y_hi[k], y_lo[k], N, DS[k], (t < 16) ? t / 4 : 0);
        op[k] = 1'($urandom_range(0, 1));
      end
      #1;
      for (int k = 0; k < ND; k++)
        for (int a = 0; a < 2; a++) begin
          longint exp_v, got_v;
          exp_v = op[k] ? hsd_value(x_hi[k], x_lo[k], N) - hsd_value(y_hi[k], y_lo[k], N)
                        : hsd_value(x_hi[k], x_lo[k], N) + hsd_value(y_hi[k], y_lo[k], N);
          got_v = hsd_value(z_hi[a][k], z_lo[a][k], N) + (longint'(co[a][k]) <<< N);
          checks++;
          if (op[k]) sub_ops++;
          if (co[a][k] < 0) neg_cout++;
          if (exp_v != got_v || !hsd_legal(z_hi[a][k], z_lo[a][k], N, DS[k])) begin
            failures++;
            if (failures < 10)
              $display("FAIL D=%0d arch=%0d op=%0d expected %0d got %0d", DS[k], a + 1, op[k], exp_v, got_v);
          end
        end
    end
    checks++;
    if (neg_cout == 0 || sub_ops == 0) begin
      failures++;
      $display("FAIL negative carry out never produced");
    end
    $display("subtractions %0d, negative carry outs %0d", sub_ops, neg_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
