// tb_hsd_complement: tests HSD negation at several signed-digit distances,
// in both the ripple (ARCH 1) and look-ahead (ARCH 2) forms.  Checks
//   value(b) - 2^32 * borrow_out = -value(a),
// that b uses legal digit codes, that the two forms agree bit for bit, and
// the three-digit example of the thesis's complement table for D = 2.
module tb_hsd_complement;
  import hsd_pkg::*;
  import tb_hsd_pkg::*;

  localparam int N  = 32;
  localparam int ND = 9;
  localparam int DS [ND] = '{0, 1, 2, 3, 8, 16, 30, 31, 32};
  localparam int NVEC = 20000;

  logic [N-1:0] a_hi [ND], a_lo [ND];
  logic [N-1:0] b1_hi [ND], b1_lo [ND], b2_hi [ND], b2_lo [ND];
  logic         br1 [ND], br2 [ND];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < ND; k++) begin : g_dut
    hsd_complement #(.N(N), .D(DS[k]), .ARCH(1)) dut1 (
      .a_hi(a_hi[k]), .a_lo(a_lo[k]), .b_hi(b1_hi[k]), .b_lo(b1_lo[k]), .borrow_out(br1[k]));
    hsd_complement #(.N(N), .D(DS[k]), .ARCH(2)) dut2 (
      .a_hi(a_hi[k]), .a_lo(a_lo[k]), .b_hi(b2_hi[k]), .b_lo(b2_lo[k]), .borrow_out(br2[k]));
  end

  // 3-digit unit from the thesis (digits S U U, D = 2): small instance
  logic [2:0] s_ahi, s_alo, s_bhi, s_blo;
  logic       s_br;
  hsd_complement #(.N(3), .D(2), .ARCH(1)) dut_small (
    .a_hi(s_ahi), .a_lo(s_alo), .b_hi(s_bhi), .b_lo(s_blo), .borrow_out(s_br));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive over the 12 legal 3-digit S U U numbers
    for (int sv = -1; sv <= 1; sv++)
      for (int u = 0; u < 4; u++) begin
        int exp_v, got_v;
        s_ahi = {sv == -1, 2'b00};
        s_alo = {sv != 0, u[1:0]};
        #1;
        exp_v = -(4 * sv + u);
        got_v = int'(s_blo[0]) + 2 * int'(s_blo[1]) + 4 * (int'(s_blo[2]) - 2 * int'(s_bhi[2])) - 8 * int'(s_br);
        checks++;
        if (exp_v != got_v || s_bhi[1:0] != 0 || (s_bhi[2] && !s_blo[2])) begin
          failures++;
          $display("FAIL 3-digit S=%0d U=%0d: expected %0d got %0d", sv, u, exp_v, got_v);
        end
      end

    for (int t = 0; t < NVEC; t++) begin
      for (int k = 0; k < ND; k++)
        hsd_random(a_hi[k], a_lo[k], N, DS[k], (t < 4) ? t : 0);
      #1;
      for (int k = 0; k < ND; k++) begin
        longint exp_v, got_v;
        exp_v = -hsd_value(a_hi[k], a_lo[k], N);
        got_v = hsd_value(b1_hi[k], b1_lo[k], N) - (longint'(br1[k]) <<< N);
        checks++;
        if (exp_v != got_v || !hsd_legal(b1_hi[k], b1_lo[k], N, DS[k])) begin
          failures++;
          if (failures < 10) $display("FAIL D=%0d expected %0d got %0d", DS[k], exp_v, got_v);
        end
        checks++;
        if (b1_hi[k] != b2_hi[k] || b1_lo[k] != b2_lo[k] || br1[k] != br2[k]) begin
          failures++;
          if (failures < 10) $display("FAIL D=%0d ripple and look-ahead forms differ", DS[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
