// tb_hsd_adder: random and corner-case test of the HSD adder at several
// signed-digit distances side by side (D = 0, 1, 2, 3, 8, 16, 30, 31, 32,
// N = 32).  For every vector it checks
//   value(x) + value(y) = value(z) + 2^32 * cout
// and that z uses legal digit codes for its format.  The first vectors
// combine all-+1, all--1 and all-zero operands, which drive the longest
// carry chains.
module tb_hsd_adder;
  import hsd_pkg::*;
  import tb_hsd_pkg::*;

  localparam int N  = 32;
  localparam int ND = 9;
  localparam int DS [ND] = '{0, 1, 2, 3, 8, 16, 30, 31, 32};
  localparam int NVEC = 20000;

  logic [N-1:0] x_hi [ND], x_lo [ND], y_hi [ND], y_lo [ND], z_hi [ND], z_lo [ND];
  hsd_carry_t   co [ND];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < ND; k++) begin : g_dut
    hsd_adder #(.N(N), .D(DS[k])) dut (
      .x_hi(x_hi[k]), .x_lo(x_lo[k]), .y_hi(y_hi[k]), .y_lo(y_lo[k]),
      .z_hi(z_hi[k]), .z_lo(z_lo[k]), .cout(co[k]));
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
        int sx, sy;
        sx = (t < 16) ? t % 4 : 0;
        sy = (t < 16) ? t / 4 : 0;
        hsd_random(x_hi[k], x_lo[k], N, DS[k], sx);
        hsd_random(y_hi[k], y_lo[k], N, DS[k], sy);
      end
      #1;
      for (int k = 0; k < ND; k++) begin
        longint exp_v, got_v;
        exp_v = hsd_value(x_hi[k], x_lo[k], N) + hsd_value(y_hi[k], y_lo[k], N);
        got_v = hsd_value(z_hi[k], z_lo[k], N) + ((longint'(co[k].v) - longint'(co[k].w)) <<< N);
        checks++;
        if (exp_v != got_v || !hsd_legal(z_hi[k], z_lo[k], N, DS[k]) || (co[k].v && co[k].w)) begin
          failures++;
          if (failures < 10)
            $display("FAIL D=%0d expected %0d got %0d", DS[k], exp_v, got_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
