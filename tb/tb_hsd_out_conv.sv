// tb_hsd_out_conv: tests HSD-to-two's-complement output conversion on
// random and extreme HSD numbers of several formats (all-signed, D = 3,
// plain binary): the 33-bit result must equal the numerical value of the
// digits, including the extremes +(2^32 - 1) and -(2^32 - 1).
module tb_hsd_out_conv;
  import hsd_pkg::*;
  import tb_hsd_pkg::*;

  localparam int N = 32;
  localparam int ND = 3;
  localparam int DS [ND] = '{0, 3, 32};
  localparam int NVEC = 20000;

  logic [N-1:0]      hi, lo;
  logic signed [N:0] value;
  int checks = 0, failures = 0;

  hsd_out_conv #(.N(N)) dut (.hi(hi), .lo(lo), .value(value));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NVEC; t++) begin
      hsd_random(hi, lo, N, DS[t % ND], (t < 12) ? t / ND : 0);
      #1;
      checks++;
      if (longint'(value) != hsd_value(hi, lo, N)) begin
        failures++;
        if (failures < 10)
          $display("FAIL hi=%h lo=%h -> %0d expected %0d", hi, lo, value, hsd_value(hi, lo, N));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
