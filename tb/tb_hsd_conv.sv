// tb_hsd_conv: tests binary-to-HSD input conversion at several
// signed-digit distances.  Random and corner words must convert to a legal
// HSD number of the same (unsigned) value; in addition the pair recoding
// is checked digit by digit: value 1 in a pair becomes +1,-1, for the
// all-signed format (digits 1,0) and for D = 1 (digits 2,1), and a lone
// top signed digit is copied.
module tb_hsd_conv;
  import hsd_pkg::*;
  import tb_hsd_pkg::*;

  localparam int N  = 32;
  localparam int ND = 9;
  localparam int DS [ND] = '{0, 1, 2, 3, 8, 16, 30, 31, 32};
  localparam int NVEC = 20000;

  logic [N-1:0] bin;
  logic [N-1:0] hi [ND], lo [ND];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < ND; k++) begin : g_dut
    hsd_in_conv #(.N(N), .D(DS[k])) dut (.bin(bin), .hi(hi[k]), .lo(lo[k]));
  end

  task automatic expect_bits(string what, logic [N-1:0] got_hi, logic [N-1:0] got_lo,
                             logic [N-1:0] exp_hi, logic [N-1:0] exp_lo);
    checks++;
    if (got_hi != exp_hi || got_lo != exp_lo) begin
      failures++;
      $display("FAIL %s: hi=%h lo=%h expected hi=%h lo=%h", what, got_hi, got_lo, exp_hi, exp_lo);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // all signed: pairs (1,0): 01 -> +1,-1 ; 10 -> copy ; 11 -> copy
    bin = 32'h1; #1;
    expect_bits("D0 pair 01", hi[0], lo[0], 32'h1, 32'h3);
    bin = 32'h2; #1;
    expect_bits("D0 pair 10", hi[0], lo[0], 32'h0, 32'h2);
    bin = 32'h3; #1;
    expect_bits("D0 pair 11", hi[0], lo[0], 32'h0, 32'h3);
    // D = 1: digit 0 unsigned, pair (2,1) = 01 -> digit 2 = 1, digit 1 = -1
    bin = 32'h3; #1;
    expect_bits("D1 pair 01", hi[1], lo[1], 32'h2, 32'h7);
    // D = 1: top digit 31 signed and alone: copied
    bin = 32'h8000_0000; #1;
    expect_bits("D1 top digit", hi[1], lo[1], 32'h0, 32'h8000_0000);

    for (int t = 0; t < NVEC; t++) begin
      case (t)
        0: bin = '0;
        1: bin = '1;
        2: bin = 32'h5555_5555;
        3: bin = 32'hAAAA_AAAA;
        default: bin = $urandom();
      endcase
      #1;
      for (int k = 0; k < ND; k++) begin
        checks++;
        if (hsd_value(hi[k], lo[k], N) != longint'(bin) || !hsd_legal(hi[k], lo[k], N, DS[k])) begin
          failures++;
          if (failures < 10)
            $display("FAIL D=%0d bin=%h -> value %0d", DS[k], bin, hsd_value(hi[k], lo[k], N));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
