// tb_hsd_au_conv: tests the six-stage conversion chain at three
// signed-digit distances (all signed, D = 4, plain binary).  Seven random
// unsigned operands and a random add/subtract pattern go in; the (N+1)-bit
// output must equal the exact result of the six operations modulo 2^32.
// Intermediate carries out of the top digit are dropped, and a redundant
// sum can carry out even when its value would fit, so only the residue is
// defined.  Half the vectors use small operands, half full-range ones.
module tb_hsd_au_conv;

  localparam int N = 32, STAGES = 6, ND = 3;
  localparam int DS [ND] = '{0, 4, 32};
  localparam int NVEC = 5000;

  logic [N-1:0]      op [STAGES+1];
  logic [STAGES-1:0] mode;
  logic signed [N:0] value [ND];
  logic signed [1:0] cout [ND];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < ND; k++) begin : g_dut
    hsd_au_conv #(.N(N), .D(DS[k]), .STAGES(STAGES)) dut (
      .op(op), .mode(mode), .value(value[k]), .cout(cout[k]));
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NVEC; t++) begin
      longint exact;
      bit small_ops;

      small_ops = (t % 2 == 0);
      for (int k = 0; k <= STAGES; k++)
        op[k] = small_ops ? N'($urandom_range(0, 32'h0fff_ffff)) : $urandom();
      mode = STAGES'($urandom());
      #1;
      exact = longint'(op[0]);
      for (int k = 0; k < STAGES; k++) begin
        exact = mode[k] ? exact - longint'(op[k+1]) : exact + longint'(op[k+1]);
      end
      for (int k = 0; k < ND; k++) begin
        checks++;
        if (((longint'(value[k]) - exact) & ((longint'(1) <<< N) - 1)) != 0) begin
          failures++;
          if (failures < 10) $display("FAIL D=%0d value %0d exact %0d", DS[k], value[k], exact);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
