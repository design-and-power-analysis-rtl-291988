// hsd_au_conv: a chain of STAGES HSD adder/subtractors with conversion only
// at its two ends, the structure used to weigh the cost of converting to
// and from binary against several operations done in HSD form.
//
// Operand op[0] and op[1..STAGES] are unsigned binary words.  Each enters
// through hsd_in_conv.  Stage 1 computes op[0] +/- op[1]; stage k takes the
// HSD result of stage k-1 and adds or subtracts op[k] (mode[k-1] = 1
// subtracts).  After the last stage hsd_out_conv turns the result into an
// (N+1)-bit two's complement value.  The carries out of stages 1 to
// STAGES-1 are dropped, so `value` is the exact result modulo 2^N (a
// redundant sum can carry out of its top digit even when the exact value
// would fit, so nothing stronger holds); the last stage's carry is output
// as cout.  Six stages and the conversion placement
// follow the thesis; the dropped intermediate carries are this design's
// choice.  Purely combinational.
module hsd_au_conv
  import hsd_pkg::*;
#(
  parameter int N      = 32,
  parameter int D      = 0,
  parameter int STAGES = 6
) (
  input  logic [N-1:0]      op [STAGES+1],
  input  logic [STAGES-1:0] mode,   // per stage: 0 add, 1 subtract
  output logic signed [N:0] value,
  output logic signed [1:0] cout
);

  logic [N-1:0]      in_hi [STAGES+1];
  logic [N-1:0]      in_lo [STAGES+1];
  logic [N-1:0]      acc_hi [STAGES+1];
  logic [N-1:0]      acc_lo [STAGES+1];
  logic signed [1:0] stage_cout [STAGES];

  for (genvar k = 0; k <= STAGES; k++) begin : g_in
    hsd_in_conv #(.N(N), .D(D)) u_in (.bin(op[k]), .hi(in_hi[k]), .lo(in_lo[k]));
  end

  assign acc_hi[0] = in_hi[0];
  assign acc_lo[0] = in_lo[0];

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    hsd_addsub #(.N(N), .D(D), .ARCH(1)) u_as (
      .add_sub (mode[k]),
      .x_hi    (acc_hi[k]),
      .x_lo    (acc_lo[k]),
      .y_hi    (in_hi[k+1]),
      .y_lo    (in_lo[k+1]),
      .z_hi    (acc_hi[k+1]),
      .z_lo    (acc_lo[k+1]),
      .cout    (stage_cout[k])
    );
  end

  hsd_out_conv #(.N(N)) u_out (.hi(acc_hi[STAGES]), .lo(acc_lo[STAGES]), .value(value));

  assign cout = stage_cout[STAGES-1];

endmodule
