// hsd_au: arithmetic unit that keeps its operands in hybrid signed-digit
// form.
//
// Three parts: a 32-word register file with one write and two read ports
// (hsd_regfile), an HSD adder/subtractor (hsd_addsub, basic architecture)
// fed by the two read ports, and a multiplexer that selects the register
// file's write data: ext_int = 0 takes the adder/subtractor result,
// ext_int = 1 takes ext_data from outside.  Read port 1 doubles as the
// unit's external output (data_out).  All values, in registers and on the
// ports, stay in packed HSD form (see hsd_pack); conversion to and from
// ordinary binary is left to the boundary (hsd_system), so a chain of
// operations never pays for it.
//
// Timing: a read issued in cycle t (re1/re2 with addresses) shows on the
// read registers in cycle t+1; in that cycle the result of add_sub is on
// the write-data path and is written with we/waddr at the end of cycle
// t+1.  One operation can start every cycle.  cout is the result's carry
// out of the top digit (nonzero means the result did not fit N digits and
// the stored word is the result modulo 2^N); it is valid with the result.
// The structure and the add_sub / ext_int encodings follow the thesis; the
// register-file timing and the cout output are this design's choices.
module hsd_au
  import hsd_pkg::*;
#(
  parameter int N     = 32,  // digits per operand
  parameter int D     = 0,   // distance between signed digits
  parameter int DEPTH = 32,  // registers
  localparam int W    = hsd_width(N, D),
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              add_sub,   // 0: A + B, 1: A - B
  input  logic              ext_int,   // 0: write result, 1: write ext_data
  input  logic [W-1:0]      ext_data,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic              re1,
  input  logic [AW-1:0]     raddr1,
  input  logic              re2,
  input  logic [AW-1:0]     raddr2,
  output logic [W-1:0]      data_out,
  output logic signed [1:0] cout
);

  logic [W-1:0] rdata1, rdata2, result, wdata;
  logic [N-1:0] a_hi, a_lo, b_hi, b_lo, z_hi, z_lo;

  hsd_regfile #(.W(W), .DEPTH(DEPTH)) u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .we     (we),
    .waddr  (waddr),
    .wdata  (wdata),
    .re1    (re1),
    .raddr1 (raddr1),
    .rdata1 (rdata1),
    .re2    (re2),
    .raddr2 (raddr2),
    .rdata2 (rdata2)
  );

  hsd_unpack #(.N(N), .D(D)) u_unpack_a (.word(rdata1), .hi(a_hi), .lo(a_lo));
  hsd_unpack #(.N(N), .D(D)) u_unpack_b (.word(rdata2), .hi(b_hi), .lo(b_lo));

  hsd_addsub #(.N(N), .D(D), .ARCH(1)) u_addsub (
    .add_sub (add_sub),
    .x_hi    (a_hi),
    .x_lo    (a_lo),
    .y_hi    (b_hi),
    .y_lo    (b_lo),
    .z_hi    (z_hi),
    .z_lo    (z_lo),
    .cout    (cout)
  );

  hsd_pack #(.N(N), .D(D)) u_pack (.hi(z_hi), .lo(z_lo), .word(result));

  assign wdata    = ext_int ? ext_data : result;
  assign data_out = rdata1;

endmodule
