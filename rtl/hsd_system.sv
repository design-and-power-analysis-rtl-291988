// hsd_system: top level.  Two independent parts stand side by side.
//
// 1. The HSD arithmetic unit (hsd_au) with binary conversion at its
//    boundary: the external write data arrives as an N-bit unsigned binary
//    word, is recoded to HSD by hsd_in_conv and packed; read port 1 is
//    brought out both as the raw packed HSD word (au_data_hsd) and, through
//    hsd_out_conv, as an (N+1)-bit two's complement value (au_data_bin).
//    Everything in between, the register file and the adder/subtractor,
//    works on HSD words, so conversion happens only when data enters or
//    leaves the unit.  Timing is that of hsd_au (one-cycle registered
//    reads, result written one cycle after its operands were read).
//
// 2. The conversion chain hsd_au_conv: STAGES cascaded adder/subtractors
//    with input conversion at the front and output conversion at the end,
//    purely combinational, with its own ports (chain_*).
//
// N = 32 digits and 32 registers follow the thesis; D, the distance
// between signed digits, is the parameter the thesis sweeps from 0 to N
// and recommends at 0 (all digits signed) for speed.
module hsd_system
  import hsd_pkg::*;
#(
  parameter int N      = 32,
  parameter int D      = 0,
  parameter int DEPTH  = 32,
  parameter int STAGES = 6,
  localparam int W     = hsd_width(N, D),
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // arithmetic unit
  input  logic              au_add_sub,
  input  logic              au_ext_int,
  input  logic [N-1:0]      au_ext_bin,
  input  logic              au_we,
  input  logic [AW-1:0]     au_waddr,
  input  logic              au_re1,
  input  logic [AW-1:0]     au_raddr1,
  input  logic              au_re2,
  input  logic [AW-1:0]     au_raddr2,
  output logic [W-1:0]      au_data_hsd,
  output logic signed [N:0] au_data_bin,
  output logic signed [1:0] au_cout,
  // conversion chain
  input  logic [N-1:0]      chain_op [STAGES+1],
  input  logic [STAGES-1:0] chain_mode,
  output logic signed [N:0] chain_value,
  output logic signed [1:0] chain_cout
);

  logic [N-1:0] ext_hi, ext_lo, out_hi, out_lo;
  logic [W-1:0] ext_word;

  hsd_in_conv #(.N(N), .D(D)) u_in_conv (.bin(au_ext_bin), .hi(ext_hi), .lo(ext_lo));
  hsd_pack    #(.N(N), .D(D)) u_pack    (.hi(ext_hi), .lo(ext_lo), .word(ext_word));

  hsd_au #(.N(N), .D(D), .DEPTH(DEPTH)) u_au (
    .clk      (clk),
    .rst_n    (rst_n),
    .add_sub  (au_add_sub),
    .ext_int  (au_ext_int),
    .ext_data (ext_word),
    .we       (au_we),
    .waddr    (au_waddr),
    .re1      (au_re1),
    .raddr1   (au_raddr1),
    .re2      (au_re2),
    .raddr2   (au_raddr2),
    .data_out (au_data_hsd),
    .cout     (au_cout)
  );

  hsd_unpack   #(.N(N), .D(D)) u_unpack   (.word(au_data_hsd), .hi(out_hi), .lo(out_lo));
  hsd_out_conv #(.N(N))        u_out_conv (.hi(out_hi), .lo(out_lo), .value(au_data_bin));

  hsd_au_conv #(.N(N), .D(D), .STAGES(STAGES)) u_chain (
    .op    (chain_op),
    .mode  (chain_mode),
    .value (chain_value),
    .cout  (chain_cout)
  );

endmodule
