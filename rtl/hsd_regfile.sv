// hsd_regfile: register file of the HSD arithmetic unit.
//
// DEPTH words of W bits, one write port and two read ports.  Words hold
// HSD numbers in packed form (N bits plus one per signed digit), so the
// width follows the digit format: 64 bits when all 32 digits are signed,
// 32 bits when none is.
//
// Timing: the write port writes wdata to waddr at the rising clock edge
// when we = 1.  Each read port registers mem[raddr] into rdata at the
// rising edge when its re = 1 and otherwise holds its last value.  A read
// and a write of the same address in the same cycle return the old word.
// Reset clears the two read registers; the storage array itself has no
// reset and must be written before it is read.  The port structure and the
// depth follow the thesis; the synchronous read with enable and the
// read-before-write order are this design's choices.
module hsd_regfile #(
  parameter int W     = 64,  // word width
  parameter int DEPTH = 32,  // number of registers
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  // read port 1 (also the unit's external data output)
  input  logic          re1,
  input  logic [AW-1:0] raddr1,
  output logic [W-1:0]  rdata1,
  // read port 2
  input  logic          re2,
  input  logic [AW-1:0] raddr2,
  output logic [W-1:0]  rdata2
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata1 <= '0;
      rdata2 <= '0;
    end else begin
      if (re1) rdata1 <= mem[raddr1];
      if (re2) rdata2 <= mem[raddr2];
    end
  end

endmodule
