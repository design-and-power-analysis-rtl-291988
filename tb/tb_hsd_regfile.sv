// tb_hsd_regfile: tests the 32 x 64-bit, one-write two-read register file
// against an array model: reset clears the read registers, writes land at
// the clock edge, each read port returns the addressed word exactly one
// cycle after re, holds it while re is low, and a same-cycle read and
// write of one address returns the old word.
module tb_hsd_regfile;

  localparam int W = 64, DEPTH = 32, AW = 5;

  logic          clk = 0, rst_n = 0;
  logic          we = 0, re1 = 0, re2 = 0;
  logic [AW-1:0] waddr = '0, raddr1 = '0, raddr2 = '0;
  logic [W-1:0]  wdata = '0, rdata1, rdata2;
  logic [W-1:0]  model [DEPTH];
  int checks = 0, failures = 0;

  hsd_regfile #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check("reset port 1", rdata1, '0);
    check("reset port 2", rdata2, '0);
    rst_n = 1;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = AW'(i); wdata = {$urandom(), $urandom()}; model[i] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    // random traffic
    for (int t = 0; t < 2000; t++) begin
      logic [W-1:0] e1, e2, h1, h2;
      logic         r1, r2;
      h1 = rdata1; h2 = rdata2;
      r1 = 1'($urandom_range(0, 1)); r2 = 1'($urandom_range(0, 1));
      re1 = r1; re2 = r2;
      raddr1 = AW'($urandom_range(0, DEPTH - 1));
      raddr2 = AW'($urandom_range(0, DEPTH - 1));
      we = 1'($urandom_range(0, 1));
      waddr = (t % 7 == 0) ? raddr1 : AW'($urandom_range(0, DEPTH - 1));
      wdata = {$urandom(), $urandom()};
      e1 = r1 ? model[raddr1] : h1;   // old contents on a collision
      e2 = r2 ? model[raddr2] : h2;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      check("port 1", rdata1, e1);
      check("port 2", rdata2, e2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
