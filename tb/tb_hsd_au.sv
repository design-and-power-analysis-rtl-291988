// tb_hsd_au: tests the HSD arithmetic unit (D = 3, 32 digits, 32
// registers).  Registers are loaded through the external path (ext_int = 1)
// with random HSD words; then random additions and subtractions run, each
// reading two registers, writing the result one cycle later and reading it
// back on port 1.  A value model checks every result:
//   value(stored result) + 2^32 * cout = value(A) +/- value(B),
// that the read data appears exactly one cycle after re1, and that the
// stored words use legal digit codes.  A second phase issues one operation
// per cycle (reads of the next operation overlap the write of the
// previous one) to check the throughput of one operation per cycle.
module tb_hsd_au;
  import hsd_pkg::*;
  import tb_hsd_pkg::*;

  localparam int N = 32, D = 3, DEPTH = 32, AW = 5;
  localparam int W = hsd_width(N, D);

  logic              clk = 0, rst_n = 0;
  logic              add_sub = 0, ext_int = 0, we = 0, re1 = 0, re2 = 0;
  logic [W-1:0]      ext_data = '0, data_out;
  logic [AW-1:0]     waddr = '0, raddr1 = '0, raddr2 = '0;
  logic signed [1:0] cout;
  longint            model [DEPTH];
  int checks = 0, failures = 0, n_sub = 0, n_add = 0, n_ovf = 0;

  hsd_au #(.N(N), .D(D), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic longint word_value(logic [W-1:0] w);
    logic [NMAX-1:0] h, l;
    hsd_unpack_word((2*NMAX)'(w), N, D, h, l);
    return hsd_value(h, l, N);
  endfunction

  function automatic bit word_legal(logic [W-1:0] w);
    logic [NMAX-1:0] h, l;
    hsd_unpack_word((2*NMAX)'(w), N, D, h, l);
    return hsd_legal(h, l, N, D);
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load every register from outside
    for (int i = 0; i < DEPTH; i++) begin
      logic [NMAX-1:0] h, l;
      hsd_random(h, l, N, D, (i < 4) ? i : 0);
      ext_int = 1; we = 1; waddr = AW'(i);
      ext_data = W'(hsd_pack_word(h, l, N, D));
      model[i] = hsd_value(h, l, N);
      @(posedge clk); #1;
    end
    we = 0; ext_int = 0;
    // check the loads through port 1
    for (int i = 0; i < DEPTH; i++) begin
      re1 = 1; raddr1 = AW'(i);
      @(posedge clk); #1;
      re1 = 0;
      checks++;
      if (word_value(data_out) != model[i]) fail($sformatf("load r%0d", i));
    end

    // one operation at a time
    for (int t = 0; t < 1500; t++) begin
      int ra, rb, rd;
      logic op;
      longint exact;
      ra = $urandom_range(0, DEPTH - 1);
      rb = $urandom_range(0, DEPTH - 1);
      rd = $urandom_range(0, DEPTH - 1);
      op = 1'($urandom_range(0, 1));
      re1 = 1; re2 = 1; raddr1 = AW'(ra); raddr2 = AW'(rb);
      @(posedge clk); #1;
      re1 = 0; re2 = 0;
      add_sub = op; ext_int = 0; we = 1; waddr = AW'(rd);
      exact = op ? model[ra] - model[rb] : model[ra] + model[rb];
      if (op) n_sub++; else n_add++;
      if (cout != 0) n_ovf++;
      @(posedge clk); #1;
      we = 0;
      model[rd] = exact - (longint'(cout) <<< N);
      re1 = 1; raddr1 = AW'(rd);
      @(posedge clk); #1;     // exactly one cycle later
      re1 = 0;
      checks++;
      if (word_value(data_out) != model[rd] || !word_legal(data_out))
        fail($sformatf("op %0d r%0d %s r%0d: got %0d expected %0d (cout %0d)", t, ra, op ? "-" : "+",
                       rb, word_value(data_out), model[rd], cout));
    end

    // back-to-back: operation k reads in cycle k and writes in cycle k+1
    begin
      int ra [64], rb [64], rd [64];
      logic op [64];
      for (int k = 0; k < 64; k++) begin
        ra[k] = $urandom_range(0, 15);
        rb[k] = $urandom_range(0, 15);
        rd[k] = 16 + k % 16;       // results never feed later operands here
        op[k] = 1'($urandom_range(0, 1));
      end
      for (int k = 0; k <= 64; k++) begin
        if (k < 64) begin
          re1 = 1; re2 = 1; raddr1 = AW'(ra[k]); raddr2 = AW'(rb[k]);
        end else begin
          re1 = 0; re2 = 0;
        end
        if (k > 0) begin
          we = 1; waddr = AW'(rd[k-1]); add_sub = op[k-1]; ext_int = 0;
        end
        @(posedge clk);
        #1;
        if (k > 0) begin
          longint exact;
          exact = op[k-1] ? model[ra[k-1]] - model[rb[k-1]] : model[ra[k-1]] + model[rb[k-1]];
          model[rd[k-1]] = exact;   // checked modulo 2^N below
        end
      end
      we = 0;
      for (int r = 16; r < 32; r++) begin
        re1 = 1; raddr1 = AW'(r);
        @(posedge clk); #1;
        re1 = 0;
        checks++;
        if (((word_value(data_out) - model[r]) & ((longint'(1) <<< N) - 1)) != 0)
          fail($sformatf("pipelined result r%0d", r));
        model[r] = word_value(data_out);
      end
    end

    checks++;
    if (n_add == 0 || n_sub == 0 || n_ovf == 0) fail("an operation kind never happened");
    $display("adds %0d subs %0d results with carry out %0d", n_add, n_sub, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
