// tb_hsd_system: end-to-end test of the top level at its default
// parameters (32 digits, every digit signed, 32 registers, 6-stage chain).
//
// Arithmetic unit: every register is loaded with a binary word through the
// input conversion and read back through the output conversion; then
// random additions and subtractions run register to register, each result
// read back as binary and checked against a model (exact modulo 2^32, and
// the raw HSD word's digit value equal to the binary output); finally a
// dependent sequence, r = ((a + b) - c) + ... over 40 operations, is run
// entirely inside the unit and only its end result converted.
// Conversion chain: random operands and add/subtract patterns, output
// checked modulo 2^32.
// Every mechanism is counted and must occur at least once: external
// loads, additions, subtractions, a nonzero carry out, a negative result,
// a negative digit created by the input conversion, chain additions and
// chain subtractions.
module tb_hsd_system;
  import hsd_pkg::*;
  import tb_hsd_pkg::*;

  localparam int N = 32, D = 0, DEPTH = 32, STAGES = 6, AW = 5;
  localparam int W = hsd_width(N, D);
  localparam longint MASK = (longint'(1) <<< N) - 1;

  logic              clk = 0, rst_n = 0;
  logic              au_add_sub = 0, au_ext_int = 0, au_we = 0, au_re1 = 0, au_re2 = 0;
  logic [N-1:0]      au_ext_bin = '0;
  logic [AW-1:0]     au_waddr = '0, au_raddr1 = '0, au_raddr2 = '0;
  logic [W-1:0]      au_data_hsd;
  logic signed [N:0] au_data_bin;
  logic signed [1:0] au_cout;
  logic [N-1:0]      chain_op [STAGES+1];
  logic [STAGES-1:0] chain_mode = '0;
  logic signed [N:0] chain_value;
  logic signed [1:0] chain_cout;

  longint model [DEPTH];
  int checks = 0, failures = 0;
  int n_load = 0, n_add = 0, n_sub = 0, n_cout = 0, n_neg = 0, n_negdig = 0;
  int n_chain_add = 0, n_chain_sub = 0;

  hsd_system dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  function automatic longint word_value(logic [W-1:0] w);
    logic [NMAX-1:0] h, l;
    hsd_unpack_word((2*NMAX)'(w), N, D, h, l);
    return hsd_value(h, l, N);
  endfunction

  function automatic bit has_neg_digit(logic [W-1:0] w);
    logic [NMAX-1:0] h, l;
    hsd_unpack_word((2*NMAX)'(w), N, D, h, l);
    return h != 0;
  endfunction

  // read register r on port 1 and check it against the model
  task automatic read_check(int r, string what, bit exact);
    au_re1 = 1; au_raddr1 = AW'(r);
    @(posedge clk); #1;
    au_re1 = 0;
    checks++;
    if (longint'(au_data_bin) != word_value(au_data_hsd)) fail($sformatf("%s: binary and HSD outputs differ", what));
    checks++;
    if (exact ? (longint'(au_data_bin) != model[r])
              : (((longint'(au_data_bin) - model[r]) & MASK) != 0))
      fail($sformatf("%s: r%0d = %0d expected %0d", what, r, au_data_bin, model[r]));
    if (au_data_bin < 0) n_neg++;
    if (has_neg_digit(au_data_hsd)) n_negdig++;
    model[r] = longint'(au_data_bin);
  endtask

  // one register-to-register operation: read in one cycle, write the next
  task automatic operate(int ra, int rb, int rd, logic op);
    longint exact;
    au_re1 = 1; au_re2 = 1; au_raddr1 = AW'(ra); au_raddr2 = AW'(rb);
    @(posedge clk); #1;
    au_re1 = 0; au_re2 = 0;
    au_add_sub = op; au_ext_int = 0; au_we = 1; au_waddr = AW'(rd);
    exact = op ? model[ra] - model[rb] : model[ra] + model[rb];
    if (op) n_sub++; else n_add++;
    if (au_cout != 0) n_cout++;
    @(posedge clk); #1;
    au_we = 0;
    model[rd] = exact;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= STAGES; k++) chain_op[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // load through the input conversion, read back through the output one
    for (int i = 0; i < DEPTH; i++) begin
      case (i)
        0: au_ext_bin = 32'h0000_0001;
        1: au_ext_bin = 32'h5555_5555;
        2: au_ext_bin = 32'hFFFF_FFFF;
        3: au_ext_bin = 32'h0;
        default: au_ext_bin = $urandom();
      endcase
      au_ext_int = 1; au_we = 1; au_waddr = AW'(i);
      model[i] = longint'(au_ext_bin);
      n_load++;
      @(posedge clk); #1;
      au_we = 0; au_ext_int = 0;
    end
    for (int i = 0; i < DEPTH; i++) read_check(i, "load", 1'b1);

    // random independent operations
    for (int t = 0; t < 2000; t++) begin
      int rd;
      rd = $urandom_range(0, DEPTH - 1);
      operate($urandom_range(0, DEPTH - 1), $urandom_range(0, DEPTH - 1), rd, 1'($urandom_range(0, 1)));
      read_check(rd, "operation", 1'b0);
    end

    // a dependent sequence kept in HSD form until the end
    begin
      longint acc;
      au_ext_int = 1; au_we = 1; au_waddr = AW'(31); au_ext_bin = 32'd12345;
      @(posedge clk); #1;
      au_we = 0; au_ext_int = 0;
      model[31] = 12345;
      acc = 12345;
      for (int t = 0; t < 40; t++) begin
        int rb;
        logic op;
        rb = $urandom_range(0, 30);
        op = 1'(t % 3 == 1);
        acc = op ? acc - model[rb] : acc + model[rb];
        operate(31, rb, 31, op);
      end
      read_check(31, "sequence", 1'b0);
      checks++;
      if (((model[31] - acc) & MASK) != 0) fail("dependent sequence result");
    end

    // conversion chain
    for (int t = 0; t < 3000; t++) begin
      longint exact;
      for (int k = 0; k <= STAGES; k++) chain_op[k] = $urandom();
      chain_mode = STAGES'($urandom());
      #1;
      exact = longint'(chain_op[0]);
      for (int k = 0; k < STAGES; k++) begin
        exact = chain_mode[k] ? exact - longint'(chain_op[k+1]) : exact + longint'(chain_op[k+1]);
        if (chain_mode[k]) n_chain_sub++; else n_chain_add++;
      end
      checks++;
      if (((longint'(chain_value) - exact) & MASK) != 0)
        fail($sformatf("chain value %0d exact %0d", chain_value, exact));
    end

    $display("loads %0d adds %0d subs %0d carry-outs %0d negative results %0d words with -1 digits %0d chain add %0d chain sub %0d",
             n_load, n_add, n_sub, n_cout, n_neg, n_negdig, n_chain_add, n_chain_sub);
    checks++;
    if (n_load == 0 || n_add == 0 || n_sub == 0 || n_cout == 0 || n_neg == 0 || n_negdig == 0 ||
        n_chain_add == 0 || n_chain_sub == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
