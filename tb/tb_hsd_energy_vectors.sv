// tb_hsd_energy_vectors: runs the random-vector workload of the energy
// study functionally: 32768 random vectors for each of the distances
// D = 0, 4, 9, 14, 20, 26, 32 (32 digits), applied to the HSD adder, the
// adder/subtractor in both complement architectures, and the arithmetic
// unit (each operation: read two registers, write the result, read it
// back, three clock cycles).  Every result is checked
// against the digit-value model: exact for the combinational blocks
// (value(z) + 2^32 * cout), modulo 2^32 for the AU, whose register file
// keeps N digits.
module tb_hsd_energy_vectors;
  import hsd_pkg::*;
  import tb_hsd_pkg::*;

  localparam int N  = 32;
  localparam int ND = 7;
  localparam int DS [ND] = '{0, 4, 9, 14, 20, 26, 32};
  localparam int NVEC = 32768;
  localparam longint MASK = (longint'(1) <<< N) - 1;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int au_checks [ND], au_failures [ND];
  bit au_done [ND];

  always #5 clk = ~clk;

  // ---------------- combinational blocks ----------------
  logic [N-1:0]      x_hi [ND], x_lo [ND], y_hi [ND], y_lo [ND];
  logic [N-1:0]      za_hi [ND], za_lo [ND];
  hsd_carry_t        za_c [ND];
  logic [N-1:0]      zs_hi [2][ND], zs_lo [2][ND];
  logic signed [1:0] zs_c [2][ND];
  logic              op [ND];

  for (genvar k = 0; k < ND; k++) begin : g_comb
    hsd_adder #(.N(N), .D(DS[k])) u_add (
      .x_hi(x_hi[k]), .x_lo(x_lo[k]), .y_hi(y_hi[k]), .y_lo(y_lo[k]),
      .z_hi(za_hi[k]), .z_lo(za_lo[k]), .cout(za_c[k]));
    for (genvar a = 0; a < 2; a++) begin : g_arch
      hsd_addsub #(.N(N), .D(DS[k]), .ARCH(a + 1)) u_as (
        .add_sub(op[k]), .x_hi(x_hi[k]), .x_lo(x_lo[k]), .y_hi(y_hi[k]), .y_lo(y_lo[k]),
        .z_hi(zs_hi[a][k]), .z_lo(zs_lo[a][k]), .cout(zs_c[a][k]));
    end
  end

  // ---------------- arithmetic units ----------------
  for (genvar k = 0; k < ND; k++) begin : g_au
    localparam int W = hsd_width(N, DS[k]);
    logic              add_sub = 0, ext_int = 0, we = 0, re1 = 0, re2 = 0;
    logic [W-1:0]      ext_data = '0, data_out;
    logic [4:0]        waddr = '0, raddr1 = '0, raddr2 = '0;
    logic signed [1:0] cout;
    longint            model [32];

    hsd_au #(.N(N), .D(DS[k]), .DEPTH(32)) u_au (
      .clk(clk), .rst_n(rst_n), .add_sub(add_sub), .ext_int(ext_int), .ext_data(ext_data),
      .we(we), .waddr(waddr), .re1(re1), .raddr1(raddr1), .re2(re2), .raddr2(raddr2),
      .data_out(data_out), .cout(cout));

    function automatic longint wval(logic [W-1:0] w);
      logic [NMAX-1:0] h, l;
      hsd_unpack_word((2*NMAX)'(w), N, DS[k], h, l);
      return hsd_value(h, l, N);
    endfunction

    initial begin
      au_checks[k] = 0;
      au_failures[k] = 0;
      au_done[k] = 0;
      @(posedge rst_n);
      for (int i = 0; i < 32; i++) begin
        logic [NMAX-1:0] h, l;
        hsd_random(h, l, N, DS[k], 0);
        @(negedge clk);
        ext_int = 1; we = 1; waddr = 5'(i); ext_data = W'(hsd_pack_word(h, l, N, DS[k]));
        model[i] = hsd_value(h, l, N);
      end
      @(negedge clk);
      we = 0; ext_int = 0;
      // per operation: read A and B, write A +/- B, read the result back
      for (int t = 0; t < NVEC; t++) begin
        int ra, rb, rd;
        logic o;
        ra = $urandom_range(0, 31);
        rb = $urandom_range(0, 31);
        rd = $urandom_range(0, 31);
        o  = 1'($urandom_range(0, 1));
        re1 = 1; re2 = 1; raddr1 = 5'(ra); raddr2 = 5'(rb);
        @(negedge clk);
        re1 = 0; re2 = 0;
        au_checks[k]++;
        if (wval(data_out) != model[ra]) au_failures[k]++;
        add_sub = o; we = 1; waddr = 5'(rd);
        model[rd] = o ? model[ra] - model[rb] : model[ra] + model[rb];
        @(negedge clk);
        we = 0;
        re1 = 1; raddr1 = 5'(rd);
        @(negedge clk);
        re1 = 0;
        au_checks[k]++;
        if (((wval(data_out) - model[rd]) & MASK) != 0) au_failures[k]++;
        model[rd] = wval(data_out);
      end
      au_done[k] = 1;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NVEC; t++) begin
      for (int k = 0; k < ND; k++) begin
        hsd_random(x_hi[k], x_lo[k], N, DS[k], 0);
        hsd_random(y_hi[k], y_lo[k], N, DS[k], 0);
        op[k] = 1'($urandom_range(0, 1));
      end
      #1;
      for (int k = 0; k < ND; k++) begin
        longint vx, vy, got;
        vx = hsd_value(x_hi[k], x_lo[k], N);
        vy = hsd_value(y_hi[k], y_lo[k], N);
        got = hsd_value(za_hi[k], za_lo[k], N) + ((longint'(za_c[k].v) - longint'(za_c[k].w)) <<< N);
        checks++;
        if (got != vx + vy) begin
          failures++;
          if (failures < 10) $display("FAIL adder D=%0d", DS[k]);
        end
        for (int a = 0; a < 2; a++) begin
          got = hsd_value(zs_hi[a][k], zs_lo[a][k], N) + (longint'(zs_c[a][k]) <<< N);
          checks++;
          if (got != (op[k] ? vx - vy : vx + vy)) begin
            failures++;
            if (failures < 10) $display("FAIL addsub arch %0d D=%0d", a + 1, DS[k]);
          end
        end
      end
    end
    for (int k = 0; k < ND; k++) wait (au_done[k]);
    for (int k = 0; k < ND; k++) begin
      checks += au_checks[k];
      failures += au_failures[k];
      if (au_failures[k] != 0) $display("FAIL AU D=%0d: %0d mismatches", DS[k], au_failures[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
