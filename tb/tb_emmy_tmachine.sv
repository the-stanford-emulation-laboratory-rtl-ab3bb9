// tb_emmy_tmachine: random T-machine operations of every class against a
// reference model written here, including the serial shifter's latency
// (a shift by n > 0 places completes n clocks after start) and full
// 32-step multiply and divide sequences built from the extended steps.
module tb_emmy_tmachine;
  import emmy_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [13:0] tcf = 0;
  logic [17:0] acf = 0;
  word_t a = 0, b = 0, lo = 0;
  logic carry_in = 0;
  logic busy, done, wr, wr_lo;
  reg_idx_t wr_idx, wr_lo_idx;
  word_t res, res_lo;
  logic [5:0] cc, cc_we;
  int checks = 0, failures = 0;

  emmy_tmachine dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Runs one operation; returns the clocks from start to done.
  task automatic run(output int lat);
    @(negedge clk);
    start = 1; lat = 0;
    #1;
    while (!done) begin @(negedge clk); lat++; #1; end
  endtask

  task automatic finish_op();
    @(posedge clk); #1; start = 0;
  endtask

  function automatic word_t rotl(word_t v, int n);
    n = n % 32;
    return n == 0 ? v : ((v << n) | (v >> (32 - n)));
  endfunction

  function automatic word_t mask_of(int lsb, int wm1);
    word_t m = 0;
    for (int i = 0; i <= wm1; i++) if (lsb + i < 32) m[lsb + i] = 1;
    return m;
  endfunction

  initial begin
    int lat;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // logical: all 16 functions
    for (int n = 0; n < 200; n++) begin
      tcf_alu_t t;
      word_t exp;
      t = '{cls: TC_LOGIC, imm: 0, opc: 4'($urandom), op2: 3'd2, op1: 3'd1};
      tcf = t; a = $urandom; b = $urandom;
      for (int i = 0; i < 32; i++) exp[i] = t.opc[{a[i], b[i]}];
      run(lat);
      check(lat == 0 && wr && wr_idx == 3'd1 && res == exp, $sformatf("logic %b", t.opc));
      check(cc[CC_Z] == (exp == 0) && cc[CC_N] == exp[31], "logic cc");
      finish_op();
    end

    // arithmetic
    for (int n = 0; n < 400; n++) begin
      tcf_alu_t t;
      logic [32:0] e;
      logic [3:0] op;
      bit wexp, v;
      op = 4'($urandom_range(0, 7));
      t = '{cls: TC_ARITH, imm: 0, opc: op, op2: 3'd3, op1: 3'd4};
      tcf = t;
      a = (n % 5 == 0) ? 32'h7FFF_FFFF : $urandom;
      b = (n % 7 == 0) ? 32'h8000_0000 : $urandom;
      carry_in = $urandom_range(0, 1);
      case (op)
        AR_ADD:  e = {1'b0, a} + {1'b0, b};
        AR_ADDC: e = {1'b0, a} + {1'b0, b} + 33'(carry_in);
        AR_SUB, AR_CMP: e = {1'b0, a} + {1'b0, ~b} + 33'd1;
        AR_SUBC: e = {1'b0, a} + {1'b0, ~b} + 33'(carry_in);
        AR_RSUB: e = {1'b0, b} + {1'b0, ~a} + 33'd1;
        AR_NEG:  e = {1'b0, 32'd0} + {1'b0, ~b} + 33'd1;
        default: e = {1'b0, b};
      endcase
      wexp = (op != AR_CMP);
      run(lat);
      check(lat == 0 && wr == wexp && res == e[31:0], $sformatf("arith op %0d a=%h b=%h res=%h exp=%h", op, a, b, res, e[31:0]));
      check(cc[CC_C] == e[32] && cc_we[CC_C], $sformatf("carry op %0d", op));
      if (op == AR_ADD) begin
        v = (a[31] == b[31]) && (e[31] != a[31]);
        check(cc[CC_V] == v, "overflow add");
      end
      if (op == AR_SUB) begin
        v = (a[31] != b[31]) && (e[31] != a[31]);
        check(cc[CC_V] == v, "overflow sub");
      end
      finish_op();
    end

    // immediate operand
    begin
      tcf_alu_t t;
      t = '{cls: TC_ARITH, imm: 1, opc: AR_ADD, op2: 3'd0, op1: 3'd5};
      tcf = t; acf = 18'h3FFFF; a = 32'd10; b = 32'hDEAD;  // b ignored by the DUT, imm = -1
      run(lat);
      // The DUT takes b from its port; the immediate is selected by the CPU.
      check(res == a + b, "imm passes b through port");
      finish_op();
    end

    // shifts: one bit per clock
    for (int n = 0; n < 60; n++) begin
      tcf_alu_t t;
      word_t exp; logic link;
      int sh;
      logic [3:0] op;
      op = 4'($urandom_range(0, 4));
      sh = (n < 5) ? n : $urandom_range(0, 31);
      t = '{cls: TC_SHIFT, imm: 0, opc: op, op2: 3'd1, op1: 3'd6};
      tcf = t; a = $urandom; b = 32'(sh) | 32'hFFFF_FFE0;
      case (op)
        SH_SLL: begin exp = a << sh; link = (sh > 0) ? a[32 - sh] : 1'b0; end
        SH_SRL: begin exp = a >> sh; link = (sh > 0) ? a[sh - 1] : 1'b0; end
        SH_SRA: begin exp = word_t'($signed(a) >>> sh); link = (sh > 0) ? a[sh - 1] : 1'b0; end
        SH_ROL: begin exp = rotl(a, sh); link = exp[0]; end
        default: begin exp = rotl(a, 32 - sh); link = exp[31]; end
      endcase
      run(lat);
      check(lat == sh, $sformatf("shift latency %0d want %0d", lat, sh));
      check(res == exp && wr && wr_idx == 3'd6, $sformatf("shift op %0d by %0d: %h want %h", op, sh, res, exp));
      if (sh > 0) check(cc[CC_LINK] == link && cc_we[CC_LINK], "shift link");
      finish_op();
    end

    // extract / insert
    for (int n = 0; n < 200; n++) begin
      tcf_field_t t;
      int pos, lsb, wm1;
      word_t m, exp;
      bit ins;
      ins = $urandom_range(0, 1);
      pos = $urandom_range(0, 31); lsb = $urandom_range(0, 31); wm1 = $urandom_range(0, 31);
      t = '{cls: ins ? TC_INSERT : TC_EXTRACT, pos: 5'(pos), op2: 3'd2, op1: 3'd3};
      tcf = t; acf = {8'd0, 5'(lsb), 5'(wm1)};
      a = $urandom; b = $urandom;
      m = mask_of(lsb, wm1);
      exp = ins ? ((a & ~m) | (rotl(b, pos) & m)) : (rotl(b, pos) & m);
      run(lat);
      check(lat == 0 && wr && res == exp, $sformatf("%s pos=%0d lsb=%0d w=%0d", ins ? "insert" : "extract", pos, lsb, wm1 + 1));
      finish_op();
    end

    // 32 multiply steps give the 64-bit unsigned product
    for (int n = 0; n < 10; n++) begin
      tcf_alu_t t;
      word_t mc, mp, hi, lw;
      logic [63:0] p;
      mc = $urandom; mp = $urandom;
      hi = 0; lw = mp;
      t = '{cls: TC_EXT, imm: 0, opc: EX_MULS, op2: 3'd4, op1: 3'd2};
      tcf = t;
      for (int s = 0; s < 32; s++) begin
        a = hi; b = mc; lo = lw;
        run(lat);
        check(wr && wr_lo && wr_idx == 3'd2 && wr_lo_idx == 3'd3, "muls dest");
        hi = res; lw = res_lo;
        finish_op();
      end
      p = {32'd0, mc} * {32'd0, mp};
      check({hi, lw} == p, $sformatf("multiply %h*%h", mc, mp));
    end

    // 32 divide steps give quotient and remainder
    for (int n = 0; n < 10; n++) begin
      tcf_alu_t t;
      word_t dd, dv, hi, lw;
      dd = $urandom; dv = $urandom_range(1, 32'h00FF_FFFF);
      hi = 0; lw = dd;
      t = '{cls: TC_EXT, imm: 0, opc: EX_DIVS, op2: 3'd4, op1: 3'd2};
      tcf = t;
      for (int s = 0; s < 32; s++) begin
        a = hi; b = dv; lo = lw;
        run(lat);
        hi = res; lw = res_lo;
        finish_op();
      end
      check(lw == dd / dv && hi == dd % dv, $sformatf("divide %0d/%0d", dd, dv));
    end

    // 8 decimal-to-binary steps convert 8 BCD digits
    for (int n = 0; n < 10; n++) begin
      tcf_alu_t t;
      word_t bcd, hi, lw;
      int v;
      v = $urandom_range(0, 99999999);
      bcd = 0;
      for (int d = 0, x = v; d < 8; d++, x /= 10) bcd[4*d +: 4] = 4'(x % 10);
      hi = 0; lw = bcd;
      t = '{cls: TC_EXT, imm: 0, opc: EX_DECB, op2: 3'd0, op1: 3'd6};
      tcf = t;
      for (int s = 0; s < 8; s++) begin
        a = hi; b = 0; lo = lw;
        run(lat);
        check(wr_idx == 3'd6 && wr_lo_idx == 3'd7, "decb dest");
        hi = res; lw = res_lo;
        finish_op();
      end
      check(hi == 32'(v), $sformatf("decimal %0d got %0d", v, hi));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
