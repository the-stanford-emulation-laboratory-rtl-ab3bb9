// tb_emmy_deltran_workload: a stack-evaluation kernel in the style of a
// directly executed language, run on the full-size laboratory
// (emmy_lab_top at its defaults).
//
// The memory layout follows a FORTRAN-like language machine: program data
// sits at the upper end of the 64K-byte main memory, a 64-word LIFO
// evaluation stack at the lower end with COMMON data just above it. Shaped
// operands are handled by the main memory, not by microcode: the kernel
// reads halfword array elements with shaped, two-byte, right-justified,
// sign-extended bus reads (the array pointer counts elements, the memory
// scales it to bytes) and stores the result with a two-byte write.
//
// Microprogram (the CPU never sees a byte address, offset or sign bit of
// an array element):
//   push phase   for each of N halfwords: read it (overlapped with the
//                pointer step), push the 32-bit value on the stack
//   reduce phase N-1 times: pop b, pop a (the second read waits for the
//                first), push a+b
//   finish       pop the result, store its low halfword into COMMON, halt
// Registers: R1 array pointer (then scratch), R2 loop count, R3 and R4 the
// stack pointer as write and read address words, R6 data, R7 the constant 4.
//
// Checked: the sum (with negative elements), the values left in the stack
// words, the COMMON halfword and its neighbours, the stack pointers back at
// the base, the maximum stack depth within 64 words, and the exact number
// of executed microinstructions.
module tb_emmy_deltran_workload;
  import emmy_pkg::*;
  import tb_emmy_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic        ext_req [2];
  logic        ext_gnt [2];
  hbus_req_t   ext_m   [2];
  hbus_rsp_t   ext_s_rsp;
  hbus_req_t   host_bus;
  hbus_rsp_t   host_rsp;
  state_word_t cpu_state;
  logic cpu_retire, cpu_bus_stall, cpu_shift_step, cpu_int_taken, bac_busy, bac_done;

  emmy_lab_top dut (
    .clk, .rst_n, .ext_req, .ext_gnt, .ext_m, .ext_s_rsp, .host_bus, .host_rsp,
    .cpu_state, .cpu_retire, .cpu_bus_stall, .cpu_shift_step, .cpu_int_taken,
    .bac_busy, .bac_done);
  tb_bus_master u_cp (.clk, .req(ext_req[0]), .gnt(ext_gnt[0]), .m(ext_m[0]), .rsp(host_rsp));
  assign ext_req[1] = 1'b0;
  assign ext_m[1]   = '0;
  assign ext_s_rsp  = '0;
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int N        = 24;             // halfword operands
  localparam int ARR      = 16'h8000;       // program data, upper memory
  localparam int STK      = 16'h0040;       // 64-word evaluation stack
  localparam int STK_WORDS = 64;
  localparam int COMMON   = STK + 4 * STK_WORDS;
  localparam int P = 12'h010, Q = 12'h020, E = 12'h030, K = 12'h0F0;
  localparam int HALT = 32'h3EFFF;
  // address word commands: {shaped, left, sext, size = bytes - 1, op}
  localparam logic [7:0] C_RD2S = 8'h54, C_RD4 = 8'h0C, C_WR4 = 8'h0D, C_WR2 = 8'h05;

  int n_retire = 0, n_stall = 0, max_depth = 0;
  always @(posedge clk) if (rst_n) begin
    if (cpu_retire) n_retire++;
    if (cpu_bus_stall) n_stall++;
  end

  task automatic ms(input int a, input logic [31:0] w);
    u_cp.wr(UNIT_CPU, 16'(a), w);
  endtask
  task automatic mem_xfer(input bus_op_e op, input int size, input int a, input word_t d,
                          output word_t q);
    bit ok;
    u_cp.xfer(op, 2'(size - 1), 1'b0, 1'b0, UNIT_MEM, 16'(a), d, q, ok);
  endtask

  // stack depth, seen from the pushes on the host bus
  always @(posedge clk) if (rst_n && host_bus.msyn && host_bus.a.unit == UNIT_MEM &&
                            host_bus.a.cmd.op == BOP_WRITE && cpu_state.state[ST_RUN] &&
                            int'(host_bus.a.addr) >= STK && int'(host_bus.a.addr) < COMMON) begin
    int d;
    d = (int'(host_bus.a.addr) - STK) / 4 + 1;
    if (d > max_depth) max_depth = d;
  end

  initial begin
    logic signed [15:0] h [N];
    word_t q, r [8];
    int    sum, exp_retire;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- program data: halfwords, some negative
    sum = 0;
    for (int i = 0; i < N; i++) begin
      h[i] = 16'($urandom_range(0, 20000)) - 16'sd10000;
      sum += int'(h[i]);
      mem_xfer(BOP_WRITE, 2, ARR + 2 * i, word_t'(unsigned'(h[i])), q);
    end
    mem_xfer(BOP_WRITE, 4, COMMON, 32'hDEAD_BEEF, q);

    // ---- microprogram
    ms(P + 0, ui(T_NOP, a_reg(AC_INDIR, 6, 1, IS_BUSRD, 0)));     // R6 = sext halfword
    ms(P + 1, ui(T_NOP, a_reg(AC_PTR, 1, 1, 0, 1)));              // next element
    ms(P + 2, ui(T_NOP, a_reg(AC_INDIR, 0, 0, IS_WAIT, 0)));
    ms(P + 3, ui(T_NOP, a_reg(AC_INDIR, 6, 3, IS_BUSWR, 0)));     // push
    ms(P + 4, ui(t_op(TC_ARITH, AR_ADD, 4, 7), a_reg(AC_PTR, 3, 3, 0, 4)));
    ms(P + 5, ui(T_NOP, a_reg(AC_PTR, 2, 2, 1, -6)));             // loop to P+0
    ms(P + 6, ui(T_NOP, a_dir(AC_LOADI, 2, N - 1)));
    ms(P + 7, ui(T_NOP, a_dir(AC_JUMP, 0, Q)));
    ms(Q + 0, ui(t_op(TC_ARITH, AR_SUB, 4, 7), a_reg(AC_PTR, 3, 3, 0, -4)));  // pop b
    ms(Q + 1, ui(T_NOP, a_reg(AC_INDIR, 6, 4, IS_BUSRD, 0)));
    ms(Q + 2, ui(t_op(TC_ARITH, AR_SUB, 4, 7), a_reg(AC_PTR, 3, 3, 0, -4)));  // pop a
    ms(Q + 3, ui(T_NOP, a_reg(AC_INDIR, 1, 4, IS_BUSRD, 0)));     // waits for b
    ms(Q + 4, ui(T_NOP, a_reg(AC_INDIR, 0, 0, IS_WAIT, 0)));
    ms(Q + 5, ui(t_op(TC_ARITH, AR_ADD, 1, 6), a_reg(AC_INDIR, 1, 3, IS_BUSWR, 0))); // push a+b
    ms(Q + 6, ui(t_op(TC_ARITH, AR_ADD, 4, 7), a_reg(AC_PTR, 3, 3, 0, 4)));
    ms(Q + 7, ui(T_NOP, a_reg(AC_PTR, 2, 2, 1, -8)));             // loop to Q+0
    ms(E + 0, ui(t_op(TC_ARITH, AR_SUB, 4, 7), a_reg(AC_PTR, 3, 3, 0, -4)));  // pop result
    ms(E + 1, ui(T_NOP, a_reg(AC_INDIR, 6, 4, IS_BUSRD, 0)));
    ms(E + 2, ui(T_NOP, a_reg(AC_INDIR, 0, 0, IS_WAIT, 0)));
    ms(E + 3, ui(T_NOP, a_dir(AC_LOADR, 1, K)));
    ms(E + 4, ui(T_NOP, a_reg(AC_INDIR, 6, 1, IS_BUSWR, 0)));     // COMMON halfword
    ms(E + 5, ui(T_NOP, a_reg(AC_INDIR, 0, 0, IS_WAIT, 0)));
    ms(E + 6, ui(t_opi(TC_LOGIC, L_AND, 0), imm18(HALT)));
    ms(K, {C_WR2, UNIT_MEM, 16'(COMMON)});
    // Q+7 falls through to Q+8: jump to the finish
    ms(Q + 8, ui(T_NOP, a_dir(AC_JUMP, 0, E)));

    // ---- registers and start
    u_cp.wr(UNIT_CPU, 16'h1001, {C_RD2S, UNIT_MEM, 16'(ARR / 2)});  // element number
    u_cp.wr(UNIT_CPU, 16'h1002, N);
    u_cp.wr(UNIT_CPU, 16'h1003, {C_WR4, UNIT_MEM, 16'(STK)});
    u_cp.wr(UNIT_CPU, 16'h1004, {C_RD4, UNIT_MEM, 16'(STK)});
    u_cp.wr(UNIT_CPU, 16'h1007, 32'd4);
    u_cp.wr(UNIT_CPU, 16'h1000, 32'(1 << 12) | 32'(P));
    do begin repeat (100) @(negedge clk); u_cp.rd(UNIT_CPU, 16'h1000, q); end while (q[12]);

    // ---- results
    for (int i = 0; i < 8; i++) u_cp.rd(UNIT_CPU, 16'h1000 | 16'(i), r[i]);
    check(r[6] == word_t'(sum), $sformatf("sum %0d want %0d", int'(r[6]), sum));
    check(r[3] == {C_WR4, UNIT_MEM, 16'(STK)} && r[4] == {C_RD4, UNIT_MEM, 16'(STK)},
          "stack pointers back at the base");
    check(max_depth == N, $sformatf("stack depth %0d want %0d", max_depth, N));
    check(max_depth <= STK_WORDS, "stack within 64 words");
    mem_xfer(BOP_READ, 4, COMMON, 32'd0, q);
    check(q == {16'(sum), 16'hBEEF}, $sformatf("COMMON halfword %h", q));
    // each reduction writes its partial sum one word lower, so the bottom
    // word ends with the total and the top word keeps the last element
    mem_xfer(BOP_READ, 4, STK, 32'd0, q);
    check(q == word_t'(sum), "bottom stack word holds the sum");
    mem_xfer(BOP_READ, 4, STK + 4 * (N - 1), 32'd0, q);
    check(q == word_t'(int'(h[N - 1])), "top pushed word is the last element, sign-extended");
    exp_retire = 6 * N + 2 + 8 * (N - 1) + 1 + 7;
    check(n_retire == exp_retire, $sformatf("microinstructions %0d want %0d", n_retire, exp_retire));
    check(n_stall > 0, "overlapped reads stalled the second access");
    $display("stack kernel: %0d halfwords, %0d microinstructions, %0d stall clocks",
             N, n_retire, n_stall);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
