// tb_emmy_cpu: runs microprograms on the EMMY CPU, loaded and started over
// the host bus the way the control processor does it, with a small main
// memory on the bus. The microprograms exercise immediate and register
// T-operations, the multiply-step loop (one microinstruction repeated 32
// times by the ACF), serial shifts, conditional skip, branch, jump and link,
// return through an insert into the state word, microstore direct and
// indirect moves, overlapped host bus reads and writes with the stall and
// the wait, halt, and an interrupt state swap. Results are read back over
// the bus and compared with values computed here; the number of executed
// microinstructions is compared with the count worked out by hand.
module tb_emmy_cpu;
  import emmy_pkg::*;
  import tb_emmy_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic      req [2];
  logic      gnt [2];
  hbus_req_t m_in [2];
  hbus_rsp_t s_in [2];
  hbus_req_t bus;
  hbus_rsp_t rsp;
  state_word_t sw;
  logic retire, bus_stall, shift_step, int_taken;

  emmy_bus_arbiter #(.NM(2), .NS(2)) u_arb (.clk, .rst_n, .req, .gnt, .m_in, .s_in, .bus, .rsp);
  emmy_cpu dut (
    .clk, .rst_n, .arb_req(req[0]), .arb_gnt(gnt[0]), .m_out(m_in[0]), .bus_rsp(rsp),
    .bus, .s_out(s_in[0]), .state_word(sw), .retire, .bus_stall, .shift_step, .int_taken);
  emmy_main_memory #(.MY_UNIT(UNIT_MEM), .BYTES(4096), .ACCESS_CLKS(19)) u_mem (
    .clk, .rst_n, .bus, .rsp(s_in[1]));
  tb_bus_master u_m (.clk, .req(req[1]), .gnt(gnt[1]), .m(m_in[1]), .rsp);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit ok_dummy;
  int n_retire = 0, n_stall = 0, n_shift = 0, n_int = 0;
  always @(posedge clk) if (rst_n) begin
    if (retire) n_retire++;
    if (bus_stall) n_stall++;
    if (shift_step) n_shift++;
    if (int_taken) n_int++;
  end

  localparam logic [15:0] REG = 16'h1000;
  localparam int RUNB = 12, IEB = 13;

  task automatic load(input int a, input logic [31:0] w);
    u_m.wr(UNIT_CPU, 16'(a), w);
  endtask
  task automatic reg_rd(input int r, output word_t q);
    u_m.rd(UNIT_CPU, REG | 16'(r), q);
  endtask
  task automatic wait_halt();
    word_t q;
    do begin repeat (20) @(negedge clk); reg_rd(0, q); end while (q[RUNB]);
  endtask

  // Address word for a 4-byte right-justified main memory access:
  // cmd 0x0C, unit 0x02, internal address 0x0010.
  localparam word_t MEMADR = 32'h0C02_0010;
  localparam int HALT_MASK = 32'h3EFFF;  // sign-extends to ~(1 << 12)

  initial begin
    word_t q, r [8];
    word_t mc, mp;
    logic [63:0] prod;
    int exp_retire;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(!sw.state[0], "halted after reset");

    mc = 32'd25; mp = 32'd100000;
    // ---- microprogram 1
    load(0,  ui(T_NOP, a_dir(AC_LOADI, 1, 25)));                     // R1 = 25
    load(1,  ui(t_opi(TC_ARITH, AR_MOV, 3), imm18(100000)));          // R3 = 100000
    load(2,  ui(t_opi(TC_ARITH, AR_MOV, 2), imm18(0)));               // R2 = 0
    load(3,  ui(T_NOP, a_dir(AC_LOADI, 4, 32)));                      // R4 = 32
    load(4,  ui(t_op(TC_EXT, EX_MULS, 2, 1), a_reg(AC_PTR, 4, 4, 1, -1))); // step; loop while --R4 != 0
    load(5,  ui(T_NOP, a_dir(AC_STORER, 2, 12'h800)));               // M[800] = R2 (high)
    load(6,  ui(T_NOP, a_dir(AC_STORER, 3, 12'h801)));               // M[801] = R3 (low)
    load(7,  ui(t_opi(TC_ARITH, AR_MOV, 5), imm18(32'h0C02)));        // R5 = 0x0C02
    load(8,  ui(t_opi(TC_SHIFT, SH_SLL, 5), imm18(16)));              // R5 <<= 16 (16 clocks)
    load(9,  ui(t_opi(TC_LOGIC, L_OR, 5), imm18(16'h0010)));          // R5 |= 0x10
    load(10, ui(T_NOP, a_reg(AC_INDIR, 3, 5, IS_BUSWR, 0)));          // bus[R5] = R3
    load(11, ui(T_NOP, a_reg(AC_INDIR, 7, 5, IS_BUSRD, 4)));          // R7 = bus[R5+4] (stalls)
    load(12, ui(T_NOP, a_reg(AC_INDIR, 0, 0, IS_WAIT, 0)));           // wait for the bus
    load(13, ui(t_op(TC_ARITH, AR_SUB, 6, 6), A_NOP));                // R6 = 0, Z = 1
    load(14, ui(t_cond(8'(1 << CC_Z), 3'b010), a_dir(AC_LOADI, 6, 99))); // skipped: Z set, inverted
    load(15, ui(t_cond(8'(1 << CC_Z), 3'b000), a_dir(AC_LOADI, 1, 55))); // done: R1 = 55
    load(16, ui(T_NOP, a_br(8'(1 << CC_Z), 3'b001, 1)));              // Z set: skip 17
    load(17, ui(T_NOP, a_dir(AC_LOADI, 6, -1)));                      // skipped
    load(18, ui(T_NOP, a_dir(AC_JUMP, 6, 40)));                       // call 40, R6 = 19
    load(19, ui(T_NOP, a_reg(AC_INDIR, 4, 1, IS_MSWR, 0)));       // M[R1+0] = R4
    load(20, ui(T_NOP, a_reg(AC_INDIR, 2, 1, IS_MSRD, 0)));           // R2 = M[R1]
    load(21, ui(t_opi(TC_LOGIC, L_AND, 0), imm18(HALT_MASK)));        // halt
    // subroutine: R1 ^= 0x3F0 and return by inserting R6 into the MAR field
    load(40, ui(t_opi(TC_LOGIC, L_XOR, 1), imm18(12'h3F0)));
    load(41, ui(t_fld(1, 0, 0, 6), fmask(0, 12)));
    // data read by the bus read
    u_m.wr(UNIT_MEM, 16'h0014, 32'hCAFE_F00D);

    u_m.wr(UNIT_CPU, REG | 16'd0, 32'(1 << RUNB));  // start at 0
    wait_halt();

    for (int i = 0; i < 8; i++) reg_rd(i, r[i]);
    prod = {32'd0, mc} * {32'd0, mp};
    u_m.rd(UNIT_CPU, 16'h800, q); check(q == prod[63:32], "product high in microstore");
    u_m.rd(UNIT_CPU, 16'h801, q); check(q == prod[31:0], $sformatf("product low %0d", q));
    check(r[4] == 0, "loop counter ran out");
    check(r[5] == MEMADR, $sformatf("shifted address %h", r[5]));
    u_m.rd(UNIT_MEM, 16'h0010, q); check(q == prod[31:0], "bus write reached main memory");
    check(r[7] == 32'hCAFE_F00D, $sformatf("bus read %h", r[7]));
    check(r[6] == 32'd19, "link register");
    check(r[1] == (32'd55 ^ 32'h3F0), $sformatf("conditional then subroutine: R1=%h", r[1]));
    check(r[2] == 32'd0, "indirect microstore store/load of R4");
    u_m.rd(UNIT_CPU, 16'(32'd55 ^ 32'h3F0), q); check(q == 0, "indirect store landed");
    check(r[0][11:0] == 12'd22 && !r[0][RUNB], "halted after the halt instruction");
    // executed: 0..3 (4), 4 x32, 5..18 minus skipped 17 (13), 40, 41, 19..21 (3)
    exp_retire = 4 + 32 + 13 + 2 + 3;
    check(n_retire == exp_retire, $sformatf("microinstructions %0d want %0d", n_retire, exp_retire));
    check(n_stall > 0, "bus stall happened");
    check(n_shift >= 16, "serial shift took a clock per bit");

    // ---- interrupt: swap the state word with microstore 0x900/0x901
    load(60, ui(T_NOP, a_dir(AC_LOADI, 1, 77)));
    load(61, ui(t_opi(TC_LOGIC, L_AND, 0), imm18(HALT_MASK)));
    load(12'h901, 32'(1 << RUNB) | 32'd60);                 // new state: run at 60
    u_m.wr(UNIT_CPU, REG | 16'd0, 32'(1 << IEB) | 32'd5);    // halted, interrupts on, MAR 5
    u_m.xfer(BOP_INTR, 2'd3, 0, 0, UNIT_CPU, 16'h900, 0, q, ok_dummy);
    wait_halt();
    u_m.rd(UNIT_CPU, 16'h900, q);
    check(q[11:0] == 12'd5 && q[IEB] && !q[RUNB], $sformatf("old state saved %h", q));
    reg_rd(1, q); check(q == 77, "interrupt handler ran");
    check(n_int == 1, "one interrupt taken");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
