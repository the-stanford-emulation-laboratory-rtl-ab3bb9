// tb_emmy_i8080_workload: a small Intel 8080 emulator in EMMY microcode,
// run on the full-size laboratory (emmy_lab_top at its defaults).
//
// The emulator follows the organisation of a table-driven emulator: the
// 8-bit opcode is fetched from main memory with a one-byte right-justified
// bus read, and a one-out-of-256 decode inserts it into the MAR field of
// register 0, so that the next microinstruction comes from a 256-word jump
// table at microstore 0x000-0x0FF whose entry jumps to the handler.
// Handlers end with a jump back to the fetch loop.
// 8080 state in EMMY registers:
//   R1  PC as a complete bus address word (1-byte read of main memory)
//   R2  accumulator A        R3  register B        R7  zero flag (1 = zero)
//   R5  bus address word base for 1-byte reads; R4, R6 scratch
// Emulated opcodes: MVI A,n (3E), MVI B,n (06), ADD B (80), DCR B (05),
// JNZ a (C2, low address byte used), STA a (32), HLT (76); every other
// table entry points to a handler that marks an illegal opcode and halts.
//
// The 8080 program sums 5+4+3+2+1 with a DCR/JNZ loop and stores the sum to
// main memory. Checked: the register and memory results, the number of
// emulated instructions and of executed microinstructions (hand count), and
// the fetch-and-decode time in clocks. The original one-out-of-256 decode
// took 1.5 us (43 clocks of 35 ns); the shortest decode here (no operand
// read of the previous instruction still in flight) must be within 10% of
// that. A decode that follows an operand read waits for it and is longer.
module tb_emmy_i8080_workload;
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

  // microstore map
  localparam int F0 = 12'h100;             // fetch/decode loop, 4 words + table
  localparam int H_MVIA = 12'h110, H_MVIB = 12'h114, H_ADDB = 12'h118, H_DCRB = 12'h120,
                 H_JNZ = 12'h128, H_STA = 12'h130, H_HLT = 12'h138, H_ILL = 12'h13C;
  localparam int K_WRBASE = 12'hFF0;       // constant: 1-byte write address word base
  localparam word_t RD_BASE = 32'h0002_0000, WR_BASE = 32'h0102_0000;
  localparam int HALT = 32'h3EFFF;
  localparam logic [7:0] ZM = 8'(1 << CC_Z);
  // 1.5 us is 43 clocks of 35 ns; the bound allows 10% because this design
  // rounds the 180 ns microstore cycle up to 6 clocks (210 ns).
  localparam int DECODE_LIMIT = 47;

  // ---------------------------------------------------------------- decode timing
  int cyc = 0, t0 = -1, n_decode = 0, dec_min = 1 << 30, dec_max = 0, n_retire = 0;
  maddr_t mar_q = '0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (cpu_retire) n_retire++;
    mar_q <= cpu_state.mar;
    if (cpu_state.mar == maddr_t'(F0) && mar_q != maddr_t'(F0)) t0 = cyc;
    if (cpu_state.mar >= maddr_t'(H_MVIA) && mar_q < maddr_t'(F0) && t0 >= 0) begin
      n_decode++;
      if (cyc - t0 < dec_min) dec_min = cyc - t0;
      if (cyc - t0 > dec_max) dec_max = cyc - t0;
    end
  end

  task automatic ms(input int a, input logic [31:0] w);
    u_cp.wr(UNIT_CPU, 16'(a), w);
  endtask
  task automatic mem_byte(input int a, input logic [7:0] b);
    word_t q; bit ok;
    u_cp.xfer(BOP_WRITE, 2'd0, 1'b0, 1'b0, UNIT_MEM, 16'(a), {24'd0, b}, q, ok);
  endtask
  task automatic mem_rd_byte(input int a, output logic [7:0] b);
    word_t q; bit ok;
    u_cp.xfer(BOP_READ, 2'd0, 1'b0, 1'b0, UNIT_MEM, 16'(a), 32'd0, q, ok);
    b = q[7:0];
  endtask

  initial begin
    word_t q, r [8];
    logic [7:0] b;
    logic [7:0] prog [14];
    int exp_retire, n_instr;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- jump table
    for (int op = 0; op < 256; op++) begin
      int h;
      case (op)
        8'h3E: h = H_MVIA;  8'h06: h = H_MVIB;  8'h80: h = H_ADDB;  8'h05: h = H_DCRB;
        8'hC2: h = H_JNZ;   8'h32: h = H_STA;   8'h76: h = H_HLT;   default: h = H_ILL;
      endcase
      ms(op, ui(T_NOP, a_dir(AC_JUMP, 0, h)));
    end
    // ---- fetch and one-out-of-256 decode
    ms(F0 + 0, ui(T_NOP, a_reg(AC_INDIR, 4, 1, IS_BUSRD, 0)));   // R4 = opcode byte at PC
    ms(F0 + 1, ui(T_NOP, a_reg(AC_PTR, 1, 1, 0, 1)));            // PC += 1, read in flight
    ms(F0 + 2, ui(T_NOP, a_reg(AC_INDIR, 0, 0, IS_WAIT, 0)));
    ms(F0 + 3, ui(t_fld(1, 0, 0, 4), fmask(0, 12)));             // MAR = opcode
    // MVI A,n / MVI B,n: the next fetch waits for the operand read
    ms(H_MVIA + 0, ui(T_NOP, a_reg(AC_INDIR, 2, 1, IS_BUSRD, 0)));
    ms(H_MVIA + 1, ui(T_NOP, a_reg(AC_PTR, 1, 1, 0, 1)));
    ms(H_MVIA + 2, ui(T_NOP, a_dir(AC_JUMP, 0, F0)));
    ms(H_MVIB + 0, ui(T_NOP, a_reg(AC_INDIR, 3, 1, IS_BUSRD, 0)));
    ms(H_MVIB + 1, ui(T_NOP, a_reg(AC_PTR, 1, 1, 0, 1)));
    ms(H_MVIB + 2, ui(T_NOP, a_dir(AC_JUMP, 0, F0)));
    // ADD B
    ms(H_ADDB + 0, ui(t_op(TC_ARITH, AR_ADD, 2, 3), A_NOP));
    ms(H_ADDB + 1, ui(t_opi(TC_LOGIC, L_AND, 2), imm18(8'hFF)));
    ms(H_ADDB + 2, ui(T_NOP, a_dir(AC_JUMP, 0, F0)));
    // DCR B: 8-bit decrement, zero flag into R7
    ms(H_DCRB + 0, ui(t_opi(TC_ARITH, AR_SUB, 3), imm18(1)));
    ms(H_DCRB + 1, ui(t_opi(TC_LOGIC, L_AND, 3), imm18(8'hFF)));
    ms(H_DCRB + 2, ui(t_cond(ZM, 3'b000), a_dir(AC_LOADI, 7, 1)));
    ms(H_DCRB + 3, ui(t_cond(ZM, 3'b010), a_dir(AC_LOADI, 7, 0)));
    ms(H_DCRB + 4, ui(T_NOP, a_dir(AC_JUMP, 0, F0)));
    // JNZ a: PC = read base | low address byte when the zero flag is clear
    ms(H_JNZ + 0, ui(T_NOP, a_reg(AC_INDIR, 6, 1, IS_BUSRD, 0)));
    ms(H_JNZ + 1, ui(T_NOP, a_reg(AC_PTR, 1, 1, 0, 2)));
    ms(H_JNZ + 2, ui(T_NOP, a_reg(AC_INDIR, 0, 0, IS_WAIT, 0)));
    ms(H_JNZ + 3, ui(t_op(TC_LOGIC, L_OR, 6, 5), A_NOP));
    ms(H_JNZ + 4, ui(t_opi(TC_ARITH, AR_CMP, 7), imm18(0)));
    ms(H_JNZ + 5, ui(t_cond(ZM, 3'b000), a_reg(AC_PTR, 1, 6, 0, 0)));
    ms(H_JNZ + 6, ui(T_NOP, a_dir(AC_JUMP, 0, F0)));
    // STA a: main memory byte at the low address byte = A
    ms(H_STA + 0, ui(T_NOP, a_reg(AC_INDIR, 6, 1, IS_BUSRD, 0)));
    ms(H_STA + 1, ui(T_NOP, a_reg(AC_PTR, 1, 1, 0, 2)));
    ms(H_STA + 2, ui(T_NOP, a_reg(AC_INDIR, 0, 0, IS_WAIT, 0)));
    ms(H_STA + 3, ui(T_NOP, a_dir(AC_LOADR, 4, K_WRBASE)));
    ms(H_STA + 4, ui(t_op(TC_LOGIC, L_OR, 6, 4), A_NOP));
    ms(H_STA + 5, ui(T_NOP, a_reg(AC_INDIR, 2, 6, IS_BUSWR, 0)));
    ms(H_STA + 6, ui(T_NOP, a_dir(AC_JUMP, 0, F0)));
    // HLT, illegal opcode
    ms(H_HLT, ui(t_opi(TC_LOGIC, L_AND, 0), imm18(HALT)));
    ms(H_ILL + 0, ui(T_NOP, a_dir(AC_LOADI, 6, 12'hBAD)));
    ms(H_ILL + 1, ui(t_opi(TC_LOGIC, L_AND, 0), imm18(HALT)));
    ms(K_WRBASE, WR_BASE);

    // ---- 8080 program: A = 5+4+3+2+1, stored at 0x40
    prog = '{8'h3E, 8'h00,           // 0: MVI A,0
             8'h06, 8'h05,           // 2: MVI B,5
             8'h80,                  // 4: ADD B
             8'h05,                  // 5: DCR B
             8'hC2, 8'h04, 8'h00,    // 6: JNZ 4
             8'h32, 8'h40, 8'h00,    // 9: STA 40h
             8'h76,                  // 12: HLT
             8'hFF};
    for (int i = 0; i < 14; i++) mem_byte(i, prog[i]);
    mem_byte(8'h40, 8'h00);

    // ---- 8080 state and start
    u_cp.wr(UNIT_CPU, 16'h1001, RD_BASE);   // PC = 0
    u_cp.wr(UNIT_CPU, 16'h1002, 32'd0);
    u_cp.wr(UNIT_CPU, 16'h1003, 32'd0);
    u_cp.wr(UNIT_CPU, 16'h1005, RD_BASE);
    u_cp.wr(UNIT_CPU, 16'h1007, 32'd0);
    u_cp.wr(UNIT_CPU, 16'h1000, 32'(1 << 12) | 32'(F0));
    do begin repeat (50) @(negedge clk); u_cp.rd(UNIT_CPU, 16'h1000, q); end while (q[12]);

    for (int i = 0; i < 8; i++) u_cp.rd(UNIT_CPU, 16'h1000 | 16'(i), r[i]);
    mem_rd_byte(8'h40, b);
    check(r[2] == 32'd15, $sformatf("A = %0d", r[2]));
    check(r[3] == 32'd0, "B counted down to 0");
    check(r[1] == (RD_BASE | 32'd13), $sformatf("PC %h", r[1]));
    check(r[6] != 32'hBAD, "no illegal opcode");
    check(b == 8'd15, $sformatf("stored sum %0d", b));
    check(r[0][11:0] == 12'(H_HLT + 1), "halted in the HLT handler");
    // instructions: 2 MVI, 5 x (ADD, DCR, JNZ), STA, HLT
    n_instr = 2 + 3 * 5 + 2;
    check(n_decode == n_instr, $sformatf("decodes %0d want %0d", n_decode, n_instr));
    exp_retire = 5 * n_instr + 2 * 3 + 5 * (3 + 5 + 7) + 7 + 1;
    check(n_retire == exp_retire, $sformatf("microinstructions %0d want %0d", n_retire, exp_retire));
    check(dec_min <= DECODE_LIMIT, $sformatf("fetch and decode %0d..%0d clocks, limit %0d",
                                             dec_min, dec_max, DECODE_LIMIT));
    $display("8080 emulation: %0d instructions, %0d microinstructions, %0d clocks, decode %0d..%0d clocks",
             n_instr, n_retire, cyc, dec_min, dec_max);

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
