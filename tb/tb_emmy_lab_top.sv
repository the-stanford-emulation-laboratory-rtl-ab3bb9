// tb_emmy_lab_top: end-to-end run of the whole laboratory at its full size
// (4K-word microstore, 64K-byte main memory, default timing).
//
// A behavioural control processor (bus master on external port 0) puts a
// microprogram and a data array into main memory, and has the block access
// controller page the microprogram into the CPU's microstore. It then starts
// the CPU with interrupts enabled. The microprogram sums the data array
// through overlapped main memory reads, writes the sum back to main memory
// and to an external bus slave (standing in for an auxiliary bus device),
// reads the slave back with a stalled overlapped read, and spins in a delay
// loop before halting. While the CPU runs:
//   * the control processor interrupts it; the handler sets a flag register
//     and returns by reloading the saved state word from the microstore;
//   * the control processor has the block access controller copy the data
//     array into the upper microstore, competing with the CPU's own
//     microinstruction fetches;
//   * a second external master (the console) keeps reading main memory and
//     writing and reading the external slave.
// Afterwards every result is read back over the bus and checked, the
// executed microinstruction count is compared with the hand count, and each
// mechanism (microinstruction retire, bus stall, serial shift step,
// interrupt, block transfer, arbitration wait, external slave access) must
// have occurred at least once.
module tb_emmy_lab_top;
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
  tb_bus_master u_cp  (.clk, .req(ext_req[0]), .gnt(ext_gnt[0]), .m(ext_m[0]), .rsp(host_rsp));
  tb_bus_master u_con (.clk, .req(ext_req[1]), .gnt(ext_gnt[1]), .m(ext_m[1]), .rsp(host_rsp));
  tb_bus_slave #(.UNIT(8'h20), .LAT(4)) u_aux (.clk, .bus(host_bus), .rsp(ext_s_rsp));
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_retire = 0, n_stall = 0, n_shift = 0, n_int = 0, n_bac = 0, n_arbwait = 0;
  logic bac_done_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (cpu_retire) n_retire++;
    if (cpu_bus_stall) n_stall++;
    if (cpu_shift_step) n_shift++;
    if (cpu_int_taken) n_int++;
    if (bac_done && !bac_done_q) n_bac++;
    bac_done_q <= bac_done;
    if ((ext_req[0] && !ext_gnt[0]) || (ext_req[1] && !ext_gnt[1])) n_arbwait++;
  end

  localparam logic [15:0] REG   = 16'h1000;
  localparam int          RUNB  = 12, IEB = 13;
  localparam int          HALT  = 32'h3EFFF;
  localparam logic [15:0] PROG  = 16'h0400;  // byte address of the microprogram image
  localparam logic [15:0] DATA  = 16'h0200;  // byte address of the data array
  localparam int          NDATA = 8;
  localparam int          DELAY = 300;

  logic [31:0] prog [32];
  word_t       data [NDATA];

  task automatic bac_copy(input word_t src, input word_t dst, input int n,
                          input int sstep, input int dstep);
    u_cp.wr(UNIT_BAC, 16'd0, src);
    u_cp.wr(UNIT_BAC, 16'd1, dst);
    u_cp.wr(UNIT_BAC, 16'd2, n);
    u_cp.wr(UNIT_BAC, 16'd4, sstep);
    u_cp.wr(UNIT_BAC, 16'd5, dstep);
    u_cp.wr(UNIT_BAC, 16'd3, 32'd1);
  endtask
  task automatic bac_wait();
    word_t q;
    do begin repeat (10) @(negedge clk); u_cp.rd(UNIT_BAC, 16'd3, q); end while (q[0]);
    check(q[1] && !q[2], $sformatf("block transfer finished without error (%b)", q[2:0]));
  endtask

  // console activity while the CPU runs
  bit run_console = 0;
  int n_console = 0;
  initial begin
    word_t q;
    wait (run_console);
    while (run_console) begin
      u_con.rd(UNIT_MEM, DATA + 16'(4 * n_console[2:0]), q);
      check(q == data[n_console[2:0]], "console read of main memory");
      u_con.wr(8'h20, 16'h80 + 16'(n_console[3:0]), 32'(n_console) ^ 32'h5A5A_0000);
      u_con.rd(8'h20, 16'h80 + 16'(n_console[3:0]), q);
      check(q == (32'(n_console) ^ 32'h5A5A_0000), "console write/read of external slave");
      n_console++;
      repeat (7) @(negedge clk);
    end
  end

  initial begin
    word_t q, sum, r [8];
    int    exp_retire, aux_before;
    bit    ok;

    // ---- microprogram image
    for (int i = 0; i < 32; i++) prog[i] = ui(T_NOP, A_NOP);
    prog[0]  = ui(t_opi(TC_ARITH, AR_MOV, 5), imm18(32'h0C02));        // R5 = mem address word
    prog[1]  = ui(t_opi(TC_SHIFT, SH_SLL, 5), imm18(16));
    prog[2]  = ui(t_opi(TC_LOGIC, L_OR, 5), imm18(int'(DATA)));
    prog[3]  = ui(t_opi(TC_ARITH, AR_MOV, 1), imm18(0));               // R1 = sum
    prog[4]  = ui(T_NOP, a_dir(AC_LOADI, 4, NDATA));                   // R4 = count
    prog[5]  = ui(T_NOP, a_reg(AC_INDIR, 7, 5, IS_BUSRD, 0));          // R7 = bus[R5]
    prog[6]  = ui(T_NOP, a_reg(AC_INDIR, 0, 0, IS_WAIT, 0));
    prog[7]  = ui(t_op(TC_ARITH, AR_ADD, 1, 7), a_reg(AC_PTR, 5, 5, 0, 4)); // R1 += R7, R5 += 4
    prog[8]  = ui(T_NOP, a_reg(AC_PTR, 4, 4, 1, -4));                  // loop to 5
    prog[9]  = ui(T_NOP, a_reg(AC_INDIR, 1, 5, IS_BUSWR, 0));          // mem[DATA+32] = R1
    prog[10] = ui(t_opi(TC_ARITH, AR_MOV, 3), imm18(32'h0C20));        // R3 = slave address word
    prog[11] = ui(t_opi(TC_SHIFT, SH_SLL, 3), imm18(16));
    prog[12] = ui(t_opi(TC_LOGIC, L_OR, 3), imm18(5));
    prog[13] = ui(T_NOP, a_reg(AC_INDIR, 1, 3, IS_BUSWR, 0));          // aux[5] = R1
    prog[14] = ui(T_NOP, a_reg(AC_INDIR, 2, 3, IS_BUSRD, 1));          // R2 = aux[6], stalls
    prog[15] = ui(T_NOP, a_reg(AC_INDIR, 0, 0, IS_WAIT, 0));
    prog[16] = ui(T_NOP, a_dir(AC_LOADI, 4, DELAY));
    prog[17] = ui(T_NOP, a_reg(AC_PTR, 4, 4, 1, -1));                  // delay loop
    prog[18] = ui(t_opi(TC_LOGIC, L_AND, 0), imm18(HALT));             // halt
    prog[24] = ui(T_NOP, a_dir(AC_LOADI, 6, 8'h77));                   // interrupt handler
    prog[25] = ui(T_NOP, a_dir(AC_LOADR, 0, 12'h900));                 // return: R0 = saved
    for (int i = 0; i < NDATA; i++) data[i] = $urandom() & 32'h0FFF_FFFF;

    repeat (3) @(posedge clk);
    rst_n = 1;
    check(!cpu_state.state[0], "CPU halted after reset");

    // ---- control processor: fill main memory, page the microprogram in
    for (int i = 0; i < 32; i++) u_cp.wr(UNIT_MEM, PROG + 16'(4 * i), prog[i]);
    for (int i = 0; i < NDATA; i++) u_cp.wr(UNIT_MEM, DATA + 16'(4 * i), data[i]);
    bac_copy({8'h0C, UNIT_MEM, PROG}, {8'h0D, UNIT_CPU, 16'h0000}, 32, 4, 1);
    bac_wait();
    for (int i = 0; i < 32; i++) begin
      u_cp.rd(UNIT_CPU, 16'(i), q);
      check(q == prog[i], $sformatf("microstore word %0d paged in", i));
    end
    u_cp.wr(UNIT_CPU, 16'h901, 32'(1 << RUNB) | 32'd24);  // interrupt state: run handler

    // ---- start the CPU, then disturb it
    aux_before = u_aux.accesses;
    u_cp.wr(UNIT_CPU, REG, 32'(1 << RUNB) | 32'(1 << IEB));
    run_console = 1;
    wait (n_retire >= 40);
    u_cp.xfer(BOP_INTR, 2'd3, 1'b0, 1'b0, UNIT_CPU, 16'h900, 32'd0, q, ok);
    check(ok, "interrupt acknowledged");
    bac_copy({8'h0C, UNIT_MEM, DATA}, {8'h0D, UNIT_CPU, 16'h0800}, NDATA, 4, 1);
    bac_wait();
    do begin repeat (50) @(negedge clk); u_cp.rd(UNIT_CPU, REG, q); end while (q[RUNB]);
    run_console = 0;
    repeat (200) @(negedge clk);

    // ---- results
    sum = '0;
    for (int i = 0; i < NDATA; i++) sum += data[i];
    for (int i = 0; i < 8; i++) u_cp.rd(UNIT_CPU, REG | 16'(i), r[i]);
    check(r[1] == sum, $sformatf("sum %h want %h", r[1], sum));
    u_cp.rd(UNIT_MEM, DATA + 16'(4 * NDATA), q);
    check(q == sum, "sum written to main memory");
    check(u_aux.mem[5] == sum, "sum written to the external slave");
    check(r[2] == 32'hA5A5_0006, $sformatf("read of external slave %h", r[2]));
    check(r[6] == 32'h77, "interrupt handler ran");
    check(r[0][11:0] == 12'd19 && r[0][IEB] && !r[0][RUNB], $sformatf("final state %h", r[0]));
    u_cp.rd(UNIT_CPU, 16'h900, q);
    check(q[RUNB] && q[IEB], "interrupted state saved");
    for (int i = 0; i < NDATA; i++) begin
      u_cp.rd(UNIT_CPU, 16'h800 + 16'(i), q);
      check(q == data[i], $sformatf("data word %0d paged into microstore", i));
    end
    // 0..4, 4 loop passes of 5..8 per word, 9..16, DELAY x 17, 18, handler 24, 25
    exp_retire = 5 + 4 * NDATA + 8 + DELAY + 1 + 2;
    check(n_retire == exp_retire, $sformatf("microinstructions %0d want %0d", n_retire, exp_retire));
    check(n_shift == 32, $sformatf("shift steps %0d (two 16-bit shifts)", n_shift));

    // ---- every mechanism must have happened
    check(n_retire > 0, "mechanism: microinstruction retire");
    check(n_stall > 0, "mechanism: bus stall");
    check(n_shift > 0, "mechanism: serial shift");
    check(n_int == 1, "mechanism: interrupt");
    check(n_bac == 2, $sformatf("mechanism: block transfers %0d", n_bac));
    check(n_arbwait > 0, "mechanism: arbitration wait");
    check(u_aux.accesses - aux_before >= 2, "mechanism: external slave access");
    check(n_console > 0, "mechanism: second external master");
    $display("retire=%0d stall=%0d shift=%0d int=%0d bac=%0d arbwait=%0d console=%0d",
             n_retire, n_stall, n_shift, n_int, n_bac, n_arbwait, n_console);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
