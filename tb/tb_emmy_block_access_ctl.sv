// tb_emmy_block_access_ctl: programs the block access controller over the
// bus and checks block copies main memory -> word slave and back, that
// another master's accesses interleave with a running block transfer, the
// status bits, a zero-length block, and the error stop on a missing unit.
module tb_emmy_block_access_ctl;
  import emmy_pkg::*;
  localparam int MEMACC = 6;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic      req [2];
  logic      gnt [2];
  hbus_req_t m_in [2];
  hbus_rsp_t s_in [3];
  hbus_req_t bus;
  hbus_rsp_t rsp;
  logic busy, done;

  emmy_bus_arbiter #(.NM(2), .NS(3)) u_arb (.clk, .rst_n, .req, .gnt, .m_in, .s_in, .bus, .rsp);
  emmy_block_access_ctl #(.MY_UNIT(UNIT_BAC), .TIMEOUT(60)) dut (
    .clk, .rst_n, .arb_req(req[0]), .arb_gnt(gnt[0]), .m_out(m_in[0]), .bus_rsp(rsp),
    .bus_req(bus), .s_out(s_in[0]), .busy, .done);
  emmy_main_memory #(.MY_UNIT(UNIT_MEM), .BYTES(4096), .ACCESS_CLKS(MEMACC)) u_mem (
    .clk, .rst_n, .bus, .rsp(s_in[1]));
  tb_bus_slave #(.UNIT(8'h20), .LAT(2)) u_s (.clk, .bus, .rsp(s_in[2]));
  tb_bus_master u_m (.clk, .req(req[1]), .gnt(gnt[1]), .m(m_in[1]), .rsp);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t baddr(logic [7:0] unit, logic [15:0] a);
    bus_addr_t x;
    x = '{cmd: '{rsvd: 0, shaped: 0, left: 0, sext: 0, size: 2'd3, op: BOP_READ}, unit: unit, addr: a};
    return word_t'(x);
  endfunction

  task automatic setup_block(word_t src, word_t dst, int cnt, int ss, int ds);
    u_m.wr(UNIT_BAC, 16'd0, src);
    u_m.wr(UNIT_BAC, 16'd1, dst);
    u_m.wr(UNIT_BAC, 16'd2, 32'(cnt));
    u_m.wr(UNIT_BAC, 16'd4, 32'(ss));
    u_m.wr(UNIT_BAC, 16'd5, 32'(ds));
    u_m.wr(UNIT_BAC, 16'd3, 32'd1);
  endtask

  task automatic wait_done(output word_t st);
    do u_m.rd(UNIT_BAC, 16'd3, st); while (st[0]);
  endtask

  initial begin
    word_t q, st, pat [32];
    int interleaved;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // fill main memory words 0x100.. with a pattern
    for (int i = 0; i < 32; i++) begin
      pat[i] = $urandom;
      u_m.wr(UNIT_MEM, 16'(16'h100 + 4 * i), pat[i]);
    end
    u_m.rd(UNIT_BAC, 16'd3, st);
    check(st[2:0] == 3'b000, "idle status after reset");

    // memory -> slave, with another master accessing memory meanwhile
    setup_block(baddr(UNIT_MEM, 16'h100), baddr(8'h20, 16'd8), 32, 4, 1);
    check(busy, "busy after start");
    interleaved = 0;
    while (busy) begin
      u_m.rd(UNIT_MEM, 16'h100, q);
      check(q == pat[0], "interleaved read");
      if (busy) interleaved++;
    end
    wait_done(st);
    check(st[1] && !st[2], "done without error");
    check(interleaved > 3, $sformatf("interleaved accesses %0d", interleaved));
    for (int i = 0; i < 32; i++) check(u_s.mem[8 + i] == pat[i], $sformatf("copy word %0d", i));
    u_m.rd(UNIT_BAC, 16'd2, q);
    check(q == 0, "count reaches zero");
    u_m.rd(UNIT_BAC, 16'd0, q);
    check(q[15:0] == 16'h100 + 16'd128, "source address stepped");

    // slave -> memory elsewhere
    for (int i = 0; i < 16; i++) u_s.mem[100 + i] = $urandom;
    setup_block(baddr(8'h20, 16'd100), baddr(UNIT_MEM, 16'h400), 16, 1, 4);
    wait_done(st);
    for (int i = 0; i < 16; i++) begin
      u_m.rd(UNIT_MEM, 16'(16'h400 + 4 * i), q);
      check(q == u_s.mem[100 + i], $sformatf("copy back word %0d", i));
    end

    // zero-length block
    setup_block(baddr(8'h20, 16'd0), baddr(UNIT_MEM, 16'h800), 0, 1, 4);
    wait_done(st);
    check(st[1] && !st[2], "zero length completes");

    // missing unit
    setup_block(baddr(8'h66, 16'd0), baddr(UNIT_MEM, 16'h800), 4, 1, 4);
    wait_done(st);
    check(st[1] && st[2], "error on missing unit");

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
