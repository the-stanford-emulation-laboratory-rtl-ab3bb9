// tb_emmy_hbus_machine: the host bus machine on a two-master bus with a
// behavioural slave and a behavioural master. Checks overlapped CPU reads
// (data returned to the named register) and writes, the time-out, slave
// access to microstore and registers by another unit, and interrupt
// acceptance including the hold-off of a second interrupt.
module tb_emmy_hbus_machine;
  import emmy_pkg::*;
  localparam int TMO = 40;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic      req [2];
  logic      gnt [2];
  hbus_req_t m_in [2];
  hbus_rsp_t s_in [2];
  hbus_req_t bus;
  hbus_rsp_t rsp;

  logic cpu_req = 0, cpu_write = 0;
  bus_addr_t cpu_addr = '0;
  word_t cpu_wdata = '0;
  reg_idx_t cpu_dst = '0;
  logic busy, berr, ret_we;
  reg_idx_t ret_idx;
  word_t ret_data;
  logic ms_req, ms_we, ms_ready, ms_done;
  maddr_t ms_addr;
  word_t ms_wdata, ms_rdata;
  reg_idx_t reg_raddr, reg_waddr;
  word_t reg_rdata, reg_wdata;
  logic reg_we;
  logic int_pending, int_ack = 0;
  maddr_t int_addr;
  word_t regs [8];

  emmy_bus_arbiter #(.NM(2), .NS(2)) u_arb (.clk, .rst_n, .req, .gnt, .m_in, .s_in, .bus, .rsp);
  emmy_hbus_machine #(.MY_UNIT(UNIT_CPU), .TIMEOUT(TMO)) dut (
    .clk, .rst_n, .cpu_req, .cpu_write, .cpu_addr, .cpu_wdata, .cpu_dst, .busy, .berr,
    .ret_we, .ret_idx, .ret_data, .arb_req(req[0]), .arb_gnt(gnt[0]), .m_out(m_in[0]),
    .bus_rsp(rsp), .bus_req(bus), .s_out(s_in[0]),
    .ms_req, .ms_we, .ms_addr, .ms_wdata, .ms_accept(ms_req && ms_ready), .ms_done, .ms_rdata,
    .reg_raddr, .reg_rdata, .reg_we, .reg_waddr, .reg_wdata, .int_pending, .int_addr, .int_ack);
  emmy_microstore u_ms (.clk, .rst_n, .req(ms_req), .we(ms_we), .addr(ms_addr), .wdata(ms_wdata),
                        .ready(ms_ready), .done(ms_done), .rdata(ms_rdata));
  tb_bus_master u_m (.clk, .req(req[1]), .gnt(gnt[1]), .m(m_in[1]), .rsp);
  tb_bus_slave #(.UNIT(8'h20), .LAT(4)) u_s (.clk, .bus, .rsp(s_in[1]));

  assign reg_rdata = regs[reg_raddr];
  always @(posedge clk) if (reg_we) regs[reg_waddr] <= reg_wdata;
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t got_data; reg_idx_t got_idx; int got_n = 0;
  always @(posedge clk) if (ret_we) begin got_data = ret_data; got_idx = ret_idx; got_n++; end

  task automatic cpu_access(input bit w, input logic [7:0] unit, input logic [15:0] a,
                            input word_t d, input reg_idx_t dst);
    @(negedge clk);
    cpu_req = 1; cpu_write = w; cpu_dst = dst; cpu_wdata = d;
    cpu_addr = '{cmd: '{rsvd: 0, shaped: 0, left: 0, sext: 0, size: 2'd3, op: w ? BOP_WRITE : BOP_READ},
                 unit: unit, addr: a};
    @(negedge clk);
    cpu_req = 0;
    check(busy, "busy right after issue (overlapped)");
  endtask

  initial begin
    word_t q; bit ok;
    int n0;
    for (int i = 0; i < 8; i++) regs[i] = 32'(i) * 32'h0101_0101;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // CPU reads and writes
    for (int n = 0; n < 20; n++) begin
      reg_idx_t dst;
      word_t d;
      dst = 3'($urandom_range(1, 7)); d = $urandom;
      cpu_access(1, 8'h20, 16'(n), d, 0);
      while (busy) @(negedge clk);
      check(!berr && u_s.mem[n] == d, "cpu write reached slave");
      n0 = got_n;
      cpu_access(0, 8'h20, 16'(n), 0, dst);
      while (busy) @(negedge clk);
      @(negedge clk);
      check(got_n == n0 + 1 && got_idx == dst && got_data == d, "cpu read returned to register");
    end

    // time-out
    n0 = got_n;
    cpu_access(0, 8'h55, 16'd0, 0, 3'd2);
    while (busy) @(negedge clk);
    check(berr && got_n == n0, "time-out sets berr, no register write");
    cpu_access(1, 8'h20, 16'd3, 32'h1234, 0);
    while (busy) @(negedge clk);
    check(!berr, "berr cleared by next access");

    // slave: microstore and registers
    for (int n = 0; n < 20; n++) begin
      logic [11:0] a;
      word_t d;
      a = 12'($urandom); d = $urandom;
      u_m.wr(UNIT_CPU, {4'd0, a}, d);
      u_m.rd(UNIT_CPU, {4'd0, a}, q);
      check(q == d, $sformatf("slave microstore %h: %h want %h", a, q, d));
    end
    for (int r = 0; r < 8; r++) begin
      word_t d;
      d = $urandom;
      u_m.wr(UNIT_CPU, 16'h1000 | 16'(r), d);
      check(regs[r] == d, "slave register write");
      u_m.rd(UNIT_CPU, 16'h1000 | 16'(r), q);
      check(q == d, "slave register read");
    end

    // interrupts
    u_m.xfer(BOP_INTR, 2'd3, 0, 0, UNIT_CPU, 16'h0102, 0, q, ok);
    check(ok && int_pending && int_addr == 12'h102, "interrupt accepted");
    fork
      begin
        u_m.xfer(BOP_INTR, 2'd3, 0, 0, UNIT_CPU, 16'h0204, 0, q, ok, 5000);
      end
      begin
        repeat (50) @(negedge clk);
        check(int_pending && int_addr == 12'h102, "second interrupt held off");
        int_ack = 1; @(negedge clk); int_ack = 0;
      end
    join
    check(ok && int_pending && int_addr == 12'h204, "second interrupt taken after ack");

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
