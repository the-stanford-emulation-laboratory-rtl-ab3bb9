// tb_emmy_bus_arbiter: three masters run interlocked transfers at once
// against two behavioural slaves. Checks: at most one grant, grants only to
// requesters, the shared bus carries the owner's lines, replies are ORed,
// every write reads back, and round-robin fairness (a waiting master sees at
// most NM-1 other grants before its own).
module tb_emmy_bus_arbiter;
  import emmy_pkg::*;
  localparam int NM = 3, NS = 2;
  logic clk = 0, rst_n = 0;
  logic      req [NM];
  logic      gnt [NM];
  hbus_req_t m_in [NM];
  hbus_rsp_t s_in [NS];
  hbus_req_t bus;
  hbus_rsp_t rsp;
  int checks = 0, failures = 0;

  emmy_bus_arbiter #(.NM(NM), .NS(NS)) dut (.*);
  for (genvar i = 0; i < NM; i++) begin : g_m
    tb_bus_master u_m (.clk, .req(req[i]), .gnt(gnt[i]), .m(m_in[i]), .rsp);
  end
  tb_bus_slave #(.UNIT(8'h20), .LAT(2)) u_s0 (.clk, .bus, .rsp(s_in[0]));
  tb_bus_slave #(.UNIT(8'h21), .LAT(5)) u_s1 (.clk, .bus, .rsp(s_in[1]));
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  int waits [NM];
  int max_wait = 0;
  int grants = 0;
  logic gnt_q [NM];
  always @(negedge clk) if (rst_n) begin
    int ng;
    ng = 0;
    for (int i = 0; i < NM; i++) begin
      if (gnt[i]) begin
        ng++;
        check(req[i], "grant without request");
        check(bus == m_in[i], "bus carries owner lines");
      end
    end
    check(ng <= 1, "single owner");
    check(rsp == (s_in[0] | s_in[1]), "reply OR");
    for (int i = 0; i < NM; i++) begin
      if (gnt[i] && !gnt_q[i]) begin
        grants++;
        for (int j = 0; j < NM; j++) if (j != i && req[j] && !gnt[j]) begin
          waits[j]++;
          if (waits[j] > max_wait) max_wait = waits[j];
        end
        waits[i] = 0;
      end
      gnt_q[i] = gnt[i];
    end
  end

  task automatic worker(input int id);
    for (int n = 0; n < 40; n++) begin
      logic [7:0] unit;
      logic [15:0] a;
      word_t d, q;
      unit = (n % 2 == 0) ? 8'h20 : 8'h21;
      a = 16'(id * 64 + n);
      d = {8'(id), 8'(n), 16'($urandom)};
      case (id)
        0: begin g_m[0].u_m.wr(unit, a, d); g_m[0].u_m.rd(unit, a, q); end
        1: begin g_m[1].u_m.wr(unit, a, d); g_m[1].u_m.rd(unit, a, q); end
        default: begin g_m[2].u_m.wr(unit, a, d); g_m[2].u_m.rd(unit, a, q); end
      endcase
      check(q == d, $sformatf("master %0d readback %h want %h", id, q, d));
    end
  endtask

  initial begin
    for (int i = 0; i < NM; i++) begin waits[i] = 0; gnt_q[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      worker(0);
      worker(1);
      worker(2);
    join
    check(max_wait <= NM - 1, $sformatf("fairness: waited %0d grants", max_wait));
    check(grants >= NM * 80, "all transfers granted");
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
