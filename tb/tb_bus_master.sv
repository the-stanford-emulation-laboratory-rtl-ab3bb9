// tb_bus_master: behavioural host bus master for testbenches. `xfer` seizes
// the bus through req/gnt, runs one fully interlocked transfer (msyn up,
// wait for ssyn, msyn down, wait for ssyn to fall) and releases the bus.
// `ok` is 0 when no slave answered within `tmo` clocks; `shaped` sets the
// command's element-addressing bit.
module tb_bus_master
  import emmy_pkg::*;
(
  input  logic      clk,
  output logic      req,
  input  logic      gnt,
  output hbus_req_t m,
  input  hbus_rsp_t rsp
);
  initial begin
    req = 0;
    m   = '0;
  end

  task automatic xfer(input bus_op_e op, input logic [1:0] size, input logic left,
                      input logic sext, input logic [7:0] unit, input logic [15:0] addr,
                      input word_t wdata, output word_t rdata, output bit ok,
                      input int tmo = 2000, input logic shaped = 1'b0);
    int t;
    @(negedge clk);
    req = 1;
    while (!gnt || rsp.ssyn) @(negedge clk);
    m.a.cmd  = '{rsvd: 1'b0, shaped: shaped, left: left, sext: sext, size: size, op: op};
    m.a.unit = unit;
    m.a.addr = addr;
    m.wdata  = wdata;
    m.msyn   = 1;
    t = 0; ok = 1;
    @(negedge clk);
    while (!rsp.ssyn) begin
      if (++t > tmo) begin ok = 0; break; end
      @(negedge clk);
    end
    rdata = rsp.rdata;
    m.msyn = 0;
    @(negedge clk);
    while (rsp.ssyn) @(negedge clk);
    req = 0;
    @(negedge clk);
  endtask

  task automatic wr(input logic [7:0] unit, input logic [15:0] addr, input word_t d);
    word_t q; bit ok;
    xfer(BOP_WRITE, 2'd3, 1'b0, 1'b0, unit, addr, d, q, ok);
  endtask

  task automatic rd(input logic [7:0] unit, input logic [15:0] addr, output word_t q);
    bit ok;
    xfer(BOP_READ, 2'd3, 1'b0, 1'b0, unit, addr, '0, q, ok);
  endtask
endmodule
