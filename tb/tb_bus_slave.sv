// tb_bus_slave: behavioural host bus slave for testbenches: 256 words of
// storage at unit UNIT, word-addressed by internal address bits 7..0,
// answering after LAT clocks with the interlocked handshake.
module tb_bus_slave
  import emmy_pkg::*;
#(
  parameter logic [7:0] UNIT = 8'h20,
  parameter int         LAT  = 3
) (
  input  logic      clk,
  input  hbus_req_t bus,
  output hbus_rsp_t rsp
);
  word_t mem [256];
  int    accesses = 0;
  initial begin
    rsp = '0;
    for (int i = 0; i < 256; i++) mem[i] = 32'hA5A5_0000 + 32'(i);
  end
  always begin
    @(posedge clk);
    if (bus.msyn && bus.a.unit == UNIT && !rsp.ssyn) begin
      repeat (LAT) @(posedge clk);
      accesses++;
      if (bus.a.cmd.op == BOP_WRITE) begin
        mem[bus.a.addr[7:0]] = bus.wdata;
        rsp.rdata <= '0;
      end else begin
        rsp.rdata <= mem[bus.a.addr[7:0]];
      end
      rsp.ssyn <= 1'b1;
      while (bus.msyn) @(posedge clk);
      rsp <= '0;
    end
  end
endmodule
