// tb_emmy_regfile: random writes on several ports with the lowest port
// winning a collision, read back on all read ports against a reference.
module tb_emmy_regfile;
  import emmy_pkg::*;
  localparam int NRD = 4, NWR = 4;
  logic clk = 0, rst_n = 0;
  reg_idx_t raddr [NRD];
  word_t    rdata [NRD];
  logic     we    [NWR];
  reg_idx_t waddr [NWR];
  word_t    wdata [NWR];
  word_t    r0;
  int checks = 0, failures = 0;
  word_t ref_r [8];

  emmy_regfile #(.NRD(NRD), .NWR(NWR)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int p = 0; p < NWR; p++) begin we[p] = 0; waddr[p] = 0; wdata[p] = 0; end
    for (int p = 0; p < NRD; p++) raddr[p] = 0;
    for (int i = 0; i < 8; i++) ref_r[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      raddr[0] = 3'(i); #1;
      check(rdata[0] == 0, "reset value");
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int p = 0; p < NWR; p++) begin
        we[p] = ($urandom_range(0, 2) == 0);
        waddr[p] = 3'($urandom_range(0, 7));
        wdata[p] = $urandom;
      end
      for (int p = NWR - 1; p >= 0; p--) if (we[p]) ref_r[waddr[p]] = wdata[p];
      @(negedge clk);
      for (int p = 0; p < NWR; p++) we[p] = 0;
      for (int p = 0; p < NRD; p++) raddr[p] = 3'($urandom_range(0, 7));
      #1;
      for (int p = 0; p < NRD; p++)
        check(rdata[p] == ref_r[raddr[p]], $sformatf("port %0d reg %0d", p, raddr[p]));
      check(r0 == ref_r[0], "r0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
