// tb_emmy_microstore: writes and reads back random words of the microstore
// against a reference array, and checks the access time (done ACCESS clocks
// after acceptance) and the cycle time (next acceptance CYCLE clocks later).
module tb_emmy_microstore;
  localparam int ACC = 2, CYC = 6;
  logic clk = 0, rst_n = 0;
  logic req = 0, we = 0;
  logic [11:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic ready, done;
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [4096];
  bit          ref_ok  [4096];

  emmy_microstore #(.DEPTH(4096), .ACCESS_CLKS(ACC), .CYCLE_CLKS(CYC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One access; returns read data; checks timing.
  task automatic access(input bit w, input logic [11:0] a, input logic [31:0] d,
                        output logic [31:0] q);
    int t_acc, t_done, t_rdy;
    @(negedge clk); while (!ready) @(negedge clk);
    req = 1; we = w; addr = a; wdata = d;
    @(posedge clk); t_acc = 0;
    @(negedge clk); req = 0;
    t_done = -1; t_rdy = -1;
    for (int i = 1; i <= CYC + 2; i++) begin
      if (done && t_done < 0) begin t_done = i; q = rdata; end
      if (ready && t_rdy < 0) t_rdy = i;
      @(negedge clk);
    end
    check(t_done == ACC, $sformatf("done after %0d clocks, want %0d", t_done, ACC));
    check(t_rdy == CYC, $sformatf("ready after %0d clocks, want %0d", t_rdy, CYC));
  endtask

  initial begin
    logic [31:0] q;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [11:0] a;
      a = 12'($urandom_range(0, 63)) | (n[0] ? 12'hFC0 : 12'h000);
      if ($urandom_range(0, 1) == 1 || !ref_ok[a]) begin
        logic [31:0] d;
        d = $urandom;
        access(1, a, d, q);
        ref_mem[a] = d; ref_ok[a] = 1;
      end else begin
        access(0, a, 0, q);
        check(q == ref_mem[a], $sformatf("read %h got %h want %h", a, q, ref_mem[a]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
