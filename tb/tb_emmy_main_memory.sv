// tb_emmy_main_memory: random 1-4 byte reads and writes at any byte address,
// left and right justified, with and without sign extension, against a byte
// array reference; checks the memory cycle (ssyn ACCESS+1 clocks after msyn)
// and that other unit numbers are ignored. A third of the accesses are
// shaped: the address is an element number that the memory scales by the
// access size, and the reference scales it here.
module tb_emmy_main_memory;
  import emmy_pkg::*;
  localparam int BYTES = 65536, ACC = 19;
  logic clk = 0, rst_n = 0;
  logic req, gnt;
  hbus_req_t bus;
  hbus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [7:0] ref_b [BYTES];

  emmy_main_memory #(.MY_UNIT(UNIT_MEM), .BYTES(BYTES), .ACCESS_CLKS(ACC)) dut (.clk, .rst_n, .bus, .rsp);
  tb_bus_master u_m (.clk, .req, .gnt, .m(bus), .rsp);
  assign gnt = req;
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // latency probe
  int t_msyn, t_ssyn;
  always @(posedge clk) begin
    if (bus.msyn && !$past(bus.msyn)) t_msyn = $time;
    if (rsp.ssyn && !$past(rsp.ssyn)) t_ssyn = $time;
  end

  initial begin
    word_t q; bit ok;
    for (int i = 0; i < BYTES; i++) ref_b[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // clear a window so reads compare with known data
    for (int a = 0; a < 264; a += 4) u_m.wr(UNIT_MEM, 16'(a), 32'd0);
    for (int a = 65532; a < 65536; a += 4) u_m.wr(UNIT_MEM, 16'(a), 32'd0);
    for (int n = 0; n < 600; n++) begin
      int a, sz, nb, el;
      bit w, left, sx, sh;
      word_t d, e, fld;
      a  = (n % 9 == 0) ? 65533 + $urandom_range(0, 2) : $urandom_range(0, 255);
      sz = $urandom_range(0, 3); nb = sz + 1;
      sh = (n % 9 != 0) && (n % 3 == 1);
      el = $urandom_range(0, 255 / nb);
      if (sh) a = el * nb;
      w  = $urandom_range(0, 1); left = $urandom_range(0, 1); sx = $urandom_range(0, 1);
      d  = $urandom;
      u_m.xfer(w ? BOP_WRITE : BOP_READ, 2'(sz), left, sx, UNIT_MEM, sh ? 16'(el) : 16'(a),
               d, q, ok, 2000, sh);
      check(ok, "answered");
      check((t_ssyn - t_msyn) / 10 == ACC + 1, $sformatf("cycle %0d clocks", (t_ssyn - t_msyn) / 10));
      if (w) begin
        for (int i = 0; i < nb; i++)
          ref_b[(a + i) % BYTES] = left ? d[8*(3-i) +: 8] : d[8*(nb-1-i) +: 8];
      end else begin
        fld = 0;
        for (int i = 0; i < nb; i++) fld = (fld << 8) | 32'(ref_b[(a + i) % BYTES]);
        if (left) e = fld << (32 - 8*nb);
        else if (sx && nb < 4 && fld[8*nb-1]) e = fld | (32'hFFFF_FFFF << (8*nb));
        else e = fld;
        check(q == e, $sformatf("read a=%0d n=%0d left=%0d sx=%0d sh=%0d got %h want %h", a, nb, left, sx, sh, q, e));
      end
    end
    // another unit number gets no answer
    u_m.xfer(BOP_READ, 2'd3, 0, 0, 8'h7E, 16'd0, 0, q, ok, 60);
    check(!ok, "foreign unit ignored");
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
