// tb_emmy_amachine: random A control fields and register values against a
// reference decode written here: microstore moves, load immediate, indirect
// microstore and bus accesses, pointer arithmetic and every loop test.
module tb_emmy_amachine;
  import emmy_pkg::*;
  logic active;
  logic [17:0] acf;
  word_t ra, rb;
  maddr_t mar;
  reg_idx_t op1, op2;
  logic ms_req, ms_we, ms_to_reg, reg_we, bus_req, bus_write, bus_wait, loop_taken;
  maddr_t ms_addr;
  word_t ms_wdata, reg_wdata, bus_wdata;
  bus_addr_t bus_addr;
  int checks = 0, failures = 0;

  emmy_amachine dut (.*);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s acf=%h", what, acf); end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int cls, sub;
      word_t val, ia, dec;
      bit lt;
      active = (n % 10 != 0);
      acf = 18'($urandom);
      ra = $urandom; rb = (n % 3 == 0) ? 32'($urandom_range(0, 3)) - 32'd1 : $urandom;
      mar = 12'($urandom);
      #1;
      cls = int'(acf[17:15]); sub = int'(acf[8:6]);
      val = 32'(signed'(acf[5:0]));
      ia  = rb + val;
      dec = rb - 1;
      check(op1 == acf[14:12] && op2 == acf[11:9], "operand fields");
      if (!active) begin
        check(!ms_req && !reg_we && !bus_req && !bus_wait && !loop_taken, "inactive");
        continue;
      end
      case (cls)
        0: check(ms_req && !ms_we && ms_to_reg && ms_addr == acf[11:0] && !reg_we && !bus_req, "loadr");
        1: check(ms_req && ms_we && ms_addr == acf[11:0] && ms_wdata == ra && !reg_we, "storer");
        2: check(!ms_req && reg_we && reg_wdata == 32'(signed'(acf[11:0])), "loadi");
        3: begin
          case (sub)
            0: check(ms_req && !ms_we && ms_to_reg && ms_addr == ia[11:0], "ms read ind");
            1: check(ms_req && ms_we && ms_addr == ia[11:0] && ms_wdata == ra, "ms write ind");
            2: check(bus_req && !bus_write && bus_addr.unit == ia[23:16] && bus_addr.addr == ia[15:0]
                     && bus_addr.cmd.op == BOP_READ && bus_addr.cmd.size == ia[27:26], "bus read");
            3: check(bus_req && bus_write && bus_wdata == ra && bus_addr.cmd.op == BOP_WRITE
                     && bus_addr.addr == ia[15:0], "bus write");
            4: check(bus_wait && !bus_req && !ms_req, "bus wait");
            default: check(!bus_req && !ms_req && !bus_wait, "reserved sub");
          endcase
        end
        4: begin
          if (sub == 0) begin
            check(reg_we && reg_wdata == ia && !loop_taken, "ptr add");
          end else begin
            case (sub)
              1: lt = dec != 0;
              2: lt = dec == 0;
              3: lt = $signed(dec) < 0;
              4: lt = $signed(dec) >= 0;
              5: lt = $signed(dec) > 0;
              6: lt = $signed(dec) <= 0;
              default: lt = 1;
            endcase
            check(reg_we && reg_wdata == dec && loop_taken == lt, $sformatf("loop sub %0d", sub));
          end
        end
        7: check(reg_we == (acf[14:12] != 0) && reg_wdata == {20'd0, mar}, "jump link");
        default: check(!ms_req && !reg_we && !bus_req && !bus_wait, "branch/nop");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
