// tb_emmy_imachine: random microinstructions and state words against a
// reference of the condition test (mask, any/all, sense, CC or indicators),
// the skip of the ACF, immediate/field formats, branch, loop and jump.
module tb_emmy_imachine;
  import emmy_pkg::*;
  logic [13:0] tcf;
  logic [17:0] acf;
  state_word_t sw;
  logic loop_taken;
  maddr_t mar_seq, mar_next;
  logic acf_is_ctl, acf_exec, mar_we;
  int checks = 0, failures = 0;
  int n_skip = 0, n_branch = 0;

  emmy_imachine dut (.*);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s tcf=%h acf=%h", what, tcf, acf); end
  endtask

  function automatic bit ref_test(logic [7:0] mask, logic [2:0] spec, logic [7:0] cc, logic [7:0] ind);
    logic [7:0] v;
    bit any, all, r;
    v = spec[2] ? ind : cc;
    any = 0; all = 1;
    for (int i = 0; i < 8; i++) if (mask[i]) begin
      if (v[i]) any = 1; else all = 0;
    end
    r = spec[0] ? all : any;
    return spec[1] ? !r : r;
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int tc, ac;
      bit ctl, ex, mw;
      logic [11:0] nx;
      tcf = 14'($urandom); acf = 18'($urandom);
      sw = state_word_t'($urandom);
      if (n % 4 == 0) sw.cc = tcf[10:3];
      loop_taken = $urandom_range(0, 1) == 1;
      #1;
      tc = int'(tcf[13:11]); ac = int'(acf[17:15]);
      ctl = (tc <= 3) ? !tcf[10] : (tc == 4 || tc == 5) ? 0 : 1;
      ex  = ctl && (tc != 6 || ref_test(tcf[10:3], tcf[2:0], sw.cc, sw.ind));
      if (ctl && !ex) n_skip++;
      mw = 0; nx = sw.mar;
      if (ex) case (ac)
        5: begin mw = ref_test(acf[14:7], acf[6:4], sw.cc, sw.ind);
                 nx = sw.mar + 12'(signed'(acf[3:0])); if (mw) n_branch++; end
        4: begin mw = loop_taken; nx = sw.mar + 12'(signed'(acf[5:0])); end
        7: begin mw = 1; nx = acf[11:0]; end
        default: ;
      endcase
      check(mar_seq == sw.mar + 12'd1, "sequential");
      check(acf_is_ctl == ctl, "acf is control");
      check(acf_exec == ex, "acf executed");
      check(mar_we == mw, "mar write");
      if (mw) check(mar_next == nx, "mar next");
    end
    check(n_skip > 100 && n_branch > 100, "coverage of skip and branch");
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
