// emmy_imachine: microinstruction sequencing of EMMY.
//
// The next microinstruction normally comes from the next sequential
// microstore location; the address is the 12-bit micro address register
// (MAR) kept in register 0. This block decides, for the microinstruction in
// hand:
//   * whether its ACF is an A/I instruction at all: it is not when the TCF
//     takes it as immediate data (I bit set) or as the mask of an
//     insert/extract;
//   * whether that ACF is executed: a TCF of class COND tests the condition
//     codes (or, by SPEC, the indicator codes) under its 8-bit MASK, "any" or
//     "all" bits set, true or inverted sense, and skips the ACF when false;
//   * the new MAR: sequential (+1, `mar_seq`), or modified by a taken ACF
//     BRANCH (same test as COND, MAR + VALUE), a taken PTR loop step
//     (MAR + VALUE) or a JUMP (MAR <- ADR).
// Purely combinational.
//
// The three instruction kinds (conditional in the TCF, branch and looping
// in the ACF), the MASK/SPEC/VALUE fields and the MAR in register 0 follow
// the report. The SPEC bit assignment, the 4-bit branch displacement, the
// JUMP class and the MAR bit position are this design's own.
module emmy_imachine
  import emmy_pkg::*;
(
  input  logic [13:0] tcf,
  input  logic [17:0] acf,
  input  state_word_t sw,          // register 0
  input  logic        loop_taken,  // from the A-machine
  output maddr_t      mar_seq,     // sequential successor of sw.mar
  output logic        acf_is_ctl,  // ACF is an A/I instruction
  output logic        acf_exec,    // ... and is to be executed
  output logic        mar_we,
  output maddr_t      mar_next
);
  tcf_alu_t    t;
  tcf_cond_t   tc;
  acf_direct_t d;
  acf_reg_t    r;
  acf_branch_t br;
  assign t  = tcf_alu_t'(tcf);
  assign tc = tcf_cond_t'(tcf);
  assign d  = acf_direct_t'(acf);
  assign r  = acf_reg_t'(acf);
  assign br = acf_branch_t'(acf);

  assign mar_seq = sw.mar + maddr_t'(1);

  always_comb begin
    unique case (t.cls)
      TC_LOGIC, TC_ARITH, TC_SHIFT, TC_EXT: acf_is_ctl = !t.imm;
      TC_EXTRACT, TC_INSERT:                acf_is_ctl = 1'b0;
      default:                              acf_is_ctl = 1'b1;
    endcase
    acf_exec = acf_is_ctl &&
               ((t.cls != TC_COND) || cond_test(tc.mask, tc.spec, sw.cc, sw.ind));

    mar_we   = 1'b0;
    mar_next = sw.mar;
    if (acf_exec) begin
      unique case (d.cls)
        AC_BRANCH: begin
          mar_we   = cond_test(br.mask, br.spec, sw.cc, sw.ind);
          mar_next = sw.mar + maddr_t'(signed'(br.value));
        end
        AC_PTR: begin
          mar_we   = loop_taken;
          mar_next = sw.mar + maddr_t'(signed'(r.value));
        end
        AC_JUMP: begin
          mar_we   = 1'b1;
          mar_next = d.adr;
        end
        default: ;
      endcase
    end
  end
endmodule
