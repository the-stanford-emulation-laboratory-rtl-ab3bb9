// tb_emmy_asm_pkg: a small microassembler for testbenches. Each function
// returns one half of a microinstruction (14-bit TCF or 18-bit ACF) in the
// encoding of emmy_pkg; `ui` joins the two halves.
package tb_emmy_asm_pkg;
  import emmy_pkg::*;

  localparam logic [13:0] T_NOP = {TC_NOP, 11'd0};
  localparam logic [17:0] A_NOP = {AC_NOP, 15'd0};

  // Boolean function truth tables, result = opc[{a,b}]
  localparam logic [3:0] L_AND = 4'b1000, L_OR = 4'b1110, L_XOR = 4'b0110,
                         L_PASSB = 4'b1010, L_NOTA = 4'b0011;

  function automatic logic [31:0] ui(input logic [13:0] t, input logic [17:0] a);
    return {t, a};
  endfunction
  function automatic logic [13:0] t_op(input tclass_e c, input logic [3:0] opc,
                                       input int op1, input int op2);
    return {c, 1'b0, opc, 3'(op2), 3'(op1)};
  endfunction
  function automatic logic [13:0] t_opi(input tclass_e c, input logic [3:0] opc, input int op1);
    return {c, 1'b1, opc, 3'd0, 3'(op1)};
  endfunction
  function automatic logic [13:0] t_fld(input bit ins, input int pos, input int op1, input int op2);
    return {ins ? TC_INSERT : TC_EXTRACT, 5'(pos), 3'(op2), 3'(op1)};
  endfunction
  function automatic logic [17:0] fmask(input int lsb, input int width);
    return {8'd0, 5'(lsb), 5'(width - 1)};
  endfunction
  function automatic logic [13:0] t_cond(input logic [7:0] mask, input logic [2:0] spec);
    return {TC_COND, mask, spec};
  endfunction
  function automatic logic [17:0] imm18(input int v);
    return 18'(v);
  endfunction
  function automatic logic [17:0] a_dir(input aclass_e c, input int op1, input int adr);
    return {c, 3'(op1), 12'(adr)};
  endfunction
  function automatic logic [17:0] a_reg(input aclass_e c, input int op1, input int op2,
                                        input int sub, input int val);
    return {c, 3'(op1), 3'(op2), 3'(sub), 6'(val)};
  endfunction
  function automatic logic [17:0] a_br(input logic [7:0] mask, input logic [2:0] spec, input int val);
    return {AC_BRANCH, mask, spec, 4'(val)};
  endfunction
endpackage
