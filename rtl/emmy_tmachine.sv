// emmy_tmachine: EMMY's functional unit, controlled by the T control field.
//
// Five instruction classes work on register data and produce one result
// that goes back to the register file:
//   logical     any of the 16 two-input Boolean functions, bitwise; the
//               4-bit opcode is the function's truth table, bit {a,b}
//   arithmetic  two's complement add/subtract family (see emmy_pkg AR_*)
//   shift       shift or rotate of operand a by b[4:0] places, carried out
//               one bit per clock as in the original serial shift unit
//   extended    single steps of multiply, divide and decimal-to-binary
//               conversion on an even/odd register pair, meant to be
//               repeated by a loop in the ACF
//   extract /   operand b rotated left by POS and merged into operand a
//   insert      under a contiguous mask taken from the ACF (extract clears
//               a first, isolating the field)
// Operand a is register OP1 (the sink), operand b is register OP2 or, when
// the I bit is set, the ACF sign-extended to 32 bits.
//
// Interface: hold `start` with the operands stable; `done` rises in the same
// clock for all classes except a shift by n > 0 places, where it rises n
// clocks later (`busy` is high in between). Outputs are valid while `done`.
//
// The five classes, the rotate-and-mask insert/extract, the three kinds of
// extended step and the one-bit-per-clock shifter follow the report. Opcode
// values, which condition codes each class sets, the pair convention of the
// extended steps and the ACF mask encoding (ACF[9:5] = lowest bit,
// ACF[4:0] = width - 1) are this design's own.
module emmy_tmachine
  import emmy_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [13:0] tcf,
  input  logic [17:0] acf,
  input  word_t       a,          // R[op1], or R[op1 & ~1] for extended steps
  input  word_t       b,          // R[op2] or immediate
  input  word_t       lo,         // R[op1 | 1] for extended steps
  input  logic        carry_in,   // CC carry
  output logic        busy,
  output logic        done,
  output logic        wr,         // write `res` to register `wr_idx`
  output reg_idx_t    wr_idx,
  output word_t       res,
  output logic        wr_lo,      // write `res_lo` to register `wr_lo_idx`
  output reg_idx_t    wr_lo_idx,
  output word_t       res_lo,
  output logic [5:0]  cc,         // new values of CC bits 5..0
  output logic [5:0]  cc_we       // which CC bits to update
);
  tcf_alu_t   f;
  tcf_field_t ff;
  assign f  = tcf_alu_t'(tcf);
  assign ff = tcf_field_t'(tcf);

  // ---------------------------------------------------------------- serial shifter
  word_t      sh_val;
  logic       sh_link;
  logic [4:0] sh_cnt;
  logic [3:0] sh_opc;
  logic       sh_busy;

  function automatic logic [32:0] shift1(input logic [3:0] opc, input word_t v);
    // returns {bit shifted out, new value}
    case (opc)
      SH_SLL:  return {v[31], v[30:0], 1'b0};
      SH_SRL:  return {v[0], 1'b0, v[31:1]};
      SH_SRA:  return {v[0], v[31], v[31:1]};
      SH_ROL:  return {v[31], v[30:0], v[31]};
      SH_ROR:  return {v[0], v[0], v[31:1]};
      default: return {1'b0, v};
    endcase
  endfunction

  wire is_shift  = (f.cls == TC_SHIFT);
  wire [4:0] amt = b[4:0];
  logic [32:0] first_step;
  assign first_step = shift1(f.opc, a);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_busy <= 1'b0;
      sh_cnt  <= '0;
      sh_val  <= '0;
      sh_link <= 1'b0;
      sh_opc  <= '0;
    end else if (!sh_busy) begin
      if (start && is_shift && amt != 5'd0) begin
        sh_busy <= 1'b1;
        sh_opc  <= f.opc;
        {sh_link, sh_val} <= first_step;
        sh_cnt  <= amt - 5'd1;
      end
    end else if (sh_cnt != 5'd0) begin
      {sh_link, sh_val} <= shift1(sh_opc, sh_val);
      sh_cnt <= sh_cnt - 5'd1;
    end else begin
      sh_busy <= 1'b0;
    end
  end

  assign busy = sh_busy;

  // ---------------------------------------------------------------- combinational classes
  function automatic word_t field_mask(input logic [4:0] lsb, input logic [4:0] wm1);
    logic [32:0] m;
    m = ({1'b0, 32'hFFFF_FFFF} >> (5'd31 - wm1));
    return m[31:0] << lsb;
  endfunction

  word_t       rot_b, fmask;
  logic [32:0] sum;
  word_t       x, y;
  logic        cin;
  logic [32:0] ms_sum;
  logic [32:0] dv_t;
  logic [35:0] dec;

  always_comb begin
    rot_b = (ff.pos == 5'd0) ? b : ((b << ff.pos) | (b >> (6'd32 - {1'b0, ff.pos})));
    fmask = field_mask(acf[9:5], acf[4:0]);

    // adder operands
    x = a; y = b; cin = 1'b0;
    case (f.opc)
      AR_ADD:  begin x = a;  y = b;  cin = 1'b0;     end
      AR_ADDC: begin x = a;  y = b;  cin = carry_in; end
      AR_SUB,
      AR_CMP:  begin x = a;  y = ~b; cin = 1'b1;     end
      AR_SUBC: begin x = a;  y = ~b; cin = carry_in; end
      AR_RSUB: begin x = b;  y = ~a; cin = 1'b1;     end
      AR_NEG:  begin x = '0; y = ~b; cin = 1'b1;     end
      AR_MOV:  begin x = '0; y = b;  cin = 1'b0;     end
      default: begin x = a;  y = b;  cin = 1'b0;     end
    endcase
    sum = {1'b0, x} + {1'b0, y} + {32'd0, cin};

    ms_sum = lo[0] ? ({1'b0, a} + {1'b0, b}) : {1'b0, a};
    dv_t   = {a, lo[31]};
    dec    = {4'd0, a} * 36'd10 + {32'd0, lo[31:28]};
  end

  always_comb begin
    wr        = 1'b0;
    wr_idx    = f.op1;
    res       = '0;
    wr_lo     = 1'b0;
    wr_lo_idx = {f.op1[2:1], 1'b1};
    res_lo    = '0;
    cc        = '0;
    cc_we     = '0;
    done      = 1'b0;

    unique case (f.cls)
      TC_LOGIC: begin
        for (int i = 0; i < 32; i++) res[i] = f.opc[{a[i], b[i]}];
        wr = 1'b1; done = start;
        cc_we[CC_Z] = 1'b1; cc_we[CC_N] = 1'b1; cc_we[CC_LSB] = 1'b1;
      end
      TC_ARITH: begin
        res = sum[31:0];
        wr  = (f.opc != AR_CMP);
        done = start;
        cc[CC_C] = sum[32];
        cc[CC_V] = (x[31] == y[31]) && (sum[31] != x[31]);
        cc_we[CC_Z] = 1'b1; cc_we[CC_N] = 1'b1; cc_we[CC_LSB] = 1'b1;
        cc_we[CC_C] = 1'b1; cc_we[CC_V] = 1'b1;
      end
      TC_SHIFT: begin
        if (amt == 5'd0) begin
          res = a; done = start;
        end else begin
          res = sh_val; done = sh_busy && (sh_cnt == 5'd0);
          cc[CC_LINK] = sh_link; cc_we[CC_LINK] = 1'b1;
        end
        wr = 1'b1;
        cc_we[CC_Z] = 1'b1; cc_we[CC_N] = 1'b1; cc_we[CC_LSB] = 1'b1;
      end
      TC_EXT: begin
        done = start;
        wr_idx = {f.op1[2:1], 1'b0};
        unique case (f.opc)
          EX_MULS: begin
            res    = ms_sum[32:1];
            res_lo = {ms_sum[0], lo[31:1]};
            cc[CC_LINK] = lo[0];
          end
          EX_DIVS: begin
            if (dv_t >= {1'b0, b}) begin
              res    = 32'(dv_t - {1'b0, b});
              res_lo = {lo[30:0], 1'b1};
            end else begin
              res    = dv_t[31:0];
              res_lo = {lo[30:0], 1'b0};
            end
            cc[CC_LINK] = res_lo[0];
          end
          default: begin  // EX_DECB
            res    = dec[31:0];
            res_lo = {lo[27:0], 4'd0};
            cc[CC_V] = (dec[35:32] != 4'd0);
            cc_we[CC_V] = 1'b1;
          end
        endcase
        wr = 1'b1; wr_lo = 1'b1;
        cc_we[CC_Z] = 1'b1; cc_we[CC_N] = 1'b1; cc_we[CC_LSB] = 1'b1; cc_we[CC_LINK] = 1'b1;
      end
      TC_EXTRACT: begin
        res = rot_b & fmask;
        wr = 1'b1; done = start;
        cc_we[CC_Z] = 1'b1; cc_we[CC_N] = 1'b1; cc_we[CC_LSB] = 1'b1;
      end
      TC_INSERT: begin
        res = (a & ~fmask) | (rot_b & fmask);
        wr = 1'b1; done = start;
        cc_we[CC_Z] = 1'b1; cc_we[CC_N] = 1'b1; cc_we[CC_LSB] = 1'b1;
      end
      default: begin  // TC_COND, TC_NOP: nothing for the T-machine
        done = start;
      end
    endcase

    cc[CC_Z]   = (res == '0);
    cc[CC_N]   = res[31];
    cc[CC_LSB] = res[0];
  end
endmodule
