// emmy_pkg: shared types and constants of the EMMY host machine and its host bus.
//
// EMMY uses one 32-bit word both as data word and as microinstruction. A
// microinstruction is split into a 14-bit T control field (TCF, bits 31..18)
// and an 18-bit A control field (ACF, bits 17..0). Either half may instead
// carry I-machine (sequencing) control, and the ACF may be immediate data for
// the T-machine. Register 0 holds the machine state word: condition codes,
// indicator codes, state bits and the 12-bit micro address register.
//
// Field widths of 14/18 bits, the 8/8/4/12 split of the state word, the
// eight registers, the 4096-word microstore and the 8-bit command / 8-bit
// unit / 16-bit internal address split of the host bus address follow the
// report. Opcode values, the bit order inside each half, the order of the
// fields in the state word, the meaning of each condition-code bit and the
// encoding of the bus command byte are this design's own choices.
package emmy_pkg;

  localparam int unsigned WORD_W = 32;
  localparam int unsigned MS_AW  = 12;   // 4096 microstore words
  localparam int unsigned NREGS  = 8;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [2:0]        reg_idx_t;
  typedef logic [MS_AW-1:0]  maddr_t;

  // ---------------------------------------------------------------- state word
  typedef struct packed {
    logic [7:0]  cc;     // condition codes, set by processor operations
    logic [7:0]  ind;    // indicator codes, set only by the microprogram
    logic [3:0]  state;  // state bits
    maddr_t      mar;    // micro address register: next fetch address
  } state_word_t;

  localparam int ST_RUN = 0;  // 1: running, 0: halted
  localparam int ST_IE  = 1;  // 1: external interrupts are taken

  localparam int CC_Z    = 0;  // result zero
  localparam int CC_N    = 1;  // result negative
  localparam int CC_C    = 2;  // carry out
  localparam int CC_V    = 3;  // two's complement overflow
  localparam int CC_LSB  = 4;  // result bit 0
  localparam int CC_LINK = 5;  // last bit shifted out
  localparam int CC_BUSY = 6;  // a CPU host bus access is outstanding
  localparam int CC_BERR = 7;  // last CPU host bus access timed out

  // ---------------------------------------------------------------- T control field
  typedef enum logic [2:0] {
    TC_LOGIC   = 3'd0,
    TC_ARITH   = 3'd1,
    TC_SHIFT   = 3'd2,
    TC_EXT     = 3'd3,
    TC_EXTRACT = 3'd4,
    TC_INSERT  = 3'd5,
    TC_COND    = 3'd6,   // TCF used as I-machine conditional
    TC_NOP     = 3'd7    // TCF unused
  } tclass_e;

  typedef struct packed {
    tclass_e    cls;
    logic       imm;     // 1: second operand is the sign-extended ACF
    logic [3:0] opc;
    reg_idx_t   op2;     // operand source
    reg_idx_t   op1;     // operand source and sink
  } tcf_alu_t;

  typedef struct packed {
    tclass_e    cls;
    logic [4:0] pos;     // rotate amount for field selection
    reg_idx_t   op2;
    reg_idx_t   op1;
  } tcf_field_t;

  typedef struct packed {
    tclass_e    cls;
    logic [7:0] mask;
    logic [2:0] spec;
  } tcf_cond_t;

  // Arithmetic opcodes
  localparam logic [3:0] AR_ADD  = 4'd0;  // a + b
  localparam logic [3:0] AR_ADDC = 4'd1;  // a + b + C
  localparam logic [3:0] AR_SUB  = 4'd2;  // a - b
  localparam logic [3:0] AR_SUBC = 4'd3;  // a - b - !C
  localparam logic [3:0] AR_RSUB = 4'd4;  // b - a
  localparam logic [3:0] AR_NEG  = 4'd5;  // -b
  localparam logic [3:0] AR_CMP  = 4'd6;  // a - b, codes only
  localparam logic [3:0] AR_MOV  = 4'd7;  // b, codes set

  // Shift / rotate opcodes (amount = b[4:0], one bit per clock)
  localparam logic [3:0] SH_SLL = 4'd0;
  localparam logic [3:0] SH_SRL = 4'd1;
  localparam logic [3:0] SH_SRA = 4'd2;
  localparam logic [3:0] SH_ROL = 4'd3;
  localparam logic [3:0] SH_ROR = 4'd4;

  // Extended arithmetic steps, on the even/odd register pair (op1&~1, op1|1)
  localparam logic [3:0] EX_MULS = 4'd0;  // one multiply step
  localparam logic [3:0] EX_DIVS = 4'd1;  // one restoring divide step
  localparam logic [3:0] EX_DECB = 4'd2;  // one decimal-to-binary step

  // ---------------------------------------------------------------- A control field
  typedef enum logic [2:0] {
    AC_LOADR  = 3'd0,   // R[op1] <- M[adr]
    AC_STORER = 3'd1,   // M[adr] <- R[op1]
    AC_LOADI  = 3'd2,   // R[op1] <- sext(adr)
    AC_INDIR  = 3'd3,   // indirect microstore / host bus access
    AC_PTR    = 3'd4,   // pointer arithmetic, optional loop test
    AC_BRANCH = 3'd5,   // I-machine branch
    AC_NOP    = 3'd6,   // ACF unused
    AC_JUMP   = 3'd7    // I-machine jump (and link)
  } aclass_e;

  typedef struct packed {
    aclass_e    cls;
    reg_idx_t   op1;
    maddr_t     adr;
  } acf_direct_t;

  typedef struct packed {
    aclass_e    cls;
    reg_idx_t   op1;
    reg_idx_t   op2;
    logic [2:0] sub;
    logic [5:0] value;
  } acf_reg_t;

  typedef struct packed {
    aclass_e    cls;
    logic [7:0] mask;
    logic [2:0] spec;
    logic [3:0] value;
  } acf_branch_t;

  // Indirect sub-codes
  localparam logic [2:0] IS_MSRD  = 3'd0;  // R[op1] <- M[R[op2]+value]
  localparam logic [2:0] IS_MSWR  = 3'd1;  // M[R[op2]+value] <- R[op1]
  localparam logic [2:0] IS_BUSRD = 3'd2;  // R[op1] <- bus[R[op2]+value] (overlapped)
  localparam logic [2:0] IS_BUSWR = 3'd3;  // bus[R[op2]+value] <- R[op1] (overlapped)
  localparam logic [2:0] IS_WAIT  = 3'd4;  // wait until the bus access completes

  // Condition specification bits (conditional, branch)
  localparam int SP_ALL = 0;  // 0: any masked bit set, 1: all masked bits set
  localparam int SP_INV = 1;  // invert the sense of the test
  localparam int SP_IND = 2;  // 0: test condition codes, 1: indicator codes

  // ---------------------------------------------------------------- host bus
  typedef enum logic [1:0] {
    BOP_READ  = 2'd0,
    BOP_WRITE = 2'd1,
    BOP_INTR  = 2'd2,   // interrupt: internal address = microstore location
    BOP_NONE  = 2'd3
  } bus_op_e;

  typedef struct packed {
    logic       rsvd;
    logic       shaped;  // main memory: address counts elements of `size` bytes
    logic       left;    // main memory: left-justify the field in the word
    logic       sext;    // main memory: sign-extend a right-justified read
    logic [1:0] size;    // main memory: bytes - 1
    bus_op_e    op;
  } bus_cmd_t;

  typedef struct packed {
    bus_cmd_t    cmd;
    logic [7:0]  unit;
    logic [15:0] addr;
  } bus_addr_t;

  typedef struct packed {
    logic      msyn;     // master sync: address/command/data valid
    bus_addr_t a;
    word_t     wdata;
  } hbus_req_t;

  typedef struct packed {
    logic  ssyn;         // slave sync: access done, rdata valid
    word_t rdata;
  } hbus_rsp_t;

  localparam logic [7:0] UNIT_CPU = 8'h01;
  localparam logic [7:0] UNIT_MEM = 8'h02;
  localparam logic [7:0] UNIT_BAC = 8'h03;

  // In the CPU's slave space, internal address bit 12 selects the registers.
  localparam int CPU_REG_SEL = 12;

  // Condition test shared by the TCF conditional and the ACF branch.
  function automatic logic cond_test(input logic [7:0] mask, input logic [2:0] spec,
                                     input logic [7:0] cc, input logic [7:0] ind);
    logic [7:0] sel;
    logic       r;
    sel = (spec[SP_IND] ? ind : cc) & mask;
    r   = spec[SP_ALL] ? (sel == mask) : (sel != 8'd0);
    return r ^ spec[SP_INV];
  endfunction

endpackage
