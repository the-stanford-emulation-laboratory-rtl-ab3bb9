// emmy_amachine: decoder and address arithmetic of EMMY's A-machine.
//
// The A-machine moves data between the registers, the microstore and the
// host bus, loads immediates and does pointer arithmetic. This block turns
// one 18-bit A control field plus the two register operands it names into
// the actions the CPU sequencer then carries out:
//   LOADR / STORER  register <-> microstore word at the 12-bit ADR
//   LOADI           register <- ADR sign-extended
//   INDIR           microstore or host bus access at R[op2] + VALUE;
//                   bus accesses are handed to the host bus machine and
//                   complete on their own while microprogram execution
//                   continues; sub-code WAIT stalls until they are done
//   PTR             R[op1] <- R[op2] + VALUE (sub-code 0), or a loop step
//                   R[op1] <- R[op2] - 1 with a test of the result
//                   (sub-codes 1..7: != 0, = 0, < 0, >= 0, > 0, <= 0, always)
//                   whose outcome `loop_taken` lets the I-machine branch
//   JUMP            R[op1] <- return address (when op1 != 0)
// BRANCH and JUMP's address change are the I-machine's; NOP does nothing.
// Purely combinational; all outputs are qualified by `active`.
//
// The four instruction kinds, the CLASS/OP1/ADR and CLASS/OP1/OP2/SUB-CODE/
// VALUE field names and the overlapped bus access follow the report. Field
// widths inside the ACF, class and sub-code values, the loop step of -1 and
// the list of loop tests are this design's own.
module emmy_amachine
  import emmy_pkg::*;
(
  input  logic        active,      // ACF holds an A instruction to execute
  input  logic [17:0] acf,
  input  word_t       ra,          // R[op1]
  input  word_t       rb,          // R[op2]
  input  maddr_t      mar,         // micro address after the fetch increment
  output reg_idx_t    op1,
  output reg_idx_t    op2,
  // microstore access
  output logic        ms_req,
  output logic        ms_we,
  output maddr_t      ms_addr,
  output word_t       ms_wdata,
  output logic        ms_to_reg,   // read data goes to R[op1]
  // direct register write
  output logic        reg_we,
  output word_t       reg_wdata,
  // host bus access
  output logic        bus_req,
  output logic        bus_write,
  output bus_addr_t   bus_addr,
  output word_t       bus_wdata,
  output logic        bus_wait,
  // loop test
  output logic        loop_taken
);
  acf_direct_t d;
  acf_reg_t    r;
  assign d   = acf_direct_t'(acf);
  assign r   = acf_reg_t'(acf);
  assign op1 = r.op1;
  assign op2 = r.op2;

  word_t val_sx, ind_addr, dec;
  assign val_sx   = word_t'(signed'(r.value));
  assign ind_addr = rb + val_sx;
  assign dec      = rb - 32'd1;

  always_comb begin
    ms_req     = 1'b0;
    ms_we      = 1'b0;
    ms_addr    = d.adr;
    ms_wdata   = ra;
    ms_to_reg  = 1'b0;
    reg_we     = 1'b0;
    reg_wdata  = '0;
    bus_req    = 1'b0;
    bus_write  = 1'b0;
    bus_addr   = bus_addr_t'(ind_addr);
    bus_wdata  = ra;
    bus_wait   = 1'b0;
    loop_taken = 1'b0;

    if (active) begin
      unique case (d.cls)
        AC_LOADR:  begin ms_req = 1'b1; ms_to_reg = 1'b1; end
        AC_STORER: begin ms_req = 1'b1; ms_we = 1'b1; end
        AC_LOADI:  begin reg_we = 1'b1; reg_wdata = word_t'(signed'(d.adr)); end
        AC_INDIR: begin
          ms_addr = ind_addr[MS_AW-1:0];
          unique case (r.sub)
            IS_MSRD:  begin ms_req = 1'b1; ms_to_reg = 1'b1; end
            IS_MSWR:  begin ms_req = 1'b1; ms_we = 1'b1; end
            IS_BUSRD: begin bus_req = 1'b1; end
            IS_BUSWR: begin bus_req = 1'b1; bus_write = 1'b1; end
            IS_WAIT:  begin bus_wait = 1'b1; end
            default:  ;
          endcase
          bus_addr.cmd.op = bus_write ? BOP_WRITE : BOP_READ;
        end
        AC_PTR: begin
          reg_we = 1'b1;
          if (r.sub == 3'd0) begin
            reg_wdata = ind_addr;
          end else begin
            reg_wdata = dec;
            unique case (r.sub)
              3'd1:    loop_taken = (dec != '0);
              3'd2:    loop_taken = (dec == '0);
              3'd3:    loop_taken = dec[31];
              3'd4:    loop_taken = !dec[31];
              3'd5:    loop_taken = !dec[31] && (dec != '0);
              3'd6:    loop_taken = dec[31] || (dec == '0);
              default: loop_taken = 1'b1;
            endcase
          end
        end
        AC_JUMP: begin
          reg_we    = (d.op1 != 3'd0);
          reg_wdata = {20'd0, mar};
        end
        default: ;  // AC_BRANCH, AC_NOP
      endcase
    end
  end
endmodule
