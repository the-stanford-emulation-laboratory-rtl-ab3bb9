// emmy_main_memory: the laboratory's 64K-byte main memory system, a host
// bus slave that reformats data on the way in and out.
//
// The memory can stand in for a target machine's main memory: an access
// reads or writes 1, 2, 3 or 4 consecutive bytes at any byte address (no
// alignment restriction; addresses wrap at 64K), most significant byte at
// the lowest address. The bus command byte selects the size, the
// justification and, for right-justified reads, sign extension:
//   right-justified read   the field lands in the low bytes of the word,
//                          zero- or sign-extended
//   left-justified read    the field lands in the high bytes, low bytes zero
//   right/left write       the low / high `size` bytes of the word are stored
// A shaped access (command bit 6) gives the address in elements of the
// access size rather than in bytes: the memory multiplies it by 1..4, so an
// array of halfwords is stepped through in halfword increments. Doing this
// here frees the emulating microprogram from repeated shifting, masking and
// address scaling.
//
// Organisation: four byte-wide banks interleaved on address bits 1..0, so
// the up to four bytes of one access lie in different banks and each bank
// is read or written once per access. Timing: the slave sees msyn, waits
// ACCESS_CLKS clocks (the memory cycle), then does the access and raises
// ssyn until msyn falls.
//
// Size (64K bytes), the 1-4 byte accesses, justification, sign extension
// and shaped (element) addressing follow the report, as does the 650 ns
// cycle, here 19 clocks of 35 ns. The byte order, the banking, the command
// encoding and the scaling of a shaped address by the access size are this
// design's own.
module emmy_main_memory
  import emmy_pkg::*;
#(
  parameter logic [7:0]  MY_UNIT     = UNIT_MEM,
  parameter int unsigned BYTES       = 65536,
  parameter int unsigned ACCESS_CLKS = 19
) (
  input  logic      clk,
  input  logic      rst_n,
  input  hbus_req_t bus,
  output hbus_rsp_t rsp
);
  localparam int unsigned ROWS = BYTES / 4;
  localparam int unsigned RW   = $clog2(ROWS);
  localparam int unsigned AW   = RW + 2;
  localparam int unsigned CW   = $clog2(ACCESS_CLKS + 1);

  logic [7:0] bank0 [ROWS];
  logic [7:0] bank1 [ROWS];
  logic [7:0] bank2 [ROWS];
  logic [7:0] bank3 [ROWS];

  typedef enum logic [1:0] {IDLE, WAIT, ACK} st_e;
  st_e           st;
  logic [CW-1:0] cnt;
  word_t         rdata_q;

  wire sel = bus.msyn && (bus.a.unit == MY_UNIT) &&
             (bus.a.cmd.op == BOP_READ || bus.a.cmd.op == BOP_WRITE);

  // Per-bank byte index within the access and row address.
  logic [AW-1:0] base;
  logic [1:0]    idx  [4];
  logic [RW-1:0] row  [4];
  logic          use_b[4];
  logic [7:0]    wbyte[4];
  logic [7:0]    rbyte[4];
  logic [2:0]    nbytes;

  always_comb begin
    nbytes = {1'b0, bus.a.cmd.size} + 3'd1;
    // shaped access: the address is an element number, scaled to bytes
    base   = bus.a.cmd.shaped ? AW'(bus.a.addr[AW-1:0] * nbytes) : bus.a.addr[AW-1:0];
    for (int k = 0; k < 4; k++) begin
      logic [AW-1:0] ba;
      idx[k]   = 2'(k) - base[1:0];
      ba       = base + AW'(idx[k]);
      row[k]   = ba[AW-1:2];
      use_b[k] = ({1'b0, idx[k]} < nbytes);
      // byte idx of the field, MSB first
      if (bus.a.cmd.left) wbyte[k] = bus.wdata[8*(3 - int'(idx[k])) +: 8];
      else                wbyte[k] = bus.wdata[8*(int'(nbytes) - 1 - int'(idx[k])) +: 8];
    end
  end

  assign rbyte[0] = bank0[row[0]];
  assign rbyte[1] = bank1[row[1]];
  assign rbyte[2] = bank2[row[2]];
  assign rbyte[3] = bank3[row[3]];

  // Assemble the read field, MSB first, then justify.
  function automatic word_t format_read(input logic [7:0] b [4], input logic [1:0] ix [4],
                                        input logic [2:0] n, input logic left, input logic sx);
    logic [7:0] fld [4];
    word_t      v;
    for (int k = 0; k < 4; k++) fld[ix[k]] = b[k];
    v = '0;
    for (int i = 0; i < 4; i++) if (3'(i) < n) v = {v[23:0], fld[i]};
    if (left) v = v << (6'd32 - {n, 3'b000});
    else if (sx) begin
      case (n)
        3'd1:    v = word_t'(signed'(v[7:0]));
        3'd2:    v = word_t'(signed'(v[15:0]));
        3'd3:    v = word_t'(signed'(v[23:0]));
        default: ;
      endcase
    end
    return v;
  endfunction

  wire do_access = (st == WAIT) && (cnt == CW'(ACCESS_CLKS));

  always_ff @(posedge clk) begin
    if (do_access && bus.a.cmd.op == BOP_WRITE) begin
      if (use_b[0]) bank0[row[0]] <= wbyte[0];
      if (use_b[1]) bank1[row[1]] <= wbyte[1];
      if (use_b[2]) bank2[row[2]] <= wbyte[2];
      if (use_b[3]) bank3[row[3]] <= wbyte[3];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= IDLE;
      cnt     <= '0;
      rdata_q <= '0;
    end else begin
      unique case (st)
        IDLE: if (sel) begin
          st  <= WAIT;
          cnt <= CW'(1);
        end
        WAIT: begin
          cnt <= cnt + CW'(1);
          if (do_access) begin
            rdata_q <= (bus.a.cmd.op == BOP_READ)
                       ? format_read(rbyte, idx, nbytes, bus.a.cmd.left, bus.a.cmd.sext) : '0;
            st <= ACK;
          end
        end
        ACK: if (!bus.msyn) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    rsp       = '0;
    rsp.ssyn  = (st == ACK);
    rsp.rdata = (st == ACK) ? rdata_q : '0;
  end
endmodule
