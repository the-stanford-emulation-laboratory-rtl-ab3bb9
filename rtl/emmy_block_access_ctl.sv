// emmy_block_access_ctl: block access controller of the host bus.
//
// Moves a block of words between any two bus units, typically paging data
// between the CPU's microstore and main memory without the CPU's help. It
// is a bus slave, programmed through six word registers (internal address
// bits 2..0):
//   0 SRC    full bus address of the first source word (command byte,
//            unit, internal address); the command's size/justify bits are
//            passed on unchanged, its operation is forced to read
//   1 DST    full bus address of the first destination word (forced write)
//   2 COUNT  number of words still to move
//   3 CTRL   write: bit 0 = start. read: bit 0 busy, bit 1 done, bit 2 error
//   4 SSTEP  added to SRC's 16-bit internal address after each word
//   5 DSTEP  added to DST's 16-bit internal address after each word
// and a bus master that, once started, repeats: seize the bus, read one
// word from SRC, write it to DST, release the bus, step the addresses and
// decrement COUNT, until COUNT is zero. Releasing the bus after every word
// interleaves the block transfer with other units' accesses. A transfer
// that gets no answer within TIMEOUT clocks stops the block with error set.
//
// That the unit copies blocks between any two bus units, e.g. microstore
// and main memory, follows the report; the register map, word-at-a-time
// interleaving and the time-out are this design's own.
module emmy_block_access_ctl
  import emmy_pkg::*;
#(
  parameter logic [7:0]  MY_UNIT = UNIT_BAC,
  parameter int unsigned TIMEOUT = 255
) (
  input  logic      clk,
  input  logic      rst_n,
  // bus master side
  output logic      arb_req,
  input  logic      arb_gnt,
  output hbus_req_t m_out,
  input  hbus_rsp_t bus_rsp,
  // bus slave side
  input  hbus_req_t bus_req,
  output hbus_rsp_t s_out,
  // status
  output logic      busy,
  output logic      done
);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  bus_addr_t   src, dst;
  word_t       count;
  logic [15:0] sstep, dstep;
  logic        err;

  typedef enum logic [2:0] {M_IDLE, M_ARB, M_RD, M_RD_END, M_WR, M_WR_END, M_GAP} mst_e;
  mst_e          mst;
  word_t         data;
  logic [TW-1:0] tmo;

  assign busy    = (mst != M_IDLE);
  assign arb_req = (mst inside {M_ARB, M_RD, M_RD_END, M_WR, M_WR_END});

  always_comb begin
    m_out = '0;
    if (mst == M_RD || mst == M_RD_END) begin
      m_out.a        = src;
      m_out.a.cmd.op = BOP_READ;
    end else begin
      m_out.a        = dst;
      m_out.a.cmd.op = BOP_WRITE;
      m_out.wdata    = data;
    end
    m_out.msyn = (mst == M_RD) || (mst == M_WR);
  end

  // ---------------------------------------------------------------- slave side
  typedef enum logic {S_IDLE, S_ACK} sst_e;
  sst_e  s_st;
  word_t s_rdata;
  wire   sel   = bus_req.msyn && (bus_req.a.unit == MY_UNIT);
  wire   s_wr  = sel && (s_st == S_IDLE) && (bus_req.a.cmd.op == BOP_WRITE);
  wire   start = s_wr && (bus_req.a.addr[2:0] == 3'd3) && bus_req.wdata[0] && !busy;

  always_comb begin
    s_out       = '0;
    s_out.ssyn  = (s_st == S_ACK);
    s_out.rdata = (s_st == S_ACK) ? s_rdata : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_st    <= S_IDLE;
      s_rdata <= '0;
    end else begin
      unique case (s_st)
        S_IDLE: if (sel) begin
          s_st <= S_ACK;
          unique case (bus_req.a.addr[2:0])
            3'd0:    s_rdata <= word_t'(src);
            3'd1:    s_rdata <= word_t'(dst);
            3'd2:    s_rdata <= count;
            3'd3:    s_rdata <= {29'd0, err, done, busy};
            3'd4:    s_rdata <= {16'd0, sstep};
            3'd5:    s_rdata <= {16'd0, dstep};
            default: s_rdata <= '0;
          endcase
        end
        default: if (!bus_req.msyn) s_st <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- registers and master
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src   <= '0;
      dst   <= '0;
      count <= '0;
      sstep <= '0;
      dstep <= '0;
      err   <= 1'b0;
      done  <= 1'b0;
      mst   <= M_IDLE;
      data  <= '0;
      tmo   <= '0;
    end else begin
      if (s_wr && !busy) begin
        unique case (bus_req.a.addr[2:0])
          3'd0:    src   <= bus_addr_t'(bus_req.wdata);
          3'd1:    dst   <= bus_addr_t'(bus_req.wdata);
          3'd2:    count <= bus_req.wdata;
          3'd4:    sstep <= bus_req.wdata[15:0];
          3'd5:    dstep <= bus_req.wdata[15:0];
          default: ;
        endcase
      end

      unique case (mst)
        M_IDLE: if (start) begin
          done <= 1'b0;
          err  <= 1'b0;
          if (count == '0) done <= 1'b1;
          else             mst  <= M_ARB;
        end
        M_ARB: if (arb_gnt && !bus_rsp.ssyn) begin
          mst <= M_RD;
          tmo <= '0;
        end
        M_RD: begin
          tmo <= tmo + TW'(1);
          if (bus_rsp.ssyn) begin
            data <= bus_rsp.rdata;
            mst  <= M_RD_END;
          end else if (tmo == TW'(TIMEOUT)) begin
            err <= 1'b1;
            mst <= M_GAP;
          end
        end
        M_RD_END: if (!bus_rsp.ssyn) begin
          mst <= M_WR;
          tmo <= '0;
        end
        M_WR: begin
          tmo <= tmo + TW'(1);
          if (bus_rsp.ssyn) begin
            mst <= M_WR_END;
          end else if (tmo == TW'(TIMEOUT)) begin
            err <= 1'b1;
            mst <= M_GAP;
          end
        end
        M_WR_END: if (!bus_rsp.ssyn) begin
          src.addr <= src.addr + sstep;
          dst.addr <= dst.addr + dstep;
          count    <= count - 32'd1;
          mst      <= M_GAP;
        end
        M_GAP: begin  // bus released for at least one clock
          if (err || count == '0) begin
            done <= 1'b1;
            mst  <= M_IDLE;
          end else begin
            mst <= M_ARB;
          end
        end
        default: mst <= M_IDLE;
      endcase
    end
  end
endmodule
