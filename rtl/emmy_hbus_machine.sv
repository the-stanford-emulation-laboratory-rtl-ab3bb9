// emmy_hbus_machine: EMMY's host bus machine, the fourth machine of the CPU.
//
// It runs independently of the T-, A- and I-machines and has three jobs:
//   master  carries out a host bus read or write the A-machine hands it. The
//           microprogram continues meanwhile; `busy` is visible as a
//           condition code, and read data is written to the destination
//           register when it arrives (`ret_we`). If no unit answers within
//           TIMEOUT clocks the access is abandoned and `berr` is set until
//           the next access starts.
//   slave   serves other bus units (control processor, console, block access
//           controller) that read or write the microstore or the eight
//           registers of this CPU, sharing the microstore with the CPU.
//           Internal address bit 12 = 1 selects register addr[2:0],
//           otherwise addr[11:0] is a microstore word.
//   interrupts  accepts an interrupt command whose internal address is a
//           microstore location, and holds it in `int_pending`/`int_addr`
//           until the CPU reports it served (`int_ack`). A second interrupt
//           is not acknowledged on the bus until the first is served.
//
// Bus protocol (both directions): fully interlocked. The master raises msyn
// with command, unit, address and data; the addressed slave does the access
// and raises ssyn with read data; the master drops msyn; the slave drops
// ssyn. The master keeps its arbiter request up from before msyn until
// after ssyn has fallen.
//
// The three jobs, overlapped CPU accesses, shared slave access and the
// interrupt command carrying a microstore address follow the report. The
// handshake signal names, the register/microstore split of the slave
// address space, the single pending interrupt and the time-out are this
// design's own.
module emmy_hbus_machine
  import emmy_pkg::*;
#(
  parameter logic [7:0]  MY_UNIT = UNIT_CPU,
  parameter int unsigned TIMEOUT = 255
) (
  input  logic       clk,
  input  logic       rst_n,
  // from the A-machine
  input  logic       cpu_req,
  input  logic       cpu_write,
  input  bus_addr_t  cpu_addr,
  input  word_t      cpu_wdata,
  input  reg_idx_t   cpu_dst,
  output logic       busy,
  output logic       berr,
  output logic       ret_we,
  output reg_idx_t   ret_idx,
  output word_t      ret_data,
  // bus master side
  output logic       arb_req,
  input  logic       arb_gnt,
  output hbus_req_t  m_out,
  input  hbus_rsp_t  bus_rsp,
  // bus slave side
  input  hbus_req_t  bus_req,
  output hbus_rsp_t  s_out,
  // microstore port (slave accesses)
  output logic       ms_req,
  output logic       ms_we,
  output maddr_t     ms_addr,
  output word_t      ms_wdata,
  input  logic       ms_accept,
  input  logic       ms_done,
  input  word_t      ms_rdata,
  // register port (slave accesses)
  output reg_idx_t   reg_raddr,
  input  word_t      reg_rdata,
  output logic       reg_we,
  output reg_idx_t   reg_waddr,
  output word_t      reg_wdata,
  // interrupts
  output logic       int_pending,
  output maddr_t     int_addr,
  input  logic       int_ack
);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  // ---------------------------------------------------------------- master
  typedef enum logic [1:0] {M_IDLE, M_ARB, M_SYNC, M_END} mstate_e;
  mstate_e     mst;
  bus_addr_t   m_addr;
  word_t       m_wdata;
  reg_idx_t    m_dst;
  logic        m_write;
  logic [TW-1:0] m_tmo;

  assign busy    = (mst != M_IDLE);
  assign arb_req = (mst != M_IDLE);

  always_comb begin
    m_out       = '0;
    m_out.msyn  = (mst == M_SYNC);
    m_out.a     = m_addr;
    m_out.wdata = m_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst      <= M_IDLE;
      m_addr   <= '0;
      m_wdata  <= '0;
      m_dst    <= '0;
      m_write  <= 1'b0;
      m_tmo    <= '0;
      berr     <= 1'b0;
      ret_we   <= 1'b0;
      ret_idx  <= '0;
      ret_data <= '0;
    end else begin
      ret_we <= 1'b0;
      unique case (mst)
        M_IDLE: if (cpu_req) begin
          mst     <= M_ARB;
          m_addr  <= cpu_addr;
          m_wdata <= cpu_wdata;
          m_dst   <= cpu_dst;
          m_write <= cpu_write;
          berr    <= 1'b0;
        end
        M_ARB: if (arb_gnt && !bus_rsp.ssyn) begin
          mst   <= M_SYNC;
          m_tmo <= '0;
        end
        M_SYNC: begin
          m_tmo <= m_tmo + TW'(1);
          if (bus_rsp.ssyn) begin
            mst <= M_END;
            if (!m_write) begin
              ret_we   <= 1'b1;
              ret_idx  <= m_dst;
              ret_data <= bus_rsp.rdata;
            end
          end else if (m_tmo == TW'(TIMEOUT)) begin
            mst  <= M_END;
            berr <= 1'b1;
          end
        end
        M_END: if (!bus_rsp.ssyn) mst <= M_IDLE;
        default: mst <= M_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- slave
  typedef enum logic [1:0] {S_IDLE, S_MS, S_MSWAIT, S_ACK} sstate_e;
  sstate_e s_st;
  word_t   s_rdata;
  logic    sel;

  assign sel = bus_req.msyn && (bus_req.a.unit == MY_UNIT);

  assign reg_raddr = bus_req.a.addr[2:0];
  assign reg_waddr = bus_req.a.addr[2:0];
  assign reg_wdata = bus_req.wdata;
  assign ms_addr   = bus_req.a.addr[MS_AW-1:0];
  assign ms_wdata  = bus_req.wdata;
  assign ms_we     = (bus_req.a.cmd.op == BOP_WRITE);
  assign ms_req    = (s_st == S_MS);

  always_comb begin
    s_out       = '0;
    s_out.ssyn  = (s_st == S_ACK);
    s_out.rdata = (s_st == S_ACK) ? s_rdata : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_st        <= S_IDLE;
      s_rdata     <= '0;
      reg_we      <= 1'b0;
      int_pending <= 1'b0;
      int_addr    <= '0;
    end else begin
      reg_we <= 1'b0;
      if (int_ack) int_pending <= 1'b0;
      unique case (s_st)
        S_IDLE: if (sel) begin
          unique case (bus_req.a.cmd.op)
            BOP_READ, BOP_WRITE: begin
              if (bus_req.a.addr[CPU_REG_SEL]) begin
                s_rdata <= reg_rdata;
                reg_we  <= (bus_req.a.cmd.op == BOP_WRITE);
                s_st    <= S_ACK;
              end else begin
                s_st <= S_MS;
              end
            end
            BOP_INTR: if (!int_pending) begin
              int_pending <= 1'b1;
              int_addr    <= bus_req.a.addr[MS_AW-1:0];
              s_rdata     <= '0;
              s_st        <= S_ACK;
            end
            default: begin
              s_rdata <= '0;
              s_st    <= S_ACK;
            end
          endcase
        end
        S_MS:     if (ms_accept) s_st <= S_MSWAIT;
        S_MSWAIT: if (ms_done) begin
          s_rdata <= ms_rdata;
          s_st    <= S_ACK;
        end
        S_ACK: if (!bus_req.msyn) s_st <= S_IDLE;
        default: s_st <= S_IDLE;
      endcase
    end
  end
endmodule
