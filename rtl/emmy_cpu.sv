// emmy_cpu: the EMMY universal host machine CPU with its 4K microstore.
//
// Each 32-bit microinstruction is split into a 14-bit T control field and an
// 18-bit A control field, each run by its own small machine:
//   T-machine (emmy_tmachine)  logical, arithmetic, shift, extended step and
//                              insert/extract on the registers
//   A-machine (emmy_amachine)  moves between registers, microstore and host
//                              bus; load immediate; pointer/loop arithmetic
//   I-machine (emmy_imachine)  conditional execution of the ACF, branches,
//                              loops, jumps; the micro address register
//   host bus machine (emmy_hbus_machine)  overlapped bus accesses for the
//                              CPU, slave access for other units, interrupts
// around eight 32-bit registers (emmy_regfile) of which register 0 is the
// machine state word {CC[7:0], IND[7:0], STATE[3:0], MAR[11:0]}.
//
// One microinstruction goes through these steps (the sequencer below):
//   FETCH    read the microstore at MAR (waits for the store's cycle time)
//   T        run the TCF; MAR is already incremented; results and condition
//            codes are written (a shift takes one clock per bit)
//   A        run the ACF with the registers as the T step left them; a
//            microstore access waits for the store, a bus access is handed
//            to the host bus machine (stalling only while it is still busy
//            with the previous one), and the I-machine updates MAR
// Between microinstructions the CPU takes a pending bus interrupt when
// state bit IE is set: it stores register 0 at the interrupt's microstore
// location and loads register 0 from the other word of that even/odd pair,
// which saves the old state and starts the new one. It fetches only while
// state bit RUN is set; a cleared machine (reset) is halted until another
// bus unit writes register 0. CC bits 6 (bus access outstanding) and 7 (bus
// time-out) are live status and read back as such.
//
// Ports: the host bus master (arbiter request/grant, own lines `m_out`,
// shared reply `bus_rsp`), the host bus slave (shared lines `bus`, own reply
// `s_out`), and observation outputs for the state word and per-step events.
//
// The split fields, the four machines, state word contents, microstore as a
// shared data store, overlapped bus accesses and the interrupt save/load
// follow the report. The step order (T before A within a microinstruction),
// live CC bits 6 and 7, and all encodings are this design's own.
module emmy_cpu
  import emmy_pkg::*;
#(
  parameter logic [7:0]  MY_UNIT     = UNIT_CPU,
  parameter int unsigned MS_ACCESS   = 2,
  parameter int unsigned MS_CYCLE    = 6,
  parameter int unsigned BUS_TIMEOUT = 255
) (
  input  logic        clk,
  input  logic        rst_n,
  // host bus master
  output logic        arb_req,
  input  logic        arb_gnt,
  output hbus_req_t   m_out,
  input  hbus_rsp_t   bus_rsp,
  // host bus slave
  input  hbus_req_t   bus,
  output hbus_rsp_t   s_out,
  // observation
  output state_word_t state_word,
  output logic        retire,      // a microinstruction completed
  output logic        bus_stall,   // A step waiting for the host bus machine
  output logic        shift_step,  // serial shifter busy this clock
  output logic        int_taken    // an interrupt state swap completed
);
  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_FETCH_W, S_T, S_A, S_A_W,
    S_INT_SAVE, S_INT_SAVE_W, S_INT_LOAD, S_INT_LOAD_W
  } st_e;
  st_e st;

  logic [31:0] ir;
  wire  [13:0] tcf = ir[31:18];
  wire  [17:0] acf = ir[17:0];

  // ---------------------------------------------------------------- register file
  localparam int unsigned NRD = 4;
  localparam int unsigned NWR = 5;
  reg_idx_t raddr [NRD];
  word_t    rdata [NRD];
  logic     we    [NWR];
  reg_idx_t waddr [NWR];
  word_t    wdata [NWR];
  word_t    r0_raw;

  emmy_regfile #(.NRD(NRD), .NWR(NWR)) u_rf (
    .clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata, .r0(r0_raw)
  );

  logic        hb_busy, hb_berr;
  state_word_t sw;
  always_comb begin
    sw = state_word_t'(r0_raw);
    sw.cc[CC_BUSY] = hb_busy;
    sw.cc[CC_BERR] = hb_berr;
  end
  assign state_word = sw;

  function automatic word_t rd(input reg_idx_t a, input word_t v, input state_word_t s);
    return (a == 3'd0) ? word_t'(s) : v;
  endfunction

  // ---------------------------------------------------------------- microstore and its sharing
  logic   ms_req, ms_we, ms_ready, ms_done;
  maddr_t ms_addr;
  word_t  ms_wdata, ms_rdata;
  logic   cpu_ms_req, cpu_ms_we;
  maddr_t cpu_ms_addr;
  word_t  cpu_ms_wdata;
  logic   hb_ms_req, hb_ms_we;
  maddr_t hb_ms_addr;
  word_t  hb_ms_wdata;
  logic   owner_slave;

  assign ms_req   = hb_ms_req | cpu_ms_req;
  assign ms_we    = hb_ms_req ? hb_ms_we    : cpu_ms_we;
  assign ms_addr  = hb_ms_req ? hb_ms_addr  : cpu_ms_addr;
  assign ms_wdata = hb_ms_req ? hb_ms_wdata : cpu_ms_wdata;
  wire cpu_ms_accept = cpu_ms_req && ms_ready && !hb_ms_req;
  wire hb_ms_accept  = hb_ms_req && ms_ready;
  wire cpu_ms_done   = ms_done && !owner_slave;
  wire hb_ms_done    = ms_done && owner_slave;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        owner_slave <= 1'b0;
    else if (ms_ready && ms_req) owner_slave <= hb_ms_req;
  end

  emmy_microstore #(.DEPTH(1 << MS_AW), .ACCESS_CLKS(MS_ACCESS), .CYCLE_CLKS(MS_CYCLE)) u_ms (
    .clk, .rst_n, .req(ms_req), .we(ms_we), .addr(ms_addr), .wdata(ms_wdata),
    .ready(ms_ready), .done(ms_done), .rdata(ms_rdata)
  );

  // ---------------------------------------------------------------- T-machine
  tcf_alu_t   tf;
  assign tf = tcf_alu_t'(tcf);
  wire        t_ext = (tf.cls == TC_EXT);
  reg_idx_t   t_a_idx;
  assign t_a_idx = t_ext ? {tf.op1[2:1], 1'b0} : tf.op1;
  word_t      t_b;
  logic       t_busy, t_done, t_wr, t_wr_lo;
  reg_idx_t   t_wr_idx, t_wr_lo_idx;
  word_t      t_res, t_res_lo;
  logic [5:0] t_cc, t_cc_we;

  emmy_tmachine u_t (
    .clk, .rst_n, .start(st == S_T), .tcf, .acf,
    .a(rd(t_a_idx, rdata[0], sw)), .b(t_b), .lo(rd({tf.op1[2:1], 1'b1}, rdata[2], sw)),
    .carry_in(sw.cc[CC_C]), .busy(t_busy), .done(t_done),
    .wr(t_wr), .wr_idx(t_wr_idx), .res(t_res), .wr_lo(t_wr_lo), .wr_lo_idx(t_wr_lo_idx),
    .res_lo(t_res_lo), .cc(t_cc), .cc_we(t_cc_we)
  );

  // ---------------------------------------------------------------- I- and A-machines
  maddr_t mar_seq, mar_next;
  logic   acf_is_ctl, acf_exec, mar_we, loop_taken;

  emmy_imachine u_i (
    .tcf, .acf, .sw, .loop_taken, .mar_seq, .acf_is_ctl, .acf_exec, .mar_we, .mar_next
  );

  reg_idx_t  a_op1, a_op2;
  logic      a_ms_req, a_ms_we, a_ms_to_reg, a_reg_we, a_bus_req, a_bus_write, a_bus_wait;
  maddr_t    a_ms_addr;
  word_t     a_ms_wdata, a_reg_wdata, a_bus_wdata;
  bus_addr_t a_bus_addr;

  emmy_amachine u_a (
    .active(acf_exec), .acf, .ra(rd(a_op1, rdata[0], sw)), .rb(rd(a_op2, rdata[1], sw)),
    .mar(sw.mar), .op1(a_op1), .op2(a_op2),
    .ms_req(a_ms_req), .ms_we(a_ms_we), .ms_addr(a_ms_addr), .ms_wdata(a_ms_wdata),
    .ms_to_reg(a_ms_to_reg), .reg_we(a_reg_we), .reg_wdata(a_reg_wdata),
    .bus_req(a_bus_req), .bus_write(a_bus_write), .bus_addr(a_bus_addr),
    .bus_wdata(a_bus_wdata), .bus_wait(a_bus_wait), .loop_taken
  );

  assign t_b = tf.imm ? word_t'(signed'(acf)) : rd(tf.op2, rdata[1], sw);

  // ---------------------------------------------------------------- host bus machine
  logic     hb_cpu_req;
  logic     hb_ret_we;
  reg_idx_t hb_ret_idx;
  word_t    hb_ret_data;
  reg_idx_t hb_reg_raddr, hb_reg_waddr;
  logic     hb_reg_we;
  word_t    hb_reg_wdata;
  logic     int_pending, int_ack;
  maddr_t   int_addr;

  emmy_hbus_machine #(.MY_UNIT(MY_UNIT), .TIMEOUT(BUS_TIMEOUT)) u_hb (
    .clk, .rst_n,
    .cpu_req(hb_cpu_req), .cpu_write(a_bus_write), .cpu_addr(a_bus_addr),
    .cpu_wdata(a_bus_wdata), .cpu_dst(a_op1), .busy(hb_busy), .berr(hb_berr),
    .ret_we(hb_ret_we), .ret_idx(hb_ret_idx), .ret_data(hb_ret_data),
    .arb_req, .arb_gnt, .m_out, .bus_rsp,
    .bus_req(bus), .s_out,
    .ms_req(hb_ms_req), .ms_we(hb_ms_we), .ms_addr(hb_ms_addr), .ms_wdata(hb_ms_wdata),
    .ms_accept(hb_ms_accept), .ms_done(hb_ms_done), .ms_rdata,
    .reg_raddr(hb_reg_raddr), .reg_rdata(rd(hb_reg_raddr, rdata[3], sw)),
    .reg_we(hb_reg_we), .reg_waddr(hb_reg_waddr), .reg_wdata(hb_reg_wdata),
    .int_pending, .int_addr, .int_ack
  );

  // ---------------------------------------------------------------- sequencer
  reg_idx_t    a_w_idx;   // destination of a pending microstore read
  logic        a_w_reg;
  state_word_t nsw;       // register 0 as the current step leaves it

  always_comb begin
    // register reads
    raddr[0] = (st == S_T) ? t_a_idx : a_op1;
    raddr[1] = (st == S_T) ? tf.op2 : a_op2;
    raddr[2] = {tf.op1[2:1], 1'b1};
    raddr[3] = hb_reg_raddr;

    // register writes, lowest port first
    for (int p = 0; p < int'(NWR); p++) begin
      we[p] = 1'b0; waddr[p] = '0; wdata[p] = '0;
    end
    we[0] = hb_reg_we; waddr[0] = hb_reg_waddr; wdata[0] = hb_reg_wdata;
    we[4] = hb_ret_we; waddr[4] = hb_ret_idx;   wdata[4] = hb_ret_data;

    nsw          = sw;
    cpu_ms_req   = 1'b0;
    cpu_ms_we    = 1'b0;
    cpu_ms_addr  = sw.mar;
    cpu_ms_wdata = '0;
    hb_cpu_req   = 1'b0;
    int_ack      = 1'b0;

    unique case (st)
      S_FETCH: cpu_ms_req = 1'b1;
      S_FETCH_W: if (cpu_ms_done) begin
        nsw.mar = mar_seq;
        we[3] = 1'b1; waddr[3] = 3'd0; wdata[3] = word_t'(nsw);
      end
      S_T: if (t_done) begin
        for (int b = 0; b < 6; b++) if (t_cc_we[b]) nsw.cc[b] = t_cc[b];
        we[1] = t_wr;    waddr[1] = t_wr_idx;    wdata[1] = t_res;
        we[2] = t_wr_lo; waddr[2] = t_wr_lo_idx; wdata[2] = t_res_lo;
        we[3] = 1'b1;    waddr[3] = 3'd0;        wdata[3] = word_t'(nsw);
      end
      S_A: begin
        if (a_ms_req) begin
          cpu_ms_req   = 1'b1;
          cpu_ms_we    = a_ms_we;
          cpu_ms_addr  = a_ms_addr;
          cpu_ms_wdata = a_ms_wdata;
        end else if (a_bus_req) begin
          hb_cpu_req = !hb_busy;
        end else if (!a_bus_wait) begin
          nsw.mar = mar_next;
          we[1] = a_reg_we; waddr[1] = a_op1; wdata[1] = a_reg_wdata;
          we[3] = mar_we;   waddr[3] = 3'd0;  wdata[3] = word_t'(nsw);
        end
      end
      S_A_W: if (cpu_ms_done && a_w_reg) begin
        we[1] = 1'b1; waddr[1] = a_w_idx; wdata[1] = ms_rdata;
      end
      S_INT_SAVE: begin
        cpu_ms_req = 1'b1; cpu_ms_we = 1'b1; cpu_ms_addr = int_addr; cpu_ms_wdata = word_t'(sw);
      end
      S_INT_LOAD: begin
        cpu_ms_req = 1'b1; cpu_ms_addr = int_addr ^ maddr_t'(1);
      end
      S_INT_LOAD_W: if (cpu_ms_done) begin
        we[1] = 1'b1; waddr[1] = 3'd0; wdata[1] = ms_rdata;
        int_ack = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      ir      <= '0;
      a_w_idx <= '0;
      a_w_reg <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: begin
          if (int_pending && sw.state[ST_IE]) st <= S_INT_SAVE;
          else if (sw.state[ST_RUN])          st <= S_FETCH;
        end
        S_FETCH:   if (cpu_ms_accept) st <= S_FETCH_W;
        S_FETCH_W: if (cpu_ms_done) begin
          ir <= ms_rdata;
          st <= S_T;
        end
        S_T: if (t_done) st <= S_A;
        S_A: begin
          if (a_ms_req) begin
            if (cpu_ms_accept) begin
              a_w_idx <= a_op1;
              a_w_reg <= a_ms_to_reg;
              st      <= S_A_W;
            end
          end else if (a_bus_req || a_bus_wait) begin
            if (!hb_busy) st <= S_IDLE;
          end else begin
            st <= S_IDLE;
          end
        end
        S_A_W:        if (cpu_ms_done)   st <= S_IDLE;
        S_INT_SAVE:   if (cpu_ms_accept) st <= S_INT_SAVE_W;
        S_INT_SAVE_W: if (cpu_ms_done)   st <= S_INT_LOAD;
        S_INT_LOAD:   if (cpu_ms_accept) st <= S_INT_LOAD_W;
        S_INT_LOAD_W: if (cpu_ms_done)   st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign retire     = (st == S_A && !a_ms_req && !((a_bus_req || a_bus_wait) && hb_busy)) ||
                      (st == S_A_W && cpu_ms_done);
  assign bus_stall  = (st == S_A) && !a_ms_req && (a_bus_req || a_bus_wait) && hb_busy;
  assign shift_step = t_busy;
  assign int_taken  = (st == S_INT_LOAD_W) && cpu_ms_done;
endmodule
