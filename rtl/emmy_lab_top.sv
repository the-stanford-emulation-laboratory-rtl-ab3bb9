// emmy_lab_top: the host bus system of the emulation laboratory.
//
// The laboratory is organised around one 32-bit host bus. On it sit the
// EMMY CPU with its 4K-word microstore, the 64K-byte main memory, and the
// block access controller; any of them may seize the bus (emmy_bus_arbiter)
// and address any other by an 8-bit unit number, so the CPU reaches main
// memory, another unit reaches the CPU's microstore and registers, and the
// block access controller pages data between the two on its own.
// The remaining bus units of the laboratory -- the control processor
// interface (to a Datapoint 2200 terminal computer), the maintenance
// console and the translator to a PDP-11 style auxiliary bus -- are not
// designed here; their bus connections are brought out as ports:
//   ext_req/ext_gnt/ext_m   N_EXT bus masters (control processor interface,
//                           console): request, grant and their bus lines
//   ext_s_rsp               reply of an external slave (auxiliary bus
//                           translator) that decodes its own unit numbers
//   host_bus / host_rsp     the shared bus lines, as every unit sees them
// The unit numbers are CPU = 1, main memory = 2, block access controller = 3.
// Arbitration is round-robin among CPU (master 0), block access controller
// (master 1) and the external masters (2, 3, ...).
//
// The set of bus units and that the bus is shared by all of them follow the
// report; unit numbers, master order and port grouping are this design's
// own.
module emmy_lab_top
  import emmy_pkg::*;
#(
  parameter int unsigned N_EXT       = 2,
  parameter int unsigned MEM_BYTES   = 65536,
  parameter int unsigned MEM_ACCESS  = 19,
  parameter int unsigned MS_ACCESS   = 2,
  parameter int unsigned MS_CYCLE    = 6,
  parameter int unsigned BUS_TIMEOUT = 255
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ext_req  [N_EXT],
  output logic        ext_gnt  [N_EXT],
  input  hbus_req_t   ext_m    [N_EXT],
  input  hbus_rsp_t   ext_s_rsp,
  output hbus_req_t   host_bus,
  output hbus_rsp_t   host_rsp,
  output state_word_t cpu_state,
  output logic        cpu_retire,
  output logic        cpu_bus_stall,
  output logic        cpu_shift_step,
  output logic        cpu_int_taken,
  output logic        bac_busy,
  output logic        bac_done
);
  localparam int unsigned NM = 2 + N_EXT;
  localparam int unsigned NS = 4;

  logic      req [NM];
  logic      gnt [NM];
  hbus_req_t m_in [NM];
  hbus_rsp_t s_in [NS];

  emmy_bus_arbiter #(.NM(NM), .NS(NS)) u_arb (
    .clk, .rst_n, .req, .gnt, .m_in, .s_in, .bus(host_bus), .rsp(host_rsp)
  );

  emmy_cpu #(
    .MY_UNIT(UNIT_CPU), .MS_ACCESS(MS_ACCESS), .MS_CYCLE(MS_CYCLE), .BUS_TIMEOUT(BUS_TIMEOUT)
  ) u_cpu (
    .clk, .rst_n,
    .arb_req(req[0]), .arb_gnt(gnt[0]), .m_out(m_in[0]), .bus_rsp(host_rsp),
    .bus(host_bus), .s_out(s_in[0]),
    .state_word(cpu_state), .retire(cpu_retire), .bus_stall(cpu_bus_stall),
    .shift_step(cpu_shift_step), .int_taken(cpu_int_taken)
  );

  emmy_main_memory #(.MY_UNIT(UNIT_MEM), .BYTES(MEM_BYTES), .ACCESS_CLKS(MEM_ACCESS)) u_mem (
    .clk, .rst_n, .bus(host_bus), .rsp(s_in[1])
  );

  emmy_block_access_ctl #(.MY_UNIT(UNIT_BAC), .TIMEOUT(BUS_TIMEOUT)) u_bac (
    .clk, .rst_n,
    .arb_req(req[1]), .arb_gnt(gnt[1]), .m_out(m_in[1]), .bus_rsp(host_rsp),
    .bus_req(host_bus), .s_out(s_in[2]), .busy(bac_busy), .done(bac_done)
  );

  assign s_in[3] = ext_s_rsp;

  always_comb begin
    for (int i = 0; i < int'(N_EXT); i++) begin
      req[2+i]   = ext_req[i];
      m_in[2+i]  = ext_m[i];
      ext_gnt[i] = gnt[2+i];
    end
  end
endmodule
