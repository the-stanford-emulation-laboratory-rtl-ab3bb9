// emmy_bus_arbiter: ownership and routing of the EMMY host bus.
//
// The host bus is a resource that any bus unit may seize to transfer data.
// Each of NM masters raises `req` and may drive the bus once `gnt` is high;
// it keeps `req` up for as long as it wants the bus (one or more complete
// interlocked transfers) and drops it to release. A free bus goes to the
// next requesting master after the previous owner in round-robin order, so
// no unit is starved. The owner's command/address/data (`m_in`) is placed on
// the shared bus `bus`; other masters' lines are ignored. Replies of the NS
// slaves are ORed into `rsp`, which is how open-collector bus lines combine;
// a slave drives all-zero when it is not answering.
//
// Grant changes take effect one clock after the request is seen (registered
// owner). That the bus is seized as a resource follows the report; the
// round-robin order, the registered grant and the OR of replies are this
// design's own.
module emmy_bus_arbiter
  import emmy_pkg::*;
#(
  parameter int unsigned NM = 4,
  parameter int unsigned NS = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req  [NM],
  output logic      gnt  [NM],
  input  hbus_req_t m_in [NM],
  input  hbus_rsp_t s_in [NS],
  output hbus_req_t bus,
  output hbus_rsp_t rsp
);
  localparam int unsigned IW = (NM > 1) ? $clog2(NM) : 1;

  logic          owned;
  logic [IW-1:0] owner;
  logic          pick_ok;
  logic [IW-1:0] pick;

  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int k = 1; k <= int'(NM); k++) begin
      int unsigned i;
      i = (int'(owner) + k) % NM;
      if (!pick_ok && req[i]) begin
        pick_ok = 1'b1;
        pick    = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owned <= 1'b0;
      owner <= IW'(NM - 1);
    end else if (owned) begin
      if (!req[owner]) owned <= 1'b0;
    end else if (pick_ok) begin
      owned <= 1'b1;
      owner <= pick;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(NM); i++) gnt[i] = owned && (owner == IW'(i)) && req[i];
    bus = '0;
    if (owned) bus = m_in[owner];
    rsp = '0;
    for (int s = 0; s < int'(NS); s++) begin
      rsp.ssyn  = rsp.ssyn | s_in[s].ssyn;
      rsp.rdata = rsp.rdata | s_in[s].rdata;
    end
  end

  // Only the owner may raise msyn.
  for (genvar i = 0; i < int'(NM); i++) begin : g_chk
    a_msyn_owner: assert property (@(posedge clk) disable iff (!rst_n) m_in[i].msyn |-> gnt[i])
      else $error("emmy_bus_arbiter: master %0d drove msyn without the bus", i);
  end
endmodule
