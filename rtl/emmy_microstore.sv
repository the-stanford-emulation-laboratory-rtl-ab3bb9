// emmy_microstore: the EMMY read/write microstore (4096 x 32 bits).
//
// The microstore holds microprograms and, under dynamic microprogramming,
// also serves as the machine's fastest data store. It is modelled as a
// single-port RAM with the timing of the original pseudo-static MOS store:
// a request is accepted when `ready` is high; read data (and, for a write,
// completion) is signalled by a one-clock `done` pulse ACCESS_CLKS clocks
// after acceptance; the next request can be accepted CYCLE_CLKS clocks after
// the previous one, the difference being the store's recovery time.
//
// Size, word width and the 60 ns access / 180 ns cycle times follow the
// report; converting them to whole clocks of the 35 ns machine cycle
// (2 and 6 clocks, rounded up) and the req/ready/done handshake are this
// design's own. A write lands in the array at acceptance; a read returns the
// word as it was before any write accepted in the same clock.
module emmy_microstore #(
  parameter int unsigned DEPTH       = 4096,
  parameter int unsigned ACCESS_CLKS = 2,
  parameter int unsigned CYCLE_CLKS  = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [31:0]              wdata,
  output logic                     ready,
  output logic                     done,
  output logic [31:0]              rdata
);
  localparam int unsigned CW = $clog2(CYCLE_CLKS + 1);

  logic [31:0]   mem [DEPTH];
  logic          busy;
  logic [CW-1:0] cnt;

  assign ready = !busy;
  assign done  = busy && (cnt == CW'(ACCESS_CLKS));

  always_ff @(posedge clk) begin
    if (req && ready) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (req && ready) begin
      busy <= 1'b1;
      cnt  <= CW'(1);
    end else if (busy) begin
      cnt <= cnt + CW'(1);
      if (cnt == CW'(CYCLE_CLKS - 1)) busy <= 1'b0;
    end
  end

  initial begin
    assert (ACCESS_CLKS >= 1 && ACCESS_CLKS < CYCLE_CLKS)
      else $error("emmy_microstore: need 1 <= ACCESS_CLKS < CYCLE_CLKS");
  end
endmodule
