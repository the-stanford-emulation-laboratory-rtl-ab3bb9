// emmy_regfile: the eight 32-bit general purpose registers of EMMY.
//
// Register 0 holds the machine state word (condition codes, indicators,
// state bits, micro address register) and is also brought out on `r0` for
// the I-machine. Reads are combinational on NRD ports. There are NWR write
// ports; when several write the same register in one clock the lowest
// numbered port wins, so callers order their ports by priority. All
// registers clear to zero at reset (the machine then sits halted).
//
// Eight registers of 32 bits with the state word in register 0 follow the
// report; the number of ports, their priority and the reset value are this
// design's own.
module emmy_regfile
  import emmy_pkg::*;
#(
  parameter int unsigned NRD = 4,
  parameter int unsigned NWR = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  reg_idx_t raddr [NRD],
  output word_t    rdata [NRD],
  input  logic     we    [NWR],
  input  reg_idx_t waddr [NWR],
  input  word_t    wdata [NWR],
  output word_t    r0
);
  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else begin
      for (int p = int'(NWR) - 1; p >= 0; p--)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb begin
    for (int i = 0; i < int'(NRD); i++) rdata[i] = regs[raddr[i]];
  end

  assign r0 = regs[0];
endmodule
