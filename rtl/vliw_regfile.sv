// vliw_regfile: the fifteen 32-bit general-purpose registers R1..R15.
//
// Register number 0 is not storage: read as a source it returns the
// instruction's 32-bit immediate (`imm`), written as a destination the value
// is discarded.  Reads are combinational; writes take effect at the clock
// edge, so a value written in one cycle is seen by the next instruction.
// The processor needs two read ports for the ALU, two for the LNS unit and
// four for the memory unit, and one write port for the ALU, one for the LNS
// unit and three for the memory unit (load data, second load word,
// post-incremented address), so the port counts are parameters.  When several
// ports write one register in the same cycle, the highest-numbered port wins.
// The register count and the R0 rule follow the machine description; the
// flip-flop implementation, port counts and write priority are this design's
// choices.  All registers reset to zero.
module vliw_regfile
  import lns_pkg::*;
#(
  parameter int unsigned NR = 8,   // read ports
  parameter int unsigned NW = 5    // write ports
) (
  input  logic  clk,
  input  logic  rst,
  input  word_t imm,
  input  reg_t  raddr [NR],
  output word_t rdata [NR],
  input  logic  we    [NW],
  input  reg_t  waddr [NW],
  input  word_t wdata [NW]
);

  word_t regs [1:NREG-1];

  always_comb begin
    for (int p = 0; p < NR; p++)
      rdata[p] = (raddr[p] == '0) ? imm : regs[raddr[p]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 1; r < NREG; r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < NW; p++)
        if (we[p] && waddr[p] != '0) regs[waddr[p]] <= wdata[p];
    end
  end

endmodule
