// vliw_branch: the branch unit of the VLIW processor.
//
// Branches are absolute and test the single flag: the 32-bit field of the
// instruction is the target.  Field ir[61:60] = 2'b10 branches when the flag
// is 1, 2'b11 when it is 0.  A MOVPC executing in the same instruction makes
// the branch see the flag as 0, so MOVPC with the "flag is 0" branch saves a
// return address and branches unconditionally.  Because the fetch reads the
// instruction at the new PC in the next cycle, a taken branch costs nothing.
// The absolute single-flag branch and the MOVPC rule follow the machine
// description; the encoding of the two branch conditions is this design's
// choice.
//
// Interface: combinational; `pc_next` is the address of the following
// instruction in 16-bit chunks, `pc_new` the address to fetch next.
module vliw_branch
  import lns_pkg::*;
(
  input  bimm_e bimm,
  input  logic  flag,
  input  logic  movpc,
  input  word_t target,
  input  word_t pc_next,
  output logic  taken,
  output word_t pc_new
);

  logic f;
  always_comb begin
    f = movpc ? 1'b0 : flag;
    unique case (bimm)
      BI_BT:   taken = f;
      BI_BNF:  taken = !f;
      default: taken = 1'b0;
    endcase
    pc_new = taken ? target : pc_next;
  end

endmodule
