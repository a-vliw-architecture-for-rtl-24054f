// vliw_mem_unit: the load/store unit of the VLIW processor (chunk1).
//
// The only addressing mode is post-increment: the effective address is the
// value of Ri, and Ri is then replaced by Ri + Ro.  A transfer is a single
// 32-bit word (D = 0) or a double word (D = 1) that moves the register pair
// Rt, Rt+1 to or from two consecutive words.  L = 1 selects a load.  The data
// interface is 64 bits wide, so either size completes in one cycle when the
// data port is ready; the core stalls the whole processor otherwise.
// Addressing, sizes, the L and D bits and the 64-bit interface follow the
// machine description.  Word (32-bit) addressing, the register after R15
// being R0 (discarded), and a load into Ri overriding the increment are this
// design's choices.
//
// Interface: combinational.  `d_rdata[31:0]` is the word at `d_addr`,
// `d_rdata[63:32]` the word after it; the same order holds for `d_wdata` and
// the two bits of `d_wmask`.  Register write-backs happen at the clock edge
// that ends the cycle, through the core's register file.
module vliw_mem_unit
  import lns_pkg::*;
(
  input  logic        valid,      // a memory chunk issues this cycle
  input  chunk1_t     c1,
  input  word_t       ri_val,
  input  word_t       ro_val,
  input  word_t       rt_val,
  input  word_t       rt1_val,
  output word_t       d_addr,
  output logic        d_we,
  output logic [1:0]  d_wmask,
  output logic [63:0] d_wdata,
  input  logic [63:0] d_rdata,
  output logic        we_ri,
  output reg_t        ri,
  output word_t       ri_data,
  output logic        we_rt,
  output reg_t        rt,
  output word_t       rt_data,
  output logic        we_rt1,
  output reg_t        rt1,
  output word_t       rt1_data
);

  always_comb begin
    d_addr   = ri_val;
    d_we     = valid && !c1.l;
    d_wmask  = {c1.d, 1'b1};
    d_wdata  = {rt1_val, rt_val};
    we_ri    = valid;
    ri       = c1.ri;
    ri_data  = ri_val + ro_val;
    we_rt    = valid && c1.l;
    rt       = c1.rt;
    rt_data  = d_rdata[31:0];
    we_rt1   = valid && c1.l && c1.d;
    rt1      = c1.rt + 4'd1;
    rt1_data = d_rdata[63:32];
  end

endmodule
