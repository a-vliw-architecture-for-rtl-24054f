// lns_vliw_top: the complete VLIW LNS processor: the core (lns_vliw_core)
// attached to a unified program/data memory (vliw_memory).
//
// The data cache of the processor is not modelled: its hit/miss answer comes
// in through `d_ready`, and a low `d_ready` during a memory access freezes
// the processor exactly as a cache miss would.  Programs and data are loaded,
// and results read, through the host port while the core is held in reset.
//
// Interface: clock, synchronous active-high reset, `d_ready`, the host port
// (`h_*`, word addressed) and status outputs: program counter (in 16-bit
// chunks), flag, whether an instruction issued this cycle and whether the
// current header is a prohibited combination, plus event signals: a branch
// was taken, issue was held by an LNS hazard, a quick LNS operation took the
// slow path, the LNS pipeline is busy.
module lns_vliw_top
  import lns_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  d_ready,
  input  logic  h_we,
  input  word_t h_addr,
  input  word_t h_wdata,
  output word_t h_rdata,
  output word_t pc,
  output logic  flag,
  output logic  issue,
  output logic  illegal,
  output logic  br_taken,
  output logic  lns_hold,
  output logic  lns_slow,
  output logic  lns_busy
);

  word_t       f_addr, d_addr;
  logic [63:0] f_data, d_rdata, d_wdata;
  logic        d_we;
  logic [1:0]  d_wmask;

  lns_vliw_core u_core (
    .clk, .rst, .f_addr, .f_data, .d_addr, .d_we, .d_wmask, .d_wdata,
    .d_rdata, .d_ready, .pc, .flag, .issue, .illegal,
    .br_taken, .lns_hold, .lns_slow, .lns_busy
  );

  vliw_memory #(.DEPTH(DEPTH)) u_mem (
    .clk, .f_addr, .f_data, .d_addr, .d_rdata, .d_we, .d_wmask, .d_wdata,
    .h_we, .h_addr, .h_wdata, .h_rdata
  );

endmodule
