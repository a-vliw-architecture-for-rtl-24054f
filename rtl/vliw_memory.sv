// vliw_memory: unified (Princeton) code and data memory of the VLIW
// processor.
//
// One array of 32-bit words holds both program and data.  Instructions are
// addressed in 16-bit chunks (chunk address 2w is bits 31:16 of word w,
// chunk 2w+1 bits 15:0); the fetch port returns the four chunks starting at
// any chunk address, the longest compressed instruction, so a whole
// instruction is available in the cycle its address is presented.  The data
// port is 64 bits wide and word addressed: it reads the word at `d_addr` and
// the next one, and writes either or both under `d_wmask`.  A host port
// loads programs and reads results.  Addresses wrap modulo DEPTH.  The shared
// code/data address space and the 64-bit data interface follow the machine
// description; the depth, the chunk order and the separate fetch port (an
// instruction cache stand-in) are this design's choices.
//
// Timing: reads are combinational, writes happen at the rising edge; a host
// write wins over a data-port write to the same word.
module vliw_memory
  import lns_pkg::*;
#(
  parameter int unsigned DEPTH = 4096          // 32-bit words
) (
  input  logic        clk,
  input  word_t       f_addr,                  // chunk address
  output logic [63:0] f_data,
  input  word_t       d_addr,                  // word address
  output logic [63:0] d_rdata,
  input  logic        d_we,
  input  logic [1:0]  d_wmask,
  input  logic [63:0] d_wdata,
  input  logic        h_we,
  input  word_t       h_addr,
  input  word_t       h_wdata,
  output word_t       h_rdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  function automatic logic [AW-1:0] wa(word_t a);
    return a[AW-1:0];
  endfunction

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      word_t c;
      word_t wd;
      c  = f_addr + word_t'(i);
      wd = mem[wa(c >> 1)];
      f_data[63-16*i -: 16] = c[0] ? wd[15:0] : wd[31:16];
    end
    d_rdata = {mem[wa(d_addr + 1)], mem[wa(d_addr)]};
    h_rdata = mem[wa(h_addr)];
  end

  always_ff @(posedge clk) begin
    if (d_we && d_wmask[0]) mem[wa(d_addr)]     <= d_wdata[31:0];
    if (d_we && d_wmask[1]) mem[wa(d_addr + 1)] <= d_wdata[63:32];
    if (h_we)               mem[wa(h_addr)]     <= h_wdata;
  end

endmodule
