// lns_vliw_core: the 32-bit VLIW logarithmic-number-system processor core.
//
// Each cycle the core fetches the compressed instruction at the program
// counter, expands it (vliw_decompress) and issues its parts to four units at
// once: the one-cycle ALU (chunk3: integer arithmetic and the cheap LNS
// multiply, divide, square and square root), the
// pipelined LNS unit (chunk2: LNS addition and subtraction, LIM, ROMLOG), the
// memory unit (chunk1: post-increment loads and stores) and the branch unit
// (absolute single-flag branches).  Register R0 as a source reads the
// instruction's 32-bit immediate.  Only the ALU changes the flag.
//
// Stalls.  No part of an instruction issues unless all of it can:
//   - W bit: the LNS unit asks for a number of cycles without issue
//     (`stall_after`), counted down here; the LNS pipeline keeps running.
//   - Quick LNS operation near the singularity: the LNS unit holds the
//     instruction for two cycles and freezes its pipeline meanwhile.
//   - LNS structural hazard: the instruction is held one cycle.
//   - Data-memory wait (`d_ready` low while a memory chunk tries to issue):
//     the whole processor, LNS pipeline included, is frozen.
// Program-counter units are 16-bit chunks; a taken branch loads the 32-bit
// field into the PC with no penalty.  MOVPC saves the address of the next
// instruction.  Reset clears the PC, flag and registers.
//
// The unit split, field layout, register-0 rule, flag rules, latencies and
// stall rules follow the machine description; everything the description
// leaves open (encodings, priorities, address units) is listed in the
// comments of the individual units.
//
// Interface: `f_addr`/`f_data` fetch port, `d_*` 64-bit data port, and
// status outputs for observation (`pc`, `flag`, `issue`, `illegal` and
// the event signals `br_taken`, `lns_hold`, `lns_slow`, `lns_busy`).
module lns_vliw_core
  import lns_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  output word_t       f_addr,
  input  logic [63:0] f_data,
  output word_t       d_addr,
  output logic        d_we,
  output logic [1:0]  d_wmask,
  output logic [63:0] d_wdata,
  input  logic [63:0] d_rdata,
  input  logic        d_ready,
  output word_t       pc,
  output logic        flag,
  output logic        issue,
  output logic        illegal,
  output logic        br_taken,      // a branch was taken this cycle
  output logic        lns_hold,      // held by an LNS structural hazard
  output logic        lns_slow,      // a quick LNS op starts its two-cycle detour
  output logic        lns_busy       // LNS pipeline holds operations
);

  dec_instr_t ins;
  logic [2:0] wait_cnt;
  logic       waiting, lns_hold_any, lns_hazard, ready, miss, en;

  assign f_addr = pc;

  vliw_decompress u_dec (.window(f_data), .instr(ins));
  assign illegal = ins.illegal;

  // ------------------------------------------------------------ registers
  localparam int unsigned NR = 8;
  localparam int unsigned NW = 5;
  reg_t  raddr [NR];
  word_t rdata [NR];
  logic  we    [NW];
  reg_t  waddr [NW];
  word_t wdata [NW];

  always_comb begin
    raddr[0] = ins.c3.rd;
    raddr[1] = ins.c3.rs;
    raddr[2] = ins.c2.rb;
    raddr[3] = ins.c2.rc;
    raddr[4] = ins.c1.ri;
    raddr[5] = ins.c1.ro;
    raddr[6] = ins.c1.rt;
    raddr[7] = ins.c1.rt + 4'd1;
  end

  vliw_regfile #(.NR(NR), .NW(NW)) u_rf (
    .clk, .rst, .imm(ins.imm), .raddr, .rdata, .we, .waddr, .wdata
  );

  // ------------------------------------------------------------ ALU
  word_t pc_next, alu_res;
  logic  alu_wr, alu_flag, alu_flag_we, movpc;

  assign pc_next = pc + word_t'(ins.len);

  vliw_alu u_alu (
    .op(ins.c3.op), .a(rdata[0]), .b(rdata[1]), .flag, .pc_next,
    .result(alu_res), .wr(alu_wr), .flag_out(alu_flag), .flag_we(alu_flag_we),
    .movpc
  );

  // ------------------------------------------------------------ LNS unit
  logic [2:0] stall_after;
  logic       lns_we, slow_q;
  reg_t       lns_wa;
  word_t      lns_wd;

  lns_unit u_lns (
    .clk, .rst, .en,
    .op_valid(ins.c3.lns && !waiting),
    .op(ins.c2.op), .w(ins.c2.w), .ra(ins.c2.ra),
    .xb(rdata[2]), .xc(rdata[3]),
    .issue, .hold(lns_hold_any), .hazard(lns_hazard), .stall_after, .slow_q,
    .wb_we(lns_we), .wb_addr(lns_wa), .wb_data(lns_wd), .busy(lns_busy)
  );

  // ------------------------------------------------------------ memory unit
  logic  m_we_ri, m_we_rt, m_we_rt1;
  reg_t  m_ri, m_rt, m_rt1;
  word_t m_ri_d, m_rt_d, m_rt1_d;
  logic  m_dwe;

  vliw_mem_unit u_mem (
    .valid(ins.c3.mem && issue), .c1(ins.c1),
    .ri_val(rdata[4]), .ro_val(rdata[5]), .rt_val(rdata[6]), .rt1_val(rdata[7]),
    .d_addr, .d_we(m_dwe), .d_wmask, .d_wdata, .d_rdata,
    .we_ri(m_we_ri), .ri(m_ri), .ri_data(m_ri_d),
    .we_rt(m_we_rt), .rt(m_rt), .rt_data(m_rt_d),
    .we_rt1(m_we_rt1), .rt1(m_rt1), .rt1_data(m_rt1_d)
  );
  assign d_we = m_dwe;

  // ------------------------------------------------------------ branch unit
  logic  taken;
  word_t pc_new;

  vliw_branch u_br (
    .bimm(ins.c3.bimm), .flag, .movpc, .target(ins.imm), .pc_next,
    .taken, .pc_new
  );

  // ------------------------------------------------------------ issue control
  always_comb begin
    waiting = (wait_cnt != '0);
    ready   = !waiting && !(ins.c3.lns && lns_hold_any);
    miss    = ready && ins.c3.mem && !d_ready;
    en      = !miss;
    issue   = ready && !miss;
  end

  assign br_taken = issue && taken;
  assign lns_hold = !waiting && ins.c3.lns && lns_hazard;
  assign lns_slow = !waiting && ins.c3.lns && slow_q;

  always_comb begin
    we[0] = issue && alu_wr;   waddr[0] = ins.c3.rd; wdata[0] = alu_res;
    we[1] = lns_we;            waddr[1] = lns_wa;    wdata[1] = lns_wd;
    we[2] = m_we_ri;           waddr[2] = m_ri;      wdata[2] = m_ri_d;
    we[3] = m_we_rt;           waddr[3] = m_rt;      wdata[3] = m_rt_d;
    we[4] = m_we_rt1;          waddr[4] = m_rt1;     wdata[4] = m_rt1_d;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc       <= '0;
      flag     <= 1'b0;
      wait_cnt <= '0;
    end else if (issue) begin
      pc <= pc_new;
      if (alu_flag_we) flag <= alu_flag;
      wait_cnt <= ins.c3.lns ? stall_after : '0;
    end else if (waiting && en) begin
      wait_cnt <= wait_cnt - 3'd1;
    end
  end

  // Nothing issues, and memory is not written, while a wait is counted down.
  a_no_issue_while_waiting: assert property (@(posedge clk) disable iff (rst)
    waiting |-> (!issue && !d_we));

endmodule
