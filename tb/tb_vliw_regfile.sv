// tb_vliw_regfile: self-checking test of the register file.
// Random writes on all five write ports and reads on all eight read ports
// are compared with a reference array: R0 must read as the immediate and
// ignore writes, values appear after the clock edge, and when several ports
// write one register the highest-numbered port wins.  Reset clears all.
module tb_vliw_regfile;
  import lns_pkg::*;

  localparam int NR = 8, NW = 5;
  logic clk = 0, rst;
  word_t imm;
  reg_t  raddr [NR];
  word_t rdata [NR];
  logic  we [NW];
  reg_t  waddr [NW];
  word_t wdata [NW];
  word_t model [16];
  int checks = 0, failures = 0;

  vliw_regfile #(.NR(NR), .NW(NW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; imm = '0;
    for (int p = 0; p < NW; p++) begin we[p] = 0; waddr[p] = '0; wdata[p] = '0; end
    for (int p = 0; p < NR; p++) raddr[p] = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int r = 0; r < 16; r++) model[r] = '0;
    for (int i = 0; i < 3000; i++) begin
      imm = $urandom;
      for (int p = 0; p < NW; p++) begin
        we[p] = 1'($urandom);
        waddr[p] = reg_t'($urandom_range(0, 15));
        wdata[p] = $urandom;
      end
      for (int p = 0; p < NR; p++) raddr[p] = reg_t'($urandom_range(0, 15));
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== ((raddr[p] == 0) ? imm : model[raddr[p]])) begin
          failures++;
          if (failures < 10) $display("read r%0d got %h", raddr[p], rdata[p]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < NW; p++) if (we[p] && waddr[p] != 0) model[waddr[p]] = wdata[p];
      @(negedge clk);
    end
    rst = 1;
    for (int p = 0; p < NW; p++) we[p] = 0;
    @(negedge clk);
    rst = 0;
    for (int r = 1; r < 16; r++) begin
      raddr[0] = reg_t'(r);
      #1;
      checks++;
      if (rdata[0] !== '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
