// tb_vliw_memory: self-checking test of the unified memory.
// Random host writes, single and double data-port writes, and reads through
// all three ports are compared with a reference array, including fetch
// windows that start on odd chunk addresses and straddle word boundaries.
module tb_vliw_memory;
  import lns_pkg::*;

  localparam int DEPTH = 64;
  logic clk = 0, d_we, h_we;
  word_t f_addr, d_addr, h_addr, h_wdata, h_rdata;
  logic [63:0] f_data, d_rdata, d_wdata;
  logic [1:0] d_wmask;
  word_t model [DEPTH];
  int checks = 0, failures = 0;

  vliw_memory #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] chunk(int a);
    word_t w;
    w = model[(a >> 1) % DEPTH];
    return (a % 2) ? w[15:0] : w[31:16];
  endfunction

  initial begin
    d_we = 0; h_we = 0; f_addr = '0; d_addr = '0; h_addr = '0; h_wdata = '0;
    d_wdata = '0; d_wmask = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      h_we = 1; h_addr = i; h_wdata = $urandom;
      model[i] = h_wdata;
    end
    @(negedge clk);
    h_we = 0;
    for (int i = 0; i < 3000; i++) begin
      int fa, da;
      fa = $urandom_range(0, 2 * DEPTH - 5);
      da = $urandom_range(0, DEPTH - 2);
      f_addr = fa; d_addr = da; h_addr = $urandom_range(0, DEPTH - 1);
      d_we = 1'($urandom); d_wmask = 2'($urandom); d_wdata = {$urandom, $urandom};
      #1;
      checks++;
      if (f_data !== {chunk(fa), chunk(fa + 1), chunk(fa + 2), chunk(fa + 3)}) begin
        failures++;
        if (failures < 10) $display("fetch %0d got %h", fa, f_data);
      end
      checks++;
      if (d_rdata !== {model[da + 1], model[da]}) failures++;
      checks++;
      if (h_rdata !== model[h_addr]) failures++;
      @(posedge clk);
      if (d_we && d_wmask[0]) model[da] = d_wdata[31:0];
      if (d_we && d_wmask[1]) model[da + 1] = d_wdata[63:32];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
