// tb_vliw_mem_unit: self-checking test of the load/store unit.
// Random chunk1 fields and register values: the address must be Ri, the new
// Ri must be Ri + Ro, a store must drive Rt (and Rt+1 for a double) with the
// matching write mask, a load must return the first word to Rt and, for a
// double, the second word to Rt+1.  Nothing is written when not valid.
module tb_vliw_mem_unit;
  import lns_pkg::*;

  logic valid, d_we, we_ri, we_rt, we_rt1;
  chunk1_t c1;
  word_t ri_val, ro_val, rt_val, rt1_val, d_addr, ri_data, rt_data, rt1_data;
  logic [1:0] d_wmask;
  logic [63:0] d_wdata, d_rdata;
  reg_t ri, rt, rt1;
  int checks = 0, failures = 0;

  vliw_mem_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string s, logic [63:0] got, logic [63:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s got %h want %h", s, got, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 5000; i++) begin
      valid = ($urandom_range(0, 4) != 0);
      c1 = chunk1_t'(16'($urandom));
      ri_val = $urandom; ro_val = $urandom; rt_val = $urandom; rt1_val = $urandom;
      d_rdata = {$urandom, $urandom};
      #1;
      chk("addr", d_addr, ri_val);
      chk("store", d_we, valid && !c1.l);
      if (valid && !c1.l) begin
        chk("mask", d_wmask, c1.d ? 2'b11 : 2'b01);
        chk("wdata lo", d_wdata[31:0], rt_val);
        if (c1.d) chk("wdata hi", d_wdata[63:32], rt1_val);
      end
      chk("we_ri", we_ri, valid);
      chk("ri", ri, c1.ri);
      chk("ri_data", ri_data, 32'(ri_val + ro_val));
      chk("we_rt", we_rt, valid && c1.l);
      chk("rt", rt, c1.rt);
      chk("rt_data", rt_data, d_rdata[31:0]);
      chk("we_rt1", we_rt1, valid && c1.l && c1.d);
      chk("rt1", rt1, 4'(c1.rt + 1));
      chk("rt1_data", rt1_data, d_rdata[63:32]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
