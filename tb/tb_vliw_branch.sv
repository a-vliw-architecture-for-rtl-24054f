// tb_vliw_branch: exhaustive test of the branch unit over the branch field,
// flag and MOVPC inputs with random targets: "flag is 1" and "flag is 0"
// branches, no branch for the none/immediate encodings, and MOVPC forcing the
// flag to read as 0.
module tb_vliw_branch;
  import lns_pkg::*;

  bimm_e bimm;
  logic flag, movpc, taken;
  word_t target, pc_next, pc_new;
  int checks = 0, failures = 0;

  vliw_branch dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++)
      for (int i = 0; i < 16; i++) begin
        logic f, t;
        bimm = bimm_e'(i[1:0]);
        flag = i[2];
        movpc = i[3];
        target = $urandom;
        pc_next = $urandom;
        #1;
        f = movpc ? 1'b0 : flag;
        t = (i[1:0] == 2) ? f : (i[1:0] == 3) ? !f : 1'b0;
        checks++;
        if (taken !== t || pc_new !== (t ? target : pc_next)) begin
          failures++;
          $display("bimm=%0d flag=%b movpc=%b taken=%b", i[1:0], flag, movpc, taken);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
