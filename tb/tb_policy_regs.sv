// tb_policy_regs: random writes to the four TPR/TCR pairs compared with a
// shadow copy; checks reset values and that a write lands at the clock edge.
module tb_policy_regs;
  import dift_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we_tpr = 0, we_tcr = 0;
  logic [1:0] idx = 0;
  logic [31:0] wdata = 0;
  logic [NPOL-1:0][31:0] tpr, tcr;
  logic [31:0] s_tpr [4], s_tcr [4];
  int checks = 0, failures = 0;

  policy_regs dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #12;
    for (int p = 0; p < 4; p++) begin
      chk(tpr[p] == 0 && tcr[p] == 0, "reset value");
      s_tpr[p] = 0; s_tcr[p] = 0;
    end
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we_tpr = 1'($urandom); we_tcr = 1'($urandom);
      idx = 2'($urandom); wdata = $urandom;
      #1;
      chk(tpr[idx] == s_tpr[idx], "no write before the edge");
      if (we_tpr) s_tpr[idx] = wdata;
      if (we_tcr) s_tcr[idx] = wdata;
      @(posedge clk); #1;
      for (int p = 0; p < 4; p++)
        chk(tpr[p] == s_tpr[p] && tcr[p] == s_tcr[p], $sformatf("register %0d", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
