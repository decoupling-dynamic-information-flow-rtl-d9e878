// tb_tag_check: random check of the tag check logic against the rule
// "a checked tag bit that is set fails", including the valid gate.
module tb_tag_check;
  import dift_pkg::*;
  logic valid, fail;
  tag_t src_tag, addr_tag, instr_tag, fail_bits;
  logic [NPOL-1:0] chk_src, chk_addr, chk_instr;
  int checks = 0, failures = 0, n_fail = 0;

  tag_check dut (.*);

  initial begin
    for (int i = 0; i < 5000; i++) begin
      tag_t e;
      {valid, src_tag, addr_tag, instr_tag, chk_src, chk_addr, chk_instr} = 25'($urandom);
      if (i < 10) valid = 1;
      #1;
      e = '0;
      for (int p = 0; p < 4; p++)
        if (valid && ((src_tag[p] && chk_src[p]) || (addr_tag[p] && chk_addr[p]) ||
                      (instr_tag[p] && chk_instr[p]))) e[p] = 1'b1;
      checks++;
      if (fail_bits !== e || fail !== (e != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL: bits=%b exp=%b", fail_bits, e);
      end
      if (fail) n_fail++;
    end
    checks++;
    if (n_fail == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
