// tb_tag_reg_file: random reads and writes against a shadow array; checks
// write-through, that entry 0 (%g0) stays zero, reset, and the window
// mapping (outs of window w are the ins of window w-1).
module tb_tag_reg_file;
  import dift_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [PHYS_W-1:0] ra, rb, rc, wa;
  tag_t ta, tb, tc, wd;
  logic we;
  tag_t sh [NPHYS];
  int checks = 0, failures = 0;

  tag_reg_file dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  function automatic tag_t exp_rd(logic [PHYS_W-1:0] a);
    if (a == 0 || int'(a) >= NPHYS) return 0;
    if (we && wa == a && wa != 0) return wd;
    return sh[a];
  endfunction

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0; rb = 0; rc = 0;
    foreach (sh[i]) sh[i] = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom);
      wa = PHYS_W'($urandom_range(NPHYS - 1, 0));
      wd = tag_t'($urandom);
      ra = PHYS_W'($urandom_range(NPHYS - 1, 0));
      rb = (i % 3 == 0) ? wa : PHYS_W'($urandom_range(NPHYS - 1, 0));
      rc = (i % 5 == 0) ? 0 : PHYS_W'($urandom_range(NPHYS - 1, 0));
      #1;
      chk(ta == exp_rd(ra) && tb == exp_rd(rb) && tc == exp_rd(rc), "read ports");
      @(posedge clk);
      if (we && wa != 0) sh[wa] = wd;
    end
    // window overlap
    for (int w = 0; w < NWINDOWS; w++)
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (phys_idx(CWP_W'(w), 5'(8 + r)) != phys_idx(CWP_W'(w - 1), 5'(24 + r))) failures++;
      end
    checks++;
    if (phys_idx(3'd2, 5'd5) != 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
