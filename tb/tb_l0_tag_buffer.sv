// tb_l0_tag_buffer: fill, lookup of every tag of a line, miss outside the
// line, invalidation by a write to the same line and not by another line.
module tb_l0_tag_buffer;
  import dift_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] pc = 0, fill_addr = 0, inval_addr = 0;
  logic hit, fill = 0, inval = 0;
  tag_t itag;
  logic [255:0] fill_line = 0, line;
  int checks = 0, failures = 0;

  l0_tag_buffer dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    #12 rst_n = 1;
    pc = 32'h1000_0000; #1;
    chk(!hit, "empty after reset");
    for (int r = 0; r < 20; r++) begin
      logic [31:0] base;
      base = {$urandom, 8'h00};
      for (int k = 0; k < 8; k++) line[32*k +: 32] = $urandom;
      @(negedge clk);
      fill = 1; fill_addr = base + 32'($urandom_range(255, 0)); fill_line = line;
      @(negedge clk);
      fill = 0;
      for (int w = 0; w < 64; w++) begin
        pc = base + 4 * w; #1;
        chk(hit && itag == line[4*w +: 4], "lookup in the line");
      end
      pc = base + 256; #1;
      chk(!hit, "next line misses");
      @(negedge clk);
      inval = 1; inval_addr = base + 512;
      @(negedge clk);
      inval = 0; pc = base; #1;
      chk(hit, "write to another line keeps the copy");
      @(negedge clk);
      inval = 1; inval_addr = base + 32'($urandom_range(63, 0)) * 4;
      @(negedge clk);
      inval = 0; #1;
      chk(!hit, "write to the line invalidates");
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
