// tb_tag_alu: exhaustive check of the tag ALU over all source tags and
// per-bit propagation modes.
module tb_tag_alu;
  import dift_pkg::*;
  tag_t a, b, y;
  logic [NPOL-1:0][1:0] mode;
  int checks = 0, failures = 0;

  tag_alu dut (.a, .b, .mode, .y);

  initial begin
    for (int m = 0; m < 256; m++)
      for (int i = 0; i < 256; i++) begin
        tag_t e;
        mode = m[7:0];
        a = i[3:0];
        b = i[7:4];
        #1;
        for (int p = 0; p < 4; p++)
          e[p] = (mode[p] == 2'd0) ? 1'b0 :
                 (mode[p] == 2'd1) ? (a[p] | b[p]) :
                 (mode[p] == 2'd2) ? (a[p] & b[p]) : (a[p] ^ b[p]);
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("FAIL: a=%b b=%b mode=%h y=%b exp=%b", a, b, mode, y, e);
        end
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
