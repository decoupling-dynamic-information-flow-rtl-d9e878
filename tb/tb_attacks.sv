// tb_attacks: attack scenarios in the spirit of the buffer-overflow,
// data-pointer and code-injection experiments, run through the whole system.
//
// Tag bit 0 marks untrusted input (set by the monitor as an input system
// call would), propagated by OR through ALU ops, loads and stores, and
// checked on jump targets, load/store addresses and instruction words.
// Each scenario runs once with tainted input, where exactly one security
// exception must be pending, with the PC of the offending instruction, when
// the next system call synchronises; and once with clean input, where none
// may be raised.
module tb_attacks;
  import dift_pkg::*;
  import dift_ref_pkg::*;

  localparam int unsigned LB = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic core_valid = 0, core_stall, ext_irq_req = 0, irq_grant, sync_done;
  tuple_t core_tuple = '0;
  logic sec_exc, rb_valid, cp_idle;
  logic [31:0] exc_pc, rb_data, mem_addr;
  tag_t exc_bits;
  logic mem_req, mem_we, mem_ack;
  logic [LB*8-1:0] mem_wdata, mem_rdata;
  logic [2:0] q_count;
  logic ev_fwd, ev_l0_stall, ev_cache_stall, ev_tcache_miss;

  dift_system dut (.*);
  tag_mem_model #(.LINE_BYTES(LB), .MAX_LAT(3)) u_mem (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);

  int checks = 0, failures = 0;
  logic [31:0] pc;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic commit(logic [31:0] instr, logic [31:0] addr = 0);
    @(negedge clk);
    core_valid = 1;
    core_tuple = '{pc: pc, instr: instr, addr: addr};
    #1;
    while (core_stall) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    core_valid = 0;
    pc += 4;
  endtask

  task automatic syscall();
    commit(enc_ticc(7'h10));
    @(negedge clk);
    while (!sync_done) @(negedge clk);
  endtask

  task automatic expect_attack(bit tainted, logic [31:0] bad_pc, string name);
    syscall();
    if (tainted) begin
      chk(sec_exc, {name, ": exception pending before the system call commits"});
      chk(exc_pc == bad_pc, $sformatf("%s: exception pc %h, expected %h", name, exc_pc, bad_pc));
      chk(exc_bits == 4'b0001, {name, ": taint policy failed"});
    end else begin
      chk(!sec_exc, {name, ": no false positive on clean input"});
    end
    commit(enc_cp(CP_CLR_EXC, 5'd0, 5'd0, 4'd0));
  endtask

  localparam logic [31:0] BUF = 32'h0003_0000;   // input buffer
  localparam logic [31:0] STK = 32'h0007_FF00;   // stack frame
  localparam logic [31:0] TCR0 = (32'd1 << (3*3+1)) | (32'd1 << (3*4+1)) | (32'd1 << (3*5+1)) | 32'h0092_4924;

  logic [31:0] bad;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    pc = 32'h1000_0000;
    commit(enc_cp(CP_WR_TPR, 5'd0, 5'd0, 4'd0), default_tpr(0));
    commit(enc_cp(CP_WR_TCR, 5'd0, 5'd0, 4'd0), TCR0);

    for (int tainted = 1; tainted >= 0; tainted--) begin
      // input arrives: monitor marks the buffer
      for (int w = 0; w < 8; w++)
        commit(enc_cp(CP_SET_MTAG, 5'd0, 5'd0, 4'(tainted)), BUF + 4 * w);

      // 1. stack overflow overwriting the return address, then ret
      pc = 32'h1000_1000;
      commit(enc_alu(6'h3C, 5'd14, 5'd14, 1'b1, 13'h1FA0));            // save
      for (int w = 0; w < 8; w++) begin                                   // strcpy loop
        commit(enc_mem(6'h00, 5'd16, 5'd24, 1'b1, 13'(4 * w)), BUF + 4 * w);   // ld [%i0+4w], %l0
        commit(enc_mem(6'h04, 5'd16, 5'd30, 1'b1, 13'(4 * w)), STK + 4 * w);   // st %l0, [%fp+4w]
      end
      commit(enc_mem(6'h00, 5'd31, 5'd30, 1'b1, 13'd28), STK + 28);       // ld [%fp+28], %i7
      bad = pc;
      commit(enc_alu(6'h38, 5'd0, 5'd31, 1'b1, 13'd8));                   // ret: jmpl %i7+8
      commit(enc_alu(6'h3D, 5'd0, 5'd0, 1'b0, 13'd0));                    // restore
      expect_attack(tainted, bad, "return address overwrite");

      // 2. tainted data pointer dereference
      pc = 32'h1000_2000;
      commit(enc_mem(6'h00, 5'd17, 5'd0, 1'b1, 13'h0), BUF + 12);         // ld ptr, %l1
      commit(enc_alu(6'h00, 5'd17, 5'd17, 1'b1, 13'd16));                 // add %l1, 16
      bad = pc;
      commit(enc_mem(6'h04, 5'd18, 5'd17, 1'b1, 13'h0), 32'h0005_0010);   // st %l2, [%l1]
      expect_attack(tainted, bad, "tainted data pointer");

      // 3. code injection: copy input into a code page, then run it
      pc = 32'h1000_3000;
      commit(enc_mem(6'h00, 5'd19, 5'd0, 1'b1, 13'h0), BUF + 20);         // ld input, %l3
      commit(enc_mem(6'h04, 5'd19, 5'd0, 1'b1, 13'h0), 32'h1000_5000);    // st %l3 -> code page
      commit(enc_alu(6'h38, 5'd0, 5'd0, 1'b1, 13'h0));                    // jump there (clean target)
      pc = 32'h1000_5000;
      bad = pc;
      commit(enc_alu(6'h00, 5'd1, 5'd1, 1'b1, 13'd1));                    // injected instruction
      pc = 32'h1000_0100;
      expect_attack(tainted, bad, "code injection");
    end
    chk(!sec_exc, "exception cleared at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
