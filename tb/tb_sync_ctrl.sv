// tb_sync_ctrl: the core-side interface with a modelled queue and
// coprocessor. Checks that ordinary tuples pass without waiting, that a
// full queue stalls the core, that after a system call the core is held
// exactly until the queue is empty and the coprocessor idle (sync_done then
// pulses once), and that an external interrupt is granted only once the
// coprocessor has drained and takes no tuple meanwhile. A second copy with
// SYNC_FENCES set sees the same inputs: it must also hold the core after a
// barrier (STBAR) or an atomic (SWAP, LDSTUB), where the default copy must
// not, and neither may hold after an ordinary RDY.
module tb_sync_ctrl;
  import dift_pkg::*;
  import dift_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic core_valid = 0, core_stall, ext_irq_req = 0, irq_grant, sync_done;
  tuple_t core_tuple = '0, q_data;
  logic q_valid, q_ready = 1, q_empty = 1, cp_idle = 1;
  int checks = 0, failures = 0;

  sync_ctrl dut (.*);

  logic f_valid, f_stall, f_grant, f_done;
  tuple_t f_data;
  sync_ctrl #(.SYNC_FENCES(1'b1)) dut_f (
    .clk, .rst_n, .core_valid, .core_tuple, .core_stall(f_stall), .ext_irq_req,
    .irq_grant(f_grant), .sync_done(f_done), .q_valid(f_valid), .q_ready, .q_data(f_data),
    .q_empty, .cp_idle);

  // Present a tuple that both copies take, let the queue look busy for a few
  // cycles, and check which copy holds the core.
  task automatic fence_case(logic [31:0] instr, bit is_fence, string name);
    @(negedge clk);
    core_valid = 1; core_tuple = '{pc: 32'h40, instr: instr, addr: 32'h100};
    #1 chk(q_valid && f_valid && !core_stall && !f_stall, {name, ": taken by both"});
    @(posedge clk); #1;
    core_tuple = '{pc: 32'h44, instr: NOP, addr: 0};
    q_empty = 0; cp_idle = 0;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); #1;
      chk(!core_stall && q_valid, {name, ": default copy does not hold"});
      chk(f_stall == is_fence && f_valid == !is_fence, {name, ": fence copy holds only for a fence"});
    end
    q_empty = 1; cp_idle = 1;
    #1 chk(f_done == is_fence, {name, ": fence copy sync_done"});
    @(posedge clk); #1;
    chk(!f_stall && !f_done, {name, ": fence copy released"});
    core_valid = 0;
  endtask

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    #12 rst_n = 1;
    // ordinary tuple
    @(negedge clk);
    core_valid = 1; core_tuple = '{pc: 4, instr: enc_alu(6'h00, 5'd1, 5'd2, 1'b1, 13'd1), addr: 0};
    #1 chk(q_valid && !core_stall && q_data == core_tuple, "ordinary tuple passes");
    // full queue
    q_ready = 0;
    #1 chk(core_stall, "full queue stalls the core");
    q_ready = 1;
    // system call
    @(negedge clk);
    core_tuple = '{pc: 8, instr: enc_ticc(7'h10), addr: 0};
    #1 chk(q_valid && !core_stall, "trap tuple is taken");
    @(posedge clk); #1;
    core_valid = 1; core_tuple = '{pc: 12, instr: NOP, addr: 0};
    q_empty = 0; cp_idle = 0;
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); #1;
      chk(core_stall && !q_valid && !sync_done, "held after the trap");
      if (i == 2) q_empty = 1;
    end
    cp_idle = 1;
    #1 chk(sync_done, "sync_done when drained");
    @(posedge clk); #1;
    chk(!sync_done && !core_stall && q_valid, "core released after one sync_done");
    // interrupt
    @(negedge clk);
    ext_irq_req = 1; cp_idle = 0;
    #1 chk(!q_valid && core_stall && !irq_grant, "interrupt waits for the coprocessor");
    @(negedge clk);
    cp_idle = 1;
    #1 chk(irq_grant && !q_valid, "interrupt granted when drained");
    ext_irq_req = 0;
    #1 chk(q_valid, "tuples flow again");
    // memory barriers and atomics
    fence_case(enc_alu(6'h28, 5'd0, 5'd15, 1'b0, 13'd0), 1, "stbar");
    fence_case(enc_mem(6'h0F, 5'd3, 5'd4, 1'b1, 13'd0), 1, "swap");
    fence_case(enc_mem(6'h0D, 5'd3, 5'd4, 1'b1, 13'd0), 1, "ldstub");
    fence_case(enc_alu(6'h28, 5'd3, 5'd0, 1'b0, 13'd0), 0, "rdy");
    fence_case(enc_mem(6'h00, 5'd3, 5'd4, 1'b1, 13'd0), 0, "ld");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
