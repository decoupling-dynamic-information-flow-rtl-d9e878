// tb_dift_system: end-to-end test of the DIFT system at its default
// configuration (6-entry queue, 512-byte tag cache).
//
// A main-core model commits one instruction per cycle whenever it is not
// stalled (with occasional idle cycles), sending each tuple through the core
// interface. System calls (Ticc) and external interrupts must wait until the
// coprocessor has caught up; at that moment the testbench checks that the
// coprocessor is idle and that its exception state equals the reference
// model's after every instruction so far, i.e. no security exception can be
// missed by a system call. Readbacks, register tags, memory tags and the
// final exception state are checked against the reference model. Every
// mechanism (queue full stall, system call sync, interrupt sync, forwarding,
// L0 stall, tag cache miss, write-back, security exception) must occur.
module tb_dift_system;
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

  tag_mem_model #(.LINE_BYTES(LB), .MAX_LAT(6)) u_mem (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);

  int checks = 0, failures = 0;
  dift_ref ref_m = new();
  prog_gen gen = new();
  int n_fwd = 0, n_l0 = 0, n_miss = 0, n_qfull = 0, n_sync = 0, n_irq = 0, n_exc_rise = 0;
  int max_count = 0;
  logic sec_exc_d = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (ev_fwd) n_fwd++;
    if (ev_l0_stall) n_l0++;
    if (ev_tcache_miss) n_miss++;
    if (int'(q_count) > max_count) max_count = int'(q_count);
    if (core_valid && core_stall && int'(q_count) == 6) n_qfull++;
    sec_exc_d <= sec_exc;
    if (sec_exc && !sec_exc_d) n_exc_rise++;
    if (rst_n && rb_valid) begin
      logic [31:0] e;
      if (ref_m.rb_q.size() == 0) check(0, "unexpected readback");
      else begin
        e = ref_m.rb_q.pop_front();
        check(rb_data == e, $sformatf("readback %h expected %h", rb_data, e));
      end
    end
  end

  // Commit one tuple: present it until the interface takes it.
  task automatic commit(tuple_t t);
    @(negedge clk);
    core_valid = 1;
    core_tuple = t;
    #1;
    while (core_stall) begin
      @(negedge clk);
      #1;
    end
    ref_m.step(t);
    @(posedge clk);
    #1;
    core_valid = 0;
  endtask

  // After a system call or interrupt request: wait for the sync point.
  task automatic wait_sync(bit irq);
    int n = 0;
    @(negedge clk);
    while (!(irq ? irq_grant : sync_done)) begin
      n++;
      @(negedge clk);
    end
    check(cp_idle, "coprocessor idle at the sync point");
    check(sec_exc == ref_m.exc, $sformatf("exception state at sync: %0b vs %0b", sec_exc, ref_m.exc));
    if (ref_m.exc) check(exc_pc == ref_m.exc_pc, "exception pc at sync");
  endtask

  tuple_t t;
  int busy;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPOL; p++) begin
      commit('{pc: 32'h1000_0000, instr: enc_cp(CP_WR_TPR, 5'(p), 5'd0, 4'd0), addr: default_tpr(p)});
      commit('{pc: 32'h1000_0004, instr: enc_cp(CP_WR_TCR, 5'(p), 5'd0, 4'd0), addr: default_tcr(p)});
    end
    // tainted code at one region, so the instruction-tag check fires
    u_mem.set_tag(32'h1000_3C00, 4'b1000);
    ref_m.mt[32'h1000_3C00 >> 2] = 4'b1000;

    for (int i = 0; i < 6000; i++) begin
      t = gen.next();
      if (i % 400 == 399) begin
        t.instr = enc_ticc(7'h10);
        commit(t);
        wait_sync(0);
        n_sync++;
      end else if (i % 700 == 350) begin
        @(negedge clk);
        ext_irq_req = 1;
        wait_sync(1);
        n_irq++;
        @(negedge clk);
        ext_irq_req = 0;
      end else if (i == 3000) begin
        t.pc = 32'h1000_3C00;
        t.instr = NOP;
        commit(t);
      end else begin
        commit(t);
      end
      if ($urandom_range(15, 0) == 0) @(negedge clk);
    end
    // final sync and full comparison
    commit('{pc: 32'h1000_0000, instr: enc_ticc(7'h10), addr: 0});
    wait_sync(0);
    foreach (ref_m.mt[a])
      commit('{pc: 32'h1000_0000, instr: enc_cp(CP_RD_MTAG, 5'd0, 5'd0, 4'd0), addr: {a, 2'b00}});
    commit('{pc: 32'h1000_0000, instr: enc_ticc(7'h10), addr: 0});
    wait_sync(0);
    repeat (3) @(negedge clk);
    check(ref_m.rb_q.size() == 0, "all readbacks seen");
    for (int i = 0; i < NPHYS; i++)
      check(dut.u_cp.u_rf.mem[i] == ref_m.rt[i], $sformatf("register tag %0d", i));
    check(sec_exc == ref_m.exc, "final exception state");

    $display("info: qfull_stalls=%0d max_queue=%0d syscall_syncs=%0d irq_syncs=%0d fwd=%0d l0_stalls=%0d line_fetches=%0d writebacks=%0d exceptions=%0d raised=%0d",
             n_qfull, max_count, n_sync, n_irq, n_fwd, n_l0, n_miss, u_mem.n_writes, ref_m.n_exc, n_exc_rise);
    check(max_count == 6, "queue reached its 6 entries");
    check(n_qfull > 0, "queue full stall happened");
    check(n_sync > 0, "system call synchronisation happened");
    check(n_irq > 0, "interrupt synchronisation happened");
    check(n_fwd > 0, "forwarding happened");
    check(n_l0 > 0, "L0 miss stall happened");
    check(n_miss > 0, "tag cache miss happened");
    check(u_mem.n_writes > 0, "dirty tag line written back");
    check(n_exc_rise > 0, "security exception raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
