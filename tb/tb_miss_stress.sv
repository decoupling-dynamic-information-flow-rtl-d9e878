// tb_miss_stress: worst-case tag cache microbenchmark on the system at its
// default configuration (6-entry queue, 512-byte 2-way tag cache, 32-byte
// lines).
//
// A main-core model commits back-to-back loads and stores with no other work
// in between, in three phases:
//   A  2048 loads of consecutive words. One tag line covers 64 words, so the
//      tag cache should miss once per 64 loads (32 misses).
//   B  1024 loads 256 bytes apart: every load needs a new tag line, so every
//      one misses.
//   C  1024 stores 256 bytes apart: every store misses and dirties its line,
//      so lines are written back as they are evicted.
// The core model has its own data cache (32-byte lines) and pays CORE_MISS
// cycles whenever a load or store touches a new line; those cycles, plus one
// per instruction, are the core's time on its own. The coprocessor's
// overhead is the share of extra cycles the core spends stalled behind the
// decoupling queue. In phases A and B the core misses at least as often as
// the tag cache and each tag miss is one line fill, so the queue should hide
// nearly all of it (below 5%). In phase C each tag miss costs a write-back
// and a fill, two line transfers against the core's one miss, so the
// coprocessor is the slower of the two and the queue cannot help; there the
// bound is the arithmetic worst case of 2 * (MEM_LAT + 1) + 1 cycles per
// store. Tag memory has a random 1..MEM_LAT cycle latency and is not shared
// with the core model, so memory bus contention is not modelled.
//
// Checked: the tag cache miss count of each phase against the arithmetic
// above, the write-backs of phase C, the overhead of each phase,
// every register tag read back after a load, and a sample of the memory tags
// written by phase C, all against the reference model.
module tb_miss_stress;
  import dift_pkg::*;
  import dift_ref_pkg::*;

  localparam int unsigned LB = 32;
  localparam int CORE_MISS = 8;
  localparam int MEM_LAT = 6;
  localparam int NA = 2048, NB = 1024, NC = 1024;
  localparam logic [31:0] RA = 32'h0004_0000, RB = 32'h0010_0000, RC = 32'h0040_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic core_valid = 0, core_stall, irq_grant, sync_done;
  tuple_t core_tuple = '0;
  logic sec_exc, rb_valid, cp_idle;
  logic [31:0] exc_pc, rb_data, mem_addr;
  tag_t exc_bits;
  logic mem_req, mem_we, mem_ack;
  logic [LB*8-1:0] mem_wdata, mem_rdata;
  logic [2:0] q_count;
  logic ev_fwd, ev_l0_stall, ev_cache_stall, ev_tcache_miss;

  dift_system dut (.*, .ext_irq_req(1'b0));

  tag_mem_model #(.LINE_BYTES(LB), .MAX_LAT(MEM_LAT)) u_mem (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);

  int checks = 0, failures = 0;
  dift_ref ref_m = new();
  int n_miss = 0;
  int cycles = 0, base = 0;
  logic [26:0] last_line = '1;
  logic [2:0] pcw = '0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (ev_tcache_miss) n_miss++;
    if (rst_n && rb_valid) begin
      logic [31:0] e;
      if (ref_m.rb_q.size() == 0) check(0, "unexpected readback");
      else begin
        e = ref_m.rb_q.pop_front();
        check(rb_data == e, $sformatf("readback %h expected %h", rb_data, e));
      end
    end
  end

  // Commit one instruction at the core's pace: a data cache miss first if
  // it touches a new line, then one cycle plus any stall from the interface.
  // Called at a negedge, returns at a negedge.
  task automatic commit(logic [31:0] instr, logic [31:0] addr, bit mem);
    tuple_t t;
    t.pc = 32'h1000_0000 + {27'd0, pcw, 2'b00};
    pcw++;
    t.instr = instr;
    t.addr = addr;
    if (mem && addr[31:5] != last_line) begin
      last_line = addr[31:5];
      core_valid = 0;
      repeat (CORE_MISS) @(negedge clk);
      cycles += CORE_MISS;
      base += CORE_MISS;
    end
    core_valid = 1;
    core_tuple = t;
    #1;
    while (core_stall) begin
      @(negedge clk);
      #1;
      cycles++;
    end
    ref_m.step(t);
    @(negedge clk);
    cycles++;
    base++;
    core_valid = 0;
  endtask

  task automatic drain();
    core_valid = 0;
    while (!cp_idle || q_count != 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  task automatic phase_end(string name, int n_inst, int miss_lo, int miss_hi, real max_ovh);
    real ovh;
    drain();
    ovh = 100.0 * (cycles - base) / base;
    $display("info: phase %s: %0d instructions, %0d core cycles alone, %0d with the coprocessor (overhead %0.2f%%), %0d tag cache misses",
             name, n_inst, base, cycles, ovh, n_miss);
    check(n_miss >= miss_lo && n_miss <= miss_hi,
          $sformatf("phase %s: %0d misses, expected %0d..%0d", name, n_miss, miss_lo, miss_hi));
    check(ovh < max_ovh, $sformatf("phase %s: overhead %0.2f%%", name, ovh));
    cycles = 0;
    base = 0;
    n_miss = 0;
  endtask

  logic [4:0] r;
  logic [31:0] a;
  int unsigned wb0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // taint policy on bit 0 (OR through loads and stores), no checks
    commit(enc_cp(CP_WR_TPR, 5'd0, 5'd0, 4'd0), default_tpr(0), 0);
    commit(enc_cp(CP_WR_TPR, 5'd1, 5'd0, 4'd0), default_tpr(1), 0);
    commit(enc_cp(CP_WR_TPR, 5'd2, 5'd0, 4'd0), default_tpr(2), 0);
    for (int i = 0; i < NA; i++) begin
      a = RA + 32'(i) * 4;
      u_mem.set_tag(a, 4'($urandom));
      ref_m.mt[a[31:2]] = u_mem.get_tag(a);
    end
    for (int i = 0; i < NB; i++) begin
      a = RB + 32'(i) * 256;
      u_mem.set_tag(a, 4'($urandom));
      ref_m.mt[a[31:2]] = u_mem.get_tag(a);
    end
    drain();
    cycles = 0; base = 0; n_miss = 0;

    // Phase A: sequential loads; read back a loaded register now and then
    for (int i = 0; i < NA; i++) begin
      r = 5'(2 + i % 6);
      commit(enc_mem(6'h00, r, 5'd1, 1'b1, 13'd0), RA + 32'(i) * 4, 1);
      if (i % 32 == 31) commit(enc_cp(CP_RD_RTAG, 5'd0, r, 4'd0), 32'd0, 0);
    end
    phase_end("A (sequential loads)", NA, NA / 64, NA / 64 + 2, 5.0);

    // Phase B: loads that each need a new tag line
    for (int i = 0; i < NB; i++) begin
      r = 5'(2 + i % 6);
      commit(enc_mem(6'h00, r, 5'd1, 1'b1, 13'd0), RB + 32'(i) * 256, 1);
      if (i % 32 == 31) commit(enc_cp(CP_RD_RTAG, 5'd0, r, 4'd0), 32'd0, 0);
    end
    phase_end("B (strided loads)", NB, NB, NB + 2, 5.0);

    // Phase C: stores of the loaded registers, each to a new tag line
    wb0 = u_mem.n_writes;
    for (int i = 0; i < NC; i++)
      commit(enc_mem(6'h04, 5'(2 + i % 6), 5'd1, 1'b1, 13'd0), RC + 32'(i) * 256, 1);
    phase_end("C (strided stores)", NC, NC, NC + 2,
              100.0 * (2 * (MEM_LAT + 1) + 1 - (CORE_MISS + 1)) / (CORE_MISS + 1));
    $display("info: %0d tag lines written back in phase C", u_mem.n_writes - wb0);
    check(u_mem.n_writes - wb0 >= NC - 16, "phase C: dirty lines written back");

    // sample of stored tags, and all register tags
    for (int i = 0; i < NC; i += 37)
      commit(enc_cp(CP_RD_MTAG, 5'd0, 5'd0, 4'd0), RC + 32'(i) * 256, 0);
    for (int k = 1; k < 8; k++)
      commit(enc_cp(CP_RD_RTAG, 5'd0, 5'(k), 4'd0), 32'd0, 0);
    drain();
    check(ref_m.rb_q.size() == 0, "all readbacks seen");
    check(!sec_exc, "no security exception");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
