// tb_dift_coprocessor: self-checking test of the four-stage tag pipeline.
//
// 1. Programs the policy registers with coprocessor instructions.
// 2. Timing: 40 dependent ALU instructions in one warm instruction-tag line
//    must go through in 40 + 3 busy cycles (one per cycle, four stages,
//    every dependency forwarded); a load whose instruction tag misses in the
//    L0 buffer while its data tag hits costs exactly one extra cycle.
// 3. A random stream of tuples with random gaps, checked against the
//    sequential reference model: every readback value, the exception state,
//    all register tags and, through CP_RD_MTAG, every memory tag written.
module tb_dift_coprocessor;
  import dift_pkg::*;
  import dift_ref_pkg::*;

  localparam int unsigned LB = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, idle, sec_exc, rb_valid;
  tuple_t in_tuple = '0;
  logic [31:0] exc_pc, rb_data, mem_addr;
  tag_t exc_bits;
  logic mem_req, mem_we, mem_ack;
  logic [LB*8-1:0] mem_wdata, mem_rdata;
  logic ev_fwd, ev_l0_stall, ev_cache_stall, ev_tcache_miss;

  dift_coprocessor dut (.*);

  tag_mem_model #(.LINE_BYTES(LB), .MAX_LAT(4)) u_mem (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);

  int checks = 0, failures = 0;
  dift_ref ref_m = new();
  int n_fwd = 0, n_l0 = 0, n_cstall = 0, n_miss = 0;

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
    if (ev_cache_stall) n_cstall++;
    if (ev_tcache_miss) n_miss++;
    if (rst_n && rb_valid) begin
      if (ref_m.rb_q.size() == 0) check(0, "unexpected readback");
      else begin
        logic [31:0] e;
        e = ref_m.rb_q.pop_front();
        check(rb_data == e, $sformatf("readback %h expected %h", rb_data, e));
      end
    end
  end

  task automatic send(tuple_t t);
    @(negedge clk);
    in_valid = 1;
    in_tuple = t;
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    ref_m.step(t);
    @(posedge clk);
    #1;
    in_valid = 0;
  endtask

  task automatic drain();
    @(negedge clk);
    while (!idle) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  tuple_t t;
  int busy;
  prog_gen gen = new();

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. policies
    for (int p = 0; p < NPOL; p++) begin
      send('{pc: 32'h1000_0000, instr: enc_cp(CP_WR_TPR, 5'(p), 5'd0, 4'd0), addr: default_tpr(p)});
      send('{pc: 32'h1000_0004, instr: enc_cp(CP_WR_TCR, 5'(p), 5'd0, 4'd0), addr: default_tcr(p)});
    end
    send('{pc: 32'h1000_0008, instr: enc_cp(CP_SET_RTAG, 5'd1, 5'd0, 4'b0011), addr: 0});
    drain();
    for (int p = 0; p < NPOL; p++) begin
      check(dut.tpr[p] == default_tpr(p), "TPR write");
      check(dut.tcr[p] == default_tcr(p), "TCR write");
    end

    // 2a. back-to-back dependent ALU chain in a warm line: r(i+1) = r(i) op r1
    send('{pc: 32'h1000_0100, instr: NOP, addr: 0});
    drain();
    n_fwd = 0;
    fork
      begin
        @(negedge clk);
        for (int i = 0; i < 40; i++) begin
          in_valid = 1;
          in_tuple = '{pc: 32'h1000_0104 + 4 * i,
                       instr: enc_alu((i % 2) ? 6'h02 : 6'h00, 5'(2 + i % 5), 5'(2 + (i + 4) % 5), 1'b0, 13'd1),
                       addr: 0};
          #1;
          check(in_ready, "pipeline accepts one tuple per cycle");
          ref_m.step(in_tuple);
          @(negedge clk);
        end
        in_valid = 0;
      end
      begin
        busy = 0;
        @(negedge clk);
        while (idle) @(negedge clk);
        while (!idle) begin
          busy++;
          @(negedge clk);
        end
      end
    join
    check(busy == 40 + 3, $sformatf("40 instructions took %0d busy cycles, expected 43", busy));
    check(n_fwd == 39, $sformatf("forwarding used %0d times in a 40-long dependent chain", n_fwd));
    drain();

    // 2b. load: data line warm, instruction line cold in L0 -> one extra cycle
    send('{pc: 32'h1000_0200, instr: enc_mem(6'h00, 5'd3, 5'd1, 1'b1, 13'd0), addr: 32'h0002_0040});
    drain();
    send('{pc: 32'h1000_0300, instr: NOP, addr: 0});   // instruction line now cached, L0 elsewhere
    drain();
    send('{pc: 32'h1000_0204, instr: NOP, addr: 0});   // L0 = line of 0x1000_0200
    drain();
    n_l0 = 0; n_miss = 0;
    send('{pc: 32'h1000_0304, instr: enc_mem(6'h00, 5'd4, 5'd1, 1'b1, 13'd0), addr: 32'h0002_0044});
    drain();
    check(n_l0 == 1 && n_miss == 0, $sformatf("L0-miss load: %0d extra cycles, %0d misses", n_l0, n_miss));

    // 3. random stream
    for (int i = 0; i < 4000; i++) begin
      send(gen.next());
      if ($urandom_range(3, 0) == 0) repeat ($urandom_range(3, 0)) @(negedge clk);
    end
    drain();
    // memory tags back through the pipeline
    foreach (ref_m.mt[a])
      send('{pc: 32'h1000_0000, instr: enc_cp(CP_RD_MTAG, 5'd0, 5'd0, 4'd0), addr: {a, 2'b00}});
    drain();
    check(ref_m.rb_q.size() == 0, "all readbacks seen");
    for (int i = 0; i < NPHYS; i++)
      check(dut.u_rf.mem[i] == ref_m.rt[i], $sformatf("register tag %0d: %h vs %h", i, dut.u_rf.mem[i], ref_m.rt[i]));
    check(sec_exc == ref_m.exc, "exception pending state");
    if (ref_m.exc) begin
      check(exc_pc == ref_m.exc_pc, "exception pc");
      check(exc_bits == ref_m.exc_bits, "exception bits");
    end
    check(ref_m.n_exc > 0, "random stream raised security exceptions");
    check(n_cstall > 0 && n_miss > 0, "tag cache misses seen");
    $display("info: exceptions=%0d l0_stalls=%0d cache_stall_cycles=%0d line_fetches=%0d mem writes=%0d",
             ref_m.n_exc, n_l0, n_cstall, n_miss, u_mem.n_writes);
    check(u_mem.n_writes > 0, "dirty lines written back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
