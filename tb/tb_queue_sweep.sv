// tb_queue_sweep: tag-initialisation microbenchmark over decoupling queue
// depths 0, 1, 2, 4 and 6 with a 16-byte tag cache (2 ways, 4-byte lines).
//
// A main-core model that commits four instructions every five cycles runs the
// same stream into five copies of the system: ordinary instructions mixed
// with bursts of coprocessor instructions that set and read the tags of
// consecutive words over a 2 KB region, so the tiny tag cache misses at
// every new line and writes the previous ones back. Those instructions
// cost the core nothing, but they back the queue up. The overhead is the
// share of extra cycles the core spends stalled. It must be positive without
// a queue and must not grow as the queue gets deeper. Every tag read back
// must equal the tag set before it.
module tb_queue_sweep;
  import dift_pkg::*;
  import dift_ref_pkg::*;

  localparam int NCFG = 5;
  localparam int DEPTHS [NCFG] = '{0, 1, 2, 4, 6};
  localparam int N = 3000;
  localparam int BASE = N + N / 4;   // cycles of the core on its own
  localparam int unsigned LB = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles [NCFG];
  bit done [NCFG];

  function automatic tuple_t stream(int i);
    tuple_t t;
    int ph = i % 100;
    int k  = (i / 100) * 6;                      // 6 new words per period
    t.pc = 32'h1000_0000 + 32'(i % 8) * 4;        // tight loop: one instruction-tag line
    t.addr = '0;
    if (ph < 6) begin
      t.instr = enc_cp(CP_SET_MTAG, 5'd0, 5'd0, 4'(i));
      t.addr  = 32'h0002_0000 + 32'((k + ph) % 512) * 4;
    end else if (ph < 12) begin
      t.instr = enc_cp(CP_RD_MTAG, 5'd0, 5'd0, 4'd0);
      t.addr  = 32'h0002_0000 + 32'((k + ph - 6) % 512) * 4;
    end else begin
      t.instr = enc_alu(6'h00, 5'(1 + i % 7), 5'(1 + i % 5), 1'b1, 13'd1);
    end
    return t;
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic core_valid = 0, core_stall, irq_grant, sync_done;
    tuple_t core_tuple = '0;
    logic sec_exc, rb_valid, cp_idle;
    logic [31:0] exc_pc, rb_data, mem_addr;
    tag_t exc_bits;
    logic mem_req, mem_we, mem_ack;
    logic [LB*8-1:0] mem_wdata, mem_rdata;
    logic [$clog2(DEPTHS[g]+2)-1:0] q_count;
    logic ev_fwd, ev_l0_stall, ev_cache_stall, ev_tcache_miss;
    tag_t shadow [logic [29:0]];
    tag_t exp_q [$];

    dift_system #(.QUEUE_DEPTH(DEPTHS[g]), .TCACHE_BYTES(16), .LINE_BYTES(LB)) dut (
      .clk, .rst_n, .core_valid, .core_tuple, .core_stall, .ext_irq_req(1'b0), .irq_grant,
      .sync_done, .sec_exc, .exc_pc, .exc_bits, .rb_valid, .rb_data, .mem_req, .mem_we,
      .mem_addr, .mem_wdata, .mem_ack, .mem_rdata, .cp_idle, .q_count, .ev_fwd,
      .ev_l0_stall, .ev_cache_stall, .ev_tcache_miss);
    tag_mem_model #(.LINE_BYTES(LB), .MAX_LAT(4)) u_mem (
      .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);

    always @(posedge clk) begin
      if (rst_n && rb_valid) begin
        checks++;
        if (exp_q.size() == 0 || rb_data != 32'(exp_q.pop_front())) failures++;
      end
    end

    initial begin
      tuple_t t;
      @(posedge rst_n);
      @(negedge clk);
      cycles[g] = 0;
      for (int i = 0; i < N; i++) begin
        t = stream(i);
        core_valid = 1;
        core_tuple = t;
        #1;
        while (core_stall) begin
          @(negedge clk); #1;
          cycles[g]++;
        end
        if (t.instr[24:19] == 6'h36 && t.instr[13:9] == 5'(CP_SET_MTAG)) shadow[t.addr[31:2]] = t.instr[8:5];
        if (t.instr[24:19] == 6'h36 && t.instr[13:9] == 5'(CP_RD_MTAG))
          exp_q.push_back(shadow.exists(t.addr[31:2]) ? shadow[t.addr[31:2]] : 4'd0);
        @(negedge clk);
        cycles[g]++;
        if (i % 4 == 3) begin           // the core's own bubble (IPC 0.8)
          core_valid = 0;
          @(negedge clk);
          cycles[g]++;
        end
      end
      core_valid = 0;
      while (!cp_idle || q_count != 0) @(negedge clk);
      repeat (2) @(negedge clk);
      done[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int g = 0; g < NCFG; g++)
      $display("info: queue depth %0d: %0d cycles for %0d instructions, overhead %0.1f%%",
               DEPTHS[g], cycles[g], N, 100.0 * (cycles[g] - BASE) / BASE);
    checks++;
    if (!(cycles[0] > BASE)) failures++;
    for (int g = 1; g < NCFG; g++) begin
      checks++;
      if (cycles[g] > cycles[g - 1] + N / 100) begin
        failures++;
        $display("FAIL: depth %0d slower than depth %0d", DEPTHS[g], DEPTHS[g - 1]);
      end
    end
    checks++;
    if (!(cycles[NCFG - 1] < cycles[0])) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
