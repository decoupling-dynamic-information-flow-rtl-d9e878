// tb_tag_cache: the unified tag cache against a word-level reference.
//
// Directed: a hit completes in the cycle of the request; three lines that
// map to one set show LRU replacement (the least recently used way is the
// victim); a dirty victim is written back before the new line is fetched.
// Random: reads and writes over 16 KB of data addresses (four times what the
// cache covers), each read compared with the reference, so lost or stale
// write-backs show up.
module tb_tag_cache;
  import dift_pkg::*;
  localparam int unsigned LB = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req = 0, we = 0, ready, miss;
  logic [31:0] addr = 0, mem_addr;
  tag_t wtag = 0, rtag;
  logic [LB*8-1:0] rline, mem_wdata, mem_rdata;
  logic mem_req, mem_we, mem_ack;
  tag_t refm [logic [29:0]];
  int checks = 0, failures = 0;

  tag_cache dut (.*);
  tag_mem_model #(.LINE_BYTES(LB), .MAX_LAT(5)) u_mem (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  // one access; returns the number of cycles until ready
  task automatic access(logic [31:0] a, bit w, tag_t d, output int cyc, output tag_t r);
    @(negedge clk);
    req = 1; we = w; addr = a; wtag = d;
    cyc = 1;
    #1;
    while (!ready) begin
      @(negedge clk); #1;
      cyc++;
    end
    r = rtag;
    @(posedge clk); #1;
    req = 0; we = 0;
  endtask

  function automatic tag_t refget(logic [31:0] a);
    return refm.exists(a[31:2]) ? refm[a[31:2]] : 4'd0;
  endfunction

  int cyc, rd0, wr0;
  tag_t r;
  logic [31:0] A, B, C;

  initial begin
    #12 rst_n = 1;
    // addresses 0x800 apart share a set (8 sets x 256 bytes)
    A = 32'h0004_0010; B = A + 32'h800; C = A + 32'h1000;
    u_mem.set_tag(A, 4'h5); u_mem.set_tag(B, 4'h6); u_mem.set_tag(C, 4'h7);
    refm[A[31:2]] = 5; refm[B[31:2]] = 6; refm[C[31:2]] = 7;
    access(A, 0, 0, cyc, r); chk(cyc > 1 && r == 5, "cold miss on A");
    access(A, 0, 0, cyc, r); chk(cyc == 1 && r == 5, "hit on A in one cycle");
    access(B, 1, 4'h9, cyc, r); chk(cyc > 1, "miss on B (write)"); refm[B[31:2]] = 9;
    access(A, 0, 0, cyc, r); chk(cyc == 1, "A still present (2 ways)");
    rd0 = u_mem.n_reads; wr0 = u_mem.n_writes;
    access(C, 0, 0, cyc, r); chk(cyc > 1 && r == 7, "miss on C");
    chk(u_mem.n_writes == wr0 + 1, "dirty B written back when evicted");
    access(A, 0, 0, cyc, r); chk(cyc == 1, "A kept: B was least recently used");
    access(B, 0, 0, cyc, r); chk(cyc > 1 && r == 9, "B refetched with its written tag");
    chk(u_mem.get_tag(B) == 9, "written-back line holds the new tag");

    for (int i = 0; i < 6000; i++) begin
      logic [31:0] a;
      bit w;
      tag_t d;
      a = 32'h0002_0000 + 32'($urandom_range(4095, 0)) * 4;
      w = 1'($urandom);
      d = tag_t'($urandom);
      access(a, w, d, cyc, r);
      if (w) refm[a[31:2]] = d;
      else chk(r == refget(a), $sformatf("read %h: %h expected %h", a, r, refget(a)));
    end
    $display("info: reads=%0d writes=%0d", u_mem.n_reads, u_mem.n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
