// tb_decoupling_queue: the 6-entry queue and the 0-entry (no decoupling)
// variant against a queue model under random push/pop traffic. Checks order,
// that exactly DEPTH tuples fit before in_ready drops, the count output and
// a push into a full queue that is popped in the same cycle.
module tb_decoupling_queue;
  import dift_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic iv, ir, ov, ordy, em;
  tuple_t id, od;
  logic [2:0] cnt;
  logic iv0, ir0, ov0, ordy0, em0;
  tuple_t id0, od0;
  logic [0:0] cnt0;

  decoupling_queue #(.DEPTH(6)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(ordy), .out_data(od), .empty(em), .count(cnt));
  decoupling_queue #(.DEPTH(0)) dut0 (.clk, .rst_n, .in_valid(iv0), .in_ready(ir0), .in_data(id0),
    .out_valid(ov0), .out_ready(ordy0), .out_data(od0), .empty(em0), .count(cnt0));

  tuple_t q [$];
  int checks = 0, failures = 0, n_full = 0, n_both_full = 0;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    iv = 0; ordy = 0; id = '0; iv0 = 0; ordy0 = 0; id0 = '0;
    #12 rst_n = 1;
    // fill: exactly 6 fit
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      iv = 1; id = '{pc: i, instr: ~i, addr: i * 3};
      #1;
      chk(ir == (i < 6), $sformatf("in_ready with %0d entries", i));
      if (ir) q.push_back(id);
      @(posedge clk); #1;
    end
    chk(cnt == 6, "count is 6 when full");
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      iv = 1'($urandom); ordy = ($urandom_range(2, 0) != 0) ^ (i > 2000);
      id = '{pc: $urandom, instr: $urandom, addr: $urandom};
      #1;
      chk(ov == (q.size() != 0) && int'(cnt) == q.size(), "valid/count");
      if (ov && ordy) chk(od == q[0], "order");
      if (q.size() == 6) n_full++;
      if (q.size() == 6 && iv && ordy) n_both_full++;
      @(posedge clk);
      if (ov && ordy) void'(q.pop_front());
      if (iv && ir) q.push_back(id);
      #1;
    end
    chk(n_full > 0 && n_both_full > 0, "full queue and push+pop when full seen");
    // depth 0: pass-through
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      iv0 = 1'($urandom); ordy0 = 1'($urandom);
      id0 = '{pc: $urandom, instr: $urandom, addr: $urandom};
      #1;
      chk(ov0 == iv0 && ir0 == ordy0 && od0 == id0 && em0, "depth 0 passes through");
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
