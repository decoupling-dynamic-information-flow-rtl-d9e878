// decoupling_queue: FIFO of instruction tuples between the main core and the
// DIFT coprocessor.
//
// Lets the coprocessor fall behind the main core for a while (for example
// during tag cache misses) without stalling it. The core pushes one tuple per
// committed instruction; the queue is full when DEPTH tuples wait, and the
// inverse of in_ready is the "queue stall" signal to the core. DEPTH = 0
// gives no decoupling: the tuple passes straight through and the core waits
// whenever the coprocessor cannot take it. The queue and its 6-entry default
// follow the document; the valid/ready handshake is this design's choice.
//
// Timing: a tuple pushed at a clock edge can be popped from the next cycle;
// a pop frees room for a push in the same cycle (in_ready also rises when the
// queue is full and out_ready is high).
module decoupling_queue
  import dift_pkg::*;
#(
  parameter int unsigned DEPTH = 6
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  tuple_t in_data,
  output logic   out_valid,
  input  logic   out_ready,
  output tuple_t out_data,
  output logic   empty,
  output logic [$clog2(DEPTH+2)-1:0] count
);
  if (DEPTH == 0) begin : g_bypass
    assign out_valid = in_valid;
    assign out_data  = in_data;
    assign in_ready  = out_ready;
    assign empty     = 1'b1;
    assign count     = '0;
  end else begin : g_fifo
    localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
    tuple_t             mem [DEPTH];
    logic [PW-1:0]      rp, wp;
    logic [$clog2(DEPTH+2)-1:0] n;
    logic               push, pop;

    assign out_valid = (n != 0);
    assign out_data  = mem[rp];
    assign in_ready  = (int'(n) < DEPTH) || out_ready;
    assign push      = in_valid && in_ready;
    assign pop       = out_valid && out_ready;
    assign empty     = (n == 0);
    assign count     = n;

    function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
      return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
    endfunction

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rp <= '0;
        wp <= '0;
        n  <= '0;
      end else begin
        if (push) wp <= inc(wp);
        if (pop)  rp <= inc(rp);
        if (push && !pop)      n <= n + 1'b1;
        else if (pop && !push) n <= n - 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (push) mem[wp] <= in_data;
    end

    property p_no_overflow;
      @(posedge clk) disable iff (!rst_n) int'(n) <= DEPTH;
    endproperty
    assert property (p_no_overflow);
  end
endmodule
