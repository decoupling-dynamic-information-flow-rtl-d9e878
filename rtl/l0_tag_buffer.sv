// l0_tag_buffer: one-line L0 buffer for instruction tags.
//
// Holds a copy of one tag cache line so that the tag of the instruction word
// can be found while the single port of the unified tag cache serves the
// memory tag of a load or store. A lookup by PC is combinational. The line is
// refilled from the tag cache whenever the pipeline had to fetch an
// instruction tag there. A write to the same line in the tag cache
// invalidates the copy, so the buffer never returns a stale tag (for example
// for code that was just written). The one-line buffer and its parallel use
// with the tag cache follow the document; refill and invalidation policy are
// this design's choice.
//
//   LINE_BYTES   bytes of tags per line; a line covers LINE_BYTES*8 bytes of memory
module l0_tag_buffer
  import dift_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [XLEN-1:0]           pc,
  output logic                      hit,
  output tag_t                      itag,
  input  logic                      fill,
  input  logic [XLEN-1:0]           fill_addr,    // any address inside the line
  input  logic [LINE_BYTES*8-1:0]   fill_line,
  input  logic                      inval,
  input  logic [XLEN-1:0]           inval_addr
);
  localparam int unsigned OFF_W = $clog2(LINE_BYTES * 8);  // memory bytes covered per line

  logic                    valid;
  logic [XLEN-OFF_W-1:0]   laddr;
  logic [LINE_BYTES*8-1:0] line;

  assign hit  = valid && (pc[XLEN-1:OFF_W] == laddr);
  assign itag = line[4*int'(pc[OFF_W-1:2]) +: 4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      laddr <= '0;
      line  <= '0;
    end else if (fill) begin
      valid <= 1'b1;
      laddr <= fill_addr[XLEN-1:OFF_W];
      line  <= fill_line;
    end else if (inval && inval_addr[XLEN-1:OFF_W] == laddr) begin
      valid <= 1'b0;
    end
  end

  // A fill and a write to the same line never happen in the same cycle: the
  // tag cache has a single port.
  property p_no_fill_and_inval;
    @(posedge clk) disable iff (!rst_n) !(fill && inval);
  endproperty
  assert property (p_no_fill_and_inval);
endmodule
