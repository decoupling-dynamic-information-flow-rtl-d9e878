// tag_cache: unified tag cache of the DIFT coprocessor.
//
// Caches the 4-bit tags of memory words (data and instructions). It is
// physically indexed and tagged, 2-way set-associative, write-back and
// write-allocate, with one LRU bit per set. With the defaults (512 bytes,
// 32-byte lines) it has 8 sets; a line holds the tags of 64 consecutive
// words, i.e. covers 256 bytes of memory, and the whole cache covers 4 KB.
// Size, associativity and line size follow the document; write-back, LRU and
// the memory port are this design's choice.
//
// Core side (one port): the request (req, we, addr, wtag) is held until
// ready. ready is high in the same cycle when the line is present (a hit); the
// read tag (rtag) and the whole line (rline, for the L0 buffer) are then
// valid, and a write takes effect at that clock edge. On a miss the cache
// writes back a dirty victim, then fetches the line, and hits on the cycle
// after the fill.
//
// Memory side: a line-wide request held until a one-cycle mem_ack. mem_addr
// is the byte address of the tag line in the tag area of memory:
// TAG_BASE + (data address / 8), aligned to a line. mem_rdata is taken at
// mem_ack. Tag nibble i of a line belongs to word i of the covered block.
module tag_cache
  import dift_pkg::*;
#(
  parameter int unsigned    SIZE_BYTES = 512,
  parameter int unsigned    LINE_BYTES = 32,
  parameter logic [XLEN-1:0] TAG_BASE  = 32'hE000_0000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // core side
  input  logic                    req,
  input  logic                    we,
  input  logic [XLEN-1:0]         addr,
  input  tag_t                    wtag,
  output logic                    ready,
  output tag_t                    rtag,
  output logic [LINE_BYTES*8-1:0] rline,
  output logic                    miss,     // one pulse per line fetched
  // memory side
  output logic                    mem_req,
  output logic                    mem_we,
  output logic [XLEN-1:0]         mem_addr,
  output logic [LINE_BYTES*8-1:0] mem_wdata,
  input  logic                    mem_ack,
  input  logic [LINE_BYTES*8-1:0] mem_rdata
);
  localparam int unsigned WAYS    = 2;
  localparam int unsigned LBITS   = LINE_BYTES * 8;
  localparam int unsigned SETS    = SIZE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned OFF_W   = $clog2(LBITS);       // memory bytes covered by a line
  localparam int unsigned IDX_W   = $clog2(SETS);
  localparam int unsigned TAGA_W  = XLEN - OFF_W - IDX_W;

  typedef enum logic [1:0] {S_IDLE, S_WB, S_FILL} state_e;
  state_e state;

  logic [LBITS-1:0]  data  [SETS][WAYS];
  logic [TAGA_W-1:0] atag  [SETS][WAYS];
  logic              vld   [SETS][WAYS];
  logic              dirty [SETS][WAYS];
  logic              lru   [SETS];          // way to replace next

  logic [IDX_W-1:0]  idx;
  logic [TAGA_W-1:0] rtag_a;
  logic [OFF_W-3:0]  wsel;
  logic              hit0, hit1, hit;
  logic              hway;
  logic              vway;

  assign idx    = addr[OFF_W +: IDX_W];
  assign rtag_a = addr[XLEN-1 -: TAGA_W];
  assign wsel   = addr[OFF_W-1:2];
  assign hit0   = vld[idx][0] && atag[idx][0] == rtag_a;
  assign hit1   = vld[idx][1] && atag[idx][1] == rtag_a;
  assign hit    = hit0 || hit1;
  assign hway   = hit1;
  assign vway   = lru[idx];

  assign ready  = req && hit && state == S_IDLE;
  assign rline  = data[idx][hway];
  assign rtag   = rline[4*int'(wsel) +: 4];

  function automatic logic [XLEN-1:0] tag_line_addr(input logic [XLEN-OFF_W-1:0] lineno);
    return TAG_BASE + (XLEN'(lineno) << $clog2(LINE_BYTES));
  endfunction

  assign mem_req   = (state != S_IDLE);
  assign mem_we    = (state == S_WB);
  assign mem_wdata = data[idx][vway];
  assign mem_addr  = (state == S_WB) ? tag_line_addr({atag[idx][vway], idx})
                                     : tag_line_addr(addr[XLEN-1:OFF_W]);
  assign miss      = (state == S_FILL) && mem_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      for (int s = 0; s < SETS; s++) begin
        lru[s] <= 1'b0;
        for (int w = 0; w < WAYS; w++) begin
          vld[s][w]   <= 1'b0;
          dirty[s][w] <= 1'b0;
          atag[s][w]  <= '0;
          data[s][w]  <= '0;
        end
      end
    end else begin
      unique case (state)
        S_IDLE: begin
          if (req && hit) begin
            lru[idx] <= !hway;
            if (we) begin
              data[idx][hway][4*int'(wsel) +: 4] <= wtag;
              dirty[idx][hway] <= 1'b1;
            end
          end else if (req) begin
            state <= (vld[idx][vway] && dirty[idx][vway]) ? S_WB : S_FILL;
          end
        end
        S_WB: if (mem_ack) begin
          dirty[idx][vway] <= 1'b0;
          state <= S_FILL;
        end
        S_FILL: if (mem_ack) begin
          data[idx][vway]  <= mem_rdata;
          atag[idx][vway]  <= rtag_a;
          vld[idx][vway]   <= 1'b1;
          dirty[idx][vway] <= 1'b0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The requester holds its request while the cache works on a miss.
  property p_req_held;
    @(posedge clk) disable iff (!rst_n) (state != S_IDLE) |-> req;
  endproperty
  assert property (p_req_held);

  initial begin
    assert (SETS >= 2 && (SETS & (SETS - 1)) == 0)
      else $error("tag_cache: SIZE_BYTES/(2*LINE_BYTES) must be a power of two >= 2");
  end
endmodule
