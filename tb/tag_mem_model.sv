// tag_mem_model: behavioural model of the tag area of main memory, as seen
// through the L2 cache, for testbenches.
//
// Answers line-wide read and write requests after a random delay of 1 to
// MAX_LAT cycles with a one-cycle ack. Unwritten lines read as zero. set_tag
// and get_tag give direct access to the tag of one data word, using the same
// mapping as the tag cache: line at TAG_BASE + (addr / (8*LINE_BYTES)) *
// LINE_BYTES, nibble (addr / 4) mod (2*LINE_BYTES).
module tag_mem_model
  import dift_pkg::*;
#(
  parameter int unsigned     LINE_BYTES = 32,
  parameter int unsigned     MAX_LAT    = 4,
  parameter logic [31:0]     TAG_BASE   = 32'hE000_0000
) (
  input  logic                    clk,
  input  logic                    mem_req,
  input  logic                    mem_we,
  input  logic [31:0]             mem_addr,
  input  logic [LINE_BYTES*8-1:0] mem_wdata,
  output logic                    mem_ack,
  output logic [LINE_BYTES*8-1:0] mem_rdata
);
  logic [LINE_BYTES*8-1:0] lines [logic [31:0]];
  int unsigned wait_cnt = 0;
  bit          busy = 0;
  int unsigned n_reads = 0, n_writes = 0;

  function automatic logic [31:0] line_of(logic [31:0] a);
    return TAG_BASE + (a / (8 * LINE_BYTES)) * LINE_BYTES;
  endfunction

  function automatic void set_tag(logic [31:0] a, tag_t t);
    logic [31:0] la = line_of(a);
    int unsigned n  = (a / 4) % (2 * LINE_BYTES);
    if (!lines.exists(la)) lines[la] = '0;
    lines[la][4*n +: 4] = t;
  endfunction

  function automatic tag_t get_tag(logic [31:0] a);
    logic [31:0] la = line_of(a);
    int unsigned n  = (a / 4) % (2 * LINE_BYTES);
    if (!lines.exists(la)) return '0;
    return lines[la][4*n +: 4];
  endfunction

  initial begin
    mem_ack   = 1'b0;
    mem_rdata = '0;
  end

  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      if (!busy) begin
        busy     = 1;
        wait_cnt = $urandom_range(MAX_LAT - 1, 0);
      end
      if (wait_cnt == 0) begin
        busy = 0;
        mem_ack <= 1'b1;
        if (mem_we) begin
          lines[mem_addr] = mem_wdata;
          n_writes++;
        end else begin
          mem_rdata <= lines.exists(mem_addr) ? lines[mem_addr] : '0;
          n_reads++;
        end
      end else begin
        wait_cnt--;
      end
    end
  end
endmodule
