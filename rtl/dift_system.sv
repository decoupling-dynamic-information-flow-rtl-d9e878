// dift_system: DIFT coprocessor attached to a main core (top level).
//
// The main core (not part of this RTL) commits its instructions normally and
// presents one tuple per committed instruction: PC, instruction word and
// physical memory address. sync_ctrl passes the tuples into the decoupling
// queue and stalls the core only when the queue is full, or at a system
// call or external interrupt until the coprocessor has caught up. The
// coprocessor keeps all tag state (policy registers, register tags, tag
// cache) and interrupts the core with sec_exc when a check fails. Its tag
// cache reaches memory through a line-wide port, meant to be connected to the
// L2 cache that the core also uses; tags live in a separate area of memory
// starting at TAG_BASE (one nibble per 32-bit word).
//
// Defaults are the prototype configuration: 6-entry queue, 512-byte 2-way
// tag cache with 32-byte lines, 4 policies, 8 register windows. TAG_BASE and
// the port protocols are this design's choice. SYNC_FENCES (off by default)
// also makes memory barriers and atomics synchronisation points, for use in a
// multiprocessor; see sync_ctrl.
module dift_system
  import dift_pkg::*;
#(
  parameter int unsigned     QUEUE_DEPTH  = 6,
  parameter int unsigned     TCACHE_BYTES = 512,
  parameter int unsigned     LINE_BYTES   = 32,
  parameter logic [XLEN-1:0] TAG_BASE     = 32'hE000_0000,
  parameter bit              SYNC_FENCES  = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // main core
  input  logic                    core_valid,
  input  tuple_t                  core_tuple,
  output logic                    core_stall,
  input  logic                    ext_irq_req,
  output logic                    irq_grant,
  output logic                    sync_done,
  output logic                    sec_exc,
  output logic [XLEN-1:0]         exc_pc,
  output tag_t                    exc_bits,
  output logic                    rb_valid,
  output logic [XLEN-1:0]         rb_data,
  // tag memory port
  output logic                    mem_req,
  output logic                    mem_we,
  output logic [XLEN-1:0]         mem_addr,
  output logic [LINE_BYTES*8-1:0] mem_wdata,
  input  logic                    mem_ack,
  input  logic [LINE_BYTES*8-1:0] mem_rdata,
  // status and events
  output logic                    cp_idle,
  output logic [$clog2(QUEUE_DEPTH+2)-1:0] q_count,
  output logic                    ev_fwd,
  output logic                    ev_l0_stall,
  output logic                    ev_cache_stall,
  output logic                    ev_tcache_miss
);
  logic   q_in_valid, q_in_ready, q_out_valid, q_out_ready, q_empty;
  tuple_t q_in_data, q_out_data;

  sync_ctrl #(.SYNC_FENCES(SYNC_FENCES)) u_sync (
    .clk         (clk),
    .rst_n       (rst_n),
    .core_valid  (core_valid),
    .core_tuple  (core_tuple),
    .core_stall  (core_stall),
    .ext_irq_req (ext_irq_req),
    .irq_grant   (irq_grant),
    .sync_done   (sync_done),
    .q_valid     (q_in_valid),
    .q_ready     (q_in_ready),
    .q_data      (q_in_data),
    .q_empty     (q_empty),
    .cp_idle     (cp_idle)
  );

  decoupling_queue #(.DEPTH(QUEUE_DEPTH)) u_q (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (q_in_valid),
    .in_ready  (q_in_ready),
    .in_data   (q_in_data),
    .out_valid (q_out_valid),
    .out_ready (q_out_ready),
    .out_data  (q_out_data),
    .empty     (q_empty),
    .count     (q_count)
  );

  dift_coprocessor #(
    .TCACHE_BYTES (TCACHE_BYTES),
    .LINE_BYTES   (LINE_BYTES),
    .TAG_BASE     (TAG_BASE)
  ) u_cp (
    .clk            (clk),
    .rst_n          (rst_n),
    .in_valid       (q_out_valid),
    .in_ready       (q_out_ready),
    .in_tuple       (q_out_data),
    .idle           (cp_idle),
    .sec_exc        (sec_exc),
    .exc_pc         (exc_pc),
    .exc_bits       (exc_bits),
    .rb_valid       (rb_valid),
    .rb_data        (rb_data),
    .mem_req        (mem_req),
    .mem_we         (mem_we),
    .mem_addr       (mem_addr),
    .mem_wdata      (mem_wdata),
    .mem_ack        (mem_ack),
    .mem_rdata      (mem_rdata),
    .ev_fwd         (ev_fwd),
    .ev_l0_stall    (ev_l0_stall),
    .ev_cache_stall (ev_cache_stall),
    .ev_tcache_miss (ev_tcache_miss)
  );
endmodule
