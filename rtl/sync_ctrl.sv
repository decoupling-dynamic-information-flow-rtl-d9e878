// sync_ctrl: the main core's side of the coprocessor interface.
//
// The core commits ordinary instructions without waiting for the DIFT
// checks and hands their tuples to the decoupling queue. It is stalled only
// when the queue is full or at a system call: after a trap instruction
// (SPARC Ticc) has entered the queue, the core is held until the queue is
// empty and the coprocessor pipeline has finished every older instruction and
// the trap itself; only then may the core commit the trap, so a pending
// security exception is always seen before the system call runs. An external
// interrupt is handled the same way: while ext_irq_req is high no tuple is
// taken, and irq_grant tells the core when the coprocessor has drained. This
// synchronisation rule follows the document; the signal names and the
// one-cycle handshake are this design's choice.
//
// With SYNC_FENCES set, memory barriers and atomics (SPARC STBAR, LDSTUB,
// SWAP and their alternate-space forms) synchronise the same way as a trap.
// The document proposes this for multiprocessors with weak memory ordering,
// so that the tags of every older instruction are up to date before a fence
// commits. It is off by default, as a single core does not need it; which
// instructions count as fences is this design's choice.
//
//   core_valid/core_tuple  tuple of the instruction the core wants to commit
//   core_stall             the tuple is not taken this cycle / core must wait
//   sync_done              one-cycle pulse: the held system call may commit
module sync_ctrl
  import dift_pkg::*;
#(
  parameter bit SYNC_FENCES = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  // main core
  input  logic   core_valid,
  input  tuple_t core_tuple,
  output logic   core_stall,
  input  logic   ext_irq_req,
  output logic   irq_grant,
  output logic   sync_done,
  // decoupling queue
  output logic   q_valid,
  input  logic   q_ready,
  output tuple_t q_data,
  input  logic   q_empty,
  // coprocessor
  input  logic   cp_idle
);
  logic sync_pending;
  logic drained;
  logic is_trap;
  logic is_fence;
  logic is_sync;
  logic [5:0] op3;

  assign op3       = core_tuple.instr[24:19];
  assign is_trap   = core_tuple.instr[31:30] == 2'b10 && op3 == 6'h3A;
  // STBAR is RDY with rs1 = 15 and rd = 0; atomics are LDSTUB(A) and SWAP(A)
  assign is_fence  = (core_tuple.instr[31:30] == 2'b10 && op3 == 6'h28 &&
                      core_tuple.instr[18:14] == 5'd15 && core_tuple.instr[29:25] == 5'd0) ||
                     (core_tuple.instr[31:30] == 2'b11 &&
                      op3 inside {6'h0D, 6'h0F, 6'h1D, 6'h1F});
  assign is_sync   = is_trap || (SYNC_FENCES && is_fence);
  assign drained   = q_empty && cp_idle;
  assign q_valid   = core_valid && !sync_pending && !ext_irq_req;
  assign q_data    = core_tuple;
  assign core_stall = sync_pending || (ext_irq_req && !drained) || (core_valid && !q_ready);
  assign irq_grant = ext_irq_req && !sync_pending && drained;
  assign sync_done = sync_pending && drained;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          sync_pending <= 1'b0;
    else if (q_valid && q_ready && is_sync) sync_pending <= 1'b1;
    else if (drained)                    sync_pending <= 1'b0;
  end
endmodule
