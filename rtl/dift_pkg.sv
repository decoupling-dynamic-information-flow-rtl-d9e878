// dift_pkg: types and constants shared by the DIFT coprocessor blocks.
//
// A tag is 4 bits, one bit per security policy, attached to every 32-bit
// register and memory word. The main core sends the coprocessor one
// instruction tuple (PC, instruction encoding, memory address, valid) per
// committed instruction, in program order. Instructions are decoded into a
// small set of primitive operation classes; the propagation and check rules
// of each policy are given per class by a pair of policy registers.
//
// The tuple fields, the 4-bit tags and four policies follow the document. The
// class list, the policy register bit layout and the coprocessor instruction
// encoding are this design's own choices (the document models them on an
// earlier architecture without printing them).
package dift_pkg;

  localparam int unsigned NPOL     = 4;   // security policies = tag bits
  localparam int unsigned TAG_W    = 4;
  localparam int unsigned XLEN     = 32;
  localparam int unsigned NWINDOWS = 8;   // SPARC V8 register windows (Leon default)

  typedef logic [TAG_W-1:0] tag_t;

  // Instruction tuple passed from the main core (Fig. 2).
  typedef struct packed {
    logic [XLEN-1:0] pc;
    logic [XLEN-1:0] instr;
    logic [XLEN-1:0] addr;   // memory address of loads/stores; operand of coprocessor ops
  } tuple_t;

  // Primitive operation classes.
  typedef enum logic [2:0] {
    CLS_ARITH  = 3'd0,  // add, sub, mul, div, save, restore
    CLS_LOGIC  = 3'd1,  // and, or, xor, shifts
    CLS_MOVE   = 3'd2,  // sethi (immediate move)
    CLS_LOAD   = 3'd3,
    CLS_STORE  = 3'd4,
    CLS_JUMP   = 3'd5,  // register-indirect control transfer: jmpl, rett
    CLS_BRANCH = 3'd6,  // pc-relative control transfer: bicc, fbfcc, call
    CLS_OTHER  = 3'd7   // traps, state register access, coprocessor ops
  } op_class_e;

  // Propagation mode of one tag bit for one class (2 bits).
  typedef enum logic [1:0] {
    PROP_CLEAR = 2'd0,  // destination tag bit cleared
    PROP_OR    = 2'd1,
    PROP_AND   = 2'd2,
    PROP_XOR   = 2'd3
  } prop_mode_e;

  // Propagation policy register (TPR) layout, one per policy:
  //   [2c+1:2c]  propagation mode of class c (c = 0..7)
  //   [16]       loads also merge the address register tags into the result
  //   [17]       stores also merge the address register tags into the stored tag
  localparam int unsigned TPR_LD_ADDR = 16;
  localparam int unsigned TPR_ST_ADDR = 17;

  // Check policy register (TCR) layout, one per policy:
  //   [3c+0]  check source operand tags of class c
  //   [3c+1]  check address/pointer operand tags of class c (loads, stores, jumps)
  //   [3c+2]  check the instruction's own memory tag (code injection)

  // Coprocessor instructions (SPARC CPop1: op=2, op3=0x36). The 9-bit opc
  // field holds the operation in [8:4] and a 4-bit immediate tag in [3:0].
  localparam logic [5:0] OP3_CPOP1 = 6'h36;
  typedef enum logic [4:0] {
    CP_NOP      = 5'd0,
    CP_WR_TPR   = 5'd1,  // TPR[rd[1:0]] <= tuple.addr
    CP_WR_TCR   = 5'd2,  // TCR[rd[1:0]] <= tuple.addr
    CP_SET_RTAG = 5'd3,  // tag(rd) <= imm
    CP_RD_RTAG  = 5'd4,  // readback <= tag(rs1)
    CP_SET_MTAG = 5'd5,  // mem tag(tuple.addr) <= imm
    CP_RD_MTAG  = 5'd6,  // readback <= mem tag(tuple.addr)
    CP_RD_EXC   = 5'd7,  // readback <= faulting PC
    CP_CLR_EXC  = 5'd8,  // clear pending security exception
    CP_WR_CWP   = 5'd9   // window pointer <= tuple.addr[2:0]
  } cp_op_e;

  // Decoded instruction, output of the security decode stage.
  typedef struct packed {
    op_class_e       cls;
    logic            rs1_en;    // reads rs1
    logic            rs2_en;    // reads rs2 (0 when the immediate form is used)
    logic            rd_rd_en;  // reads rd (store data)
    logic            rd_en;     // writes rd
    logic [4:0]      rs1;
    logic [4:0]      rs2;
    logic [4:0]      rd;
    logic            is_load;
    logic            is_store;
    logic            is_trap;   // Ticc: system call / software trap
    logic            cwp_dec;   // save, Ticc
    logic            cwp_inc;   // restore, rett
    logic            is_cp;     // coprocessor instruction
    cp_op_e          cp_op;
    tag_t            cp_imm;
  } dec_t;

  // Per-instruction rules selected from the policy registers.
  typedef struct packed {
    logic [NPOL-1:0][1:0] mode;      // propagation mode per tag bit
    logic [NPOL-1:0]      addr_prop; // merge address tags (loads/stores)
    logic [NPOL-1:0]      chk_src;
    logic [NPOL-1:0]      chk_addr;
    logic [NPOL-1:0]      chk_instr;
  } rules_t;

  // Physical index of a SPARC register in a windowed file of NWINDOWS
  // windows: globals r0..r7 at 0..7, then 16 entries per window. The ins of
  // window w are the outs of window w+1, so SAVE (cwp-1) maps the caller's
  // outs onto the callee's ins.
  localparam int unsigned NPHYS  = 8 + 16 * NWINDOWS;
  localparam int unsigned PHYS_W = $clog2(NPHYS);
  localparam int unsigned CWP_W  = $clog2(NWINDOWS);

  function automatic logic [PHYS_W-1:0] phys_idx(input logic [CWP_W-1:0] cwp,
                                                 input logic [4:0] r);
    int unsigned off;
    if (r < 5'd8) return PHYS_W'(r);
    off = (int'(cwp) * 16 + int'(r) - 8) % (16 * NWINDOWS);
    return PHYS_W'(8 + off);
  endfunction

endpackage
