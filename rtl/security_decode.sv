// security_decode: first-stage decode of the DIFT coprocessor.
//
// Breaks a SPARC V8 instruction word into a primitive operation class, the
// registers it reads and writes, and its side effects on the register window
// pointer, and selects from the four policy register pairs the propagation
// mode and check enables that apply to that class. Decoding into primitive
// operations so that policies do not depend on the instruction set follows
// the document; the class list and which SPARC instructions map to which
// class are this design's own.
//
// Mapping summary (op = instr[31:30]):
//   op=01 CALL                 BRANCH, writes %o7 (tag cleared)
//   op=00 SETHI                MOVE, writes rd; Bicc/FBfcc/CBccc BRANCH
//   op=10 ALU                  ARITH / LOGIC (and, or, xor, andn, orn, xnor, shifts)
//         SAVE/RESTORE         ARITH, window pointer -1 / +1
//         JMPL, RETT           JUMP (RETT: window pointer +1)
//         Ticc                 OTHER, trap (system call), window pointer -1
//         CPop1                coprocessor instruction (rules forced to zero)
//         RD/WR state, FPop    OTHER
//   op=11 loads / stores       LOAD / STORE; floating-point and coprocessor
//                              registers have no tags, so their data tag is 0
// Writes to %g0 are dropped. LDSTUB and SWAP are handled as loads.
// Purely combinational.
module security_decode
  import dift_pkg::*;
(
  input  logic [XLEN-1:0]            instr,
  input  logic [NPOL-1:0][XLEN-1:0]  tpr,
  input  logic [NPOL-1:0][XLEN-1:0]  tcr,
  output dec_t                       dec,
  output rules_t                     rules
);
  logic [1:0] op;
  logic [2:0] op2;
  logic [5:0] op3;
  logic       imm;

  assign op  = instr[31:30];
  assign op2 = instr[24:22];
  assign op3 = instr[24:19];
  assign imm = instr[13];

  always_comb begin
    dec          = '0;
    dec.cls      = CLS_OTHER;
    dec.rs1      = instr[18:14];
    dec.rs2      = instr[4:0];
    dec.rd       = instr[29:25];
    dec.cp_op    = CP_NOP;
    dec.cp_imm   = instr[8:5];

    unique case (op)
      2'b01: begin                                   // CALL
        dec.cls   = CLS_BRANCH;
        dec.rd    = 5'd15;
        dec.rd_en = 1'b1;
      end
      2'b00: begin
        if (op2 == 3'b100) begin                     // SETHI
          dec.cls   = CLS_MOVE;
          dec.rd_en = 1'b1;
        end else if (op2 == 3'b010 || op2 == 3'b110 || op2 == 3'b111) begin
          dec.cls   = CLS_BRANCH;                    // Bicc, FBfcc, CBccc
        end else begin
          dec.cls   = CLS_OTHER;                     // UNIMP
        end
      end
      2'b10: begin
        if (op3 < 6'h28) begin                       // integer ALU group
          dec.rs1_en = 1'b1;
          dec.rs2_en = !imm;
          dec.rd_en  = 1'b1;
          if ((op3 < 6'h20 && (op3[2:0] inside {3'd1, 3'd2, 3'd3, 3'd5, 3'd6, 3'd7}) && !op3[3])
              || op3 inside {6'h25, 6'h26, 6'h27})
            dec.cls = CLS_LOGIC;
          else
            dec.cls = CLS_ARITH;
        end else begin
          unique case (op3)
            6'h28, 6'h29, 6'h2A, 6'h2B: begin        // RDY/RDPSR/RDWIM/RDTBR
              dec.cls   = CLS_OTHER;
              dec.rd_en = 1'b1;
            end
            6'h38: begin                             // JMPL
              dec.cls    = CLS_JUMP;
              dec.rs1_en = 1'b1;
              dec.rs2_en = !imm;
              dec.rd_en  = 1'b1;
            end
            6'h39: begin                             // RETT
              dec.cls     = CLS_JUMP;
              dec.rs1_en  = 1'b1;
              dec.rs2_en  = !imm;
              dec.cwp_inc = 1'b1;
            end
            6'h3A: begin                             // Ticc
              dec.cls     = CLS_OTHER;
              dec.is_trap = 1'b1;
              dec.cwp_dec = 1'b1;
            end
            6'h3C, 6'h3D: begin                      // SAVE, RESTORE
              dec.cls     = CLS_ARITH;
              dec.rs1_en  = 1'b1;
              dec.rs2_en  = !imm;
              dec.rd_en   = 1'b1;
              dec.cwp_dec = (op3 == 6'h3C);
              dec.cwp_inc = (op3 == 6'h3D);
            end
            OP3_CPOP1: begin
              dec.cls   = CLS_OTHER;
              dec.is_cp = 1'b1;
              dec.cp_op = cp_op_e'(instr[13:9]);
              unique case (cp_op_e'(instr[13:9]))
                CP_SET_RTAG: dec.rd_en    = 1'b1;
                CP_RD_RTAG:  dec.rs1_en   = 1'b1;
                CP_SET_MTAG: dec.is_store = 1'b1;
                CP_RD_MTAG:  dec.is_load  = 1'b1;
                default: ;
              endcase
            end
            default: dec.cls = CLS_OTHER;            // WR state, FPop, CPop2, FLUSH
          endcase
        end
      end
      2'b11: begin                                   // memory
        dec.rs1_en = 1'b1;
        dec.rs2_en = !imm;
        if (op3[2] && !op3[3]) begin                 // stores
          dec.cls      = CLS_STORE;
          dec.is_store = 1'b1;
          dec.rd_rd_en = !op3[5];                    // integer register data only
        end else begin
          dec.cls      = CLS_LOAD;
          dec.is_load  = 1'b1;
          dec.rd_en    = !op3[5];
        end
      end
      default: ;
    endcase

    if (dec.rd == 5'd0) dec.rd_en = 1'b0;            // %g0 is never written
    if (dec.rs1 == 5'd0) dec.rs1_en = 1'b0;          // %g0 tag is always 0
    if (dec.rs2 == 5'd0) dec.rs2_en = 1'b0;
    if (dec.rd == 5'd0) dec.rd_rd_en = 1'b0;
  end

  // Rule selection for the decoded class.
  always_comb begin
    rules = '0;
    for (int p = 0; p < NPOL; p++) begin
      rules.mode[p]      = tpr[p][2*int'(dec.cls) +: 2];
      rules.addr_prop[p] = dec.is_load ? tpr[p][TPR_LD_ADDR] : tpr[p][TPR_ST_ADDR];
      rules.chk_src[p]   = tcr[p][3*int'(dec.cls) + 0];
      rules.chk_addr[p]  = tcr[p][3*int'(dec.cls) + 1];
      rules.chk_instr[p] = tcr[p][3*int'(dec.cls) + 2];
    end
    if (dec.is_cp) rules = '0;                       // coprocessor ops are neither checked nor propagated
  end
endmodule
