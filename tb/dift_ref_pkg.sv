// dift_ref_pkg: instruction encoders and an instruction-at-a-time reference
// model of the DIFT coprocessor, used by the testbenches.
//
// The model applies the same tag rules as the RTL, but sequentially, one
// tuple at a time, with no pipeline, no caches and its own decode: register
// tags in a flat windowed array, memory tags in an associative array of
// words. A testbench feeds it the same tuples as the design and compares
// register tags, memory tags, security exceptions and readback values.
package dift_ref_pkg;
  import dift_pkg::*;

  // ------------------------------------------------------------ encoders
  function automatic logic [31:0] enc_alu(logic [5:0] op3, logic [4:0] rd, logic [4:0] rs1,
                                          logic use_imm, logic [12:0] simm_or_rs2);
    return {2'b10, rd, op3, rs1, use_imm, use_imm ? simm_or_rs2 : {8'd0, simm_or_rs2[4:0]}};
  endfunction
  function automatic logic [31:0] enc_mem(logic [5:0] op3, logic [4:0] rd, logic [4:0] rs1,
                                          logic use_imm, logic [12:0] simm_or_rs2);
    return {2'b11, rd, op3, rs1, use_imm, use_imm ? simm_or_rs2 : {8'd0, simm_or_rs2[4:0]}};
  endfunction
  function automatic logic [31:0] enc_sethi(logic [4:0] rd, logic [21:0] imm);
    return {2'b00, rd, 3'b100, imm};
  endfunction
  function automatic logic [31:0] enc_bicc(logic [3:0] cond, logic [21:0] disp);
    return {2'b00, 1'b0, cond, 3'b010, disp};
  endfunction
  function automatic logic [31:0] enc_call(logic [29:0] disp);
    return {2'b01, disp};
  endfunction
  function automatic logic [31:0] enc_ticc(logic [6:0] trapno);
    return {2'b10, 1'b0, 4'b1000, 6'h3A, 5'd0, 1'b1, 6'd0, trapno};
  endfunction
  function automatic logic [31:0] enc_cp(cp_op_e op, logic [4:0] rd, logic [4:0] rs1, tag_t imm);
    return {2'b10, rd, 6'h36, rs1, op, imm, 5'd0};
  endfunction
  localparam logic [31:0] NOP = 32'h0100_0000;   // sethi 0, %g0


  // ------------------------------------------------------------ stimulus
  // Random committed-instruction stream. Code runs sequentially through
  // NREG regions of 1 KB (a jump to another region makes the L0 buffer
  // miss); data addresses fall in a DSPAN-byte window, larger than the tag
  // cache covers, so lines are also evicted and written back.
  class prog_gen;
    logic [31:0] pc = 32'h1000_0000;
    int unsigned dspan = 16384;
    int unsigned nreg  = 16;
    int unsigned w_cp  = 20;      // weight of coprocessor instructions (of 100)
    bit          traps = 0;       // allow Ticc

    function automatic logic [4:0] r();
      return 5'($urandom_range(31, 0));
    endfunction

    function automatic tuple_t next();
      tuple_t t;
      int unsigned k = $urandom_range(99, 0);
      logic [5:0]  alu_ops [12] = '{6'h00, 6'h01, 6'h02, 6'h03, 6'h04, 6'h05,
                                    6'h07, 6'h10, 6'h12, 6'h25, 6'h26, 6'h0A};
      logic [5:0]  ld_ops [5] = '{6'h00, 6'h01, 6'h02, 6'h09, 6'h0D};
      logic [5:0]  st_ops [3] = '{6'h04, 6'h05, 6'h06};
      if ($urandom_range(19, 0) == 0)
        pc = 32'h1000_0000 + 32'($urandom_range(nreg - 1, 0)) * 32'h400
             + 32'($urandom_range(63, 0)) * 4;
      t.pc   = pc;
      t.addr = 32'h0002_0000 + 32'($urandom_range(dspan / 4 - 1, 0)) * 4;
      if (k < w_cp) begin
        int unsigned j = $urandom_range(99, 0);
        if      (j < 35) t.instr = enc_cp(CP_SET_RTAG, r(), 5'd0, tag_t'($urandom));
        else if (j < 55) t.instr = enc_cp(CP_SET_MTAG, 5'd0, 5'd0, tag_t'($urandom));
        else if (j < 70) t.instr = enc_cp(CP_RD_RTAG, 5'd0, r(), 4'd0);
        else if (j < 82) t.instr = enc_cp(CP_RD_MTAG, 5'd0, 5'd0, 4'd0);
        else if (j < 88) t.instr = enc_cp(CP_RD_EXC, 5'd0, 5'd0, 4'd0);
        else             t.instr = enc_cp(CP_CLR_EXC, 5'd0, 5'd0, 4'd0);
      end else begin
        k = $urandom_range(99, 0);
        if      (k < 40) t.instr = enc_alu(alu_ops[$urandom_range(11, 0)], r(), r(),
                                           1'($urandom), 13'($urandom));
        else if (k < 45) t.instr = enc_sethi(r(), 22'($urandom));
        else if (k < 62) t.instr = enc_mem(ld_ops[$urandom_range(4, 0)], r(), r(),
                                           1'($urandom), 13'($urandom));
        else if (k < 79) t.instr = enc_mem(st_ops[$urandom_range(2, 0)], r(), r(),
                                           1'($urandom), 13'($urandom));
        else if (k < 83) t.instr = enc_alu(6'h38, r(), r(), 1'($urandom), 13'($urandom));
        else if (k < 87) t.instr = enc_call(30'($urandom));
        else if (k < 91) t.instr = enc_bicc(4'($urandom), 22'($urandom));
        else if (k < 94) t.instr = enc_alu(6'h3C, r(), r(), 1'b1, 13'h1FA0);
        else if (k < 97) t.instr = enc_alu(6'h3D, r(), r(), 1'b0, 13'd0);
        else if (traps)  t.instr = enc_ticc(7'h10);
        else             t.instr = NOP;
      end
      pc = pc + 4;
      return t;
    endfunction
  endclass

  // A useful default policy set: bit 0 is taint, propagated by OR through
  // arithmetic, logic, loads and stores and checked on load/store/jump
  // addresses; bit 1 is propagated by AND, bit 2 by XOR; bit 3 marks code
  // that must not execute (instruction tag check on every class).
  function automatic logic [31:0] default_tpr(int p);
    logic [31:0] v = '0;
    case (p)
      0: v = 32'h0003_0145;       // ARITH, LOGIC, LOAD, STORE = OR; address merge
      1: v = 32'h0000_028A;       // AND
      2: v = 32'h0000_03CF;       // XOR
      default: v = '0;
    endcase
    return v;
  endfunction
  function automatic logic [31:0] default_tcr(int p);
    logic [31:0] v = '0;
    case (p)
      0: v = (32'd1 << (3*3+1)) | (32'd1 << (3*4+1)) | (32'd1 << (3*5+1));
      3: v = 32'h0092_4924;       // instruction tag check for all 8 classes
      default: v = '0;
    endcase
    return v;
  endfunction

  // ------------------------------------------------------------ model
  class dift_ref;
    tag_t           rt [NPHYS];
    tag_t           mt [logic [29:0]];
    logic [31:0]    tpr [NPOL];
    logic [31:0]    tcr [NPOL];
    int unsigned    cwp;
    bit             exc;
    logic [31:0]    exc_pc;
    tag_t           exc_bits;
    logic [31:0]    rb_q [$];      // expected readback values, in order
    int unsigned    n_exc;          // failures detected (including while one is pending)

    function new();
      foreach (rt[i]) rt[i] = '0;
      foreach (tpr[i]) begin tpr[i] = '0; tcr[i] = '0; end
      cwp = 0; exc = 0; exc_pc = '0; exc_bits = '0; n_exc = 0;
    endfunction

    function automatic int unsigned pidx(int unsigned w, int unsigned r);
      if (r == 0) return 0;
      if (r < 8) return r;
      return 8 + ((w * 16 + r - 8) % (16 * NWINDOWS));
    endfunction

    function automatic tag_t mget(logic [31:0] a);
      if (mt.exists(a[31:2])) return mt[a[31:2]];
      return '0;
    endfunction

    function automatic tag_t combine(tag_t a, tag_t b, int unsigned cls);
      tag_t y;
      for (int p = 0; p < NPOL; p++) begin
        case (tpr[p][2*cls +: 2])
          2'd0: y[p] = 1'b0;
          2'd1: y[p] = a[p] | b[p];
          2'd2: y[p] = a[p] & b[p];
          default: y[p] = a[p] ^ b[p];
        endcase
      end
      return y;
    endfunction

    function automatic void step(tuple_t t);
      logic [1:0]  op  = t.instr[31:30];
      logic [5:0]  op3 = t.instr[24:19];
      logic [4:0]  rd  = t.instr[29:25];
      logic [4:0]  rs1 = t.instr[18:14];
      logic [4:0]  rs2 = t.instr[4:0];
      bit          im  = t.instr[13];
      tag_t        a, b, c, res, src, adr, itag, fb;
      int unsigned cls = 7;
      bit          wr = 0, cp = 0, ld = 0, st = 0;
      int unsigned ncwp = cwp;
      int unsigned wrd = rd;
      cp_op_e      cop = CP_NOP;
      tag_t        imm4 = t.instr[8:5];

      a = rt[pidx(cwp, rs1)];
      b = im ? 4'd0 : rt[pidx(cwp, rs2)];
      c = rt[pidx(cwp, rd)];
      itag = mget(t.pc);
      res = '0; src = '0; adr = '0;

      if (op == 2'b01) begin cls = 6; wr = 1; wrd = 15; end
      else if (op == 2'b00) begin
        if (t.instr[24:22] == 3'b100) begin cls = 2; wr = 1; end
        else if (t.instr[24:22] inside {3'b010, 3'b110, 3'b111}) cls = 6;
      end else if (op == 2'b10) begin
        if (op3 < 6'h28) begin
          wr = 1;
          cls = (op3 inside {6'h01,6'h02,6'h03,6'h05,6'h06,6'h07,
                             6'h11,6'h12,6'h13,6'h15,6'h16,6'h17,
                             6'h25,6'h26,6'h27}) ? 1 : 0;
        end else if (op3 inside {[6'h28:6'h2B]}) wr = 1;
        else if (op3 == 6'h38) begin cls = 5; wr = 1; end
        else if (op3 == 6'h39) begin cls = 5; ncwp = (cwp + 1) % NWINDOWS; end
        else if (op3 == 6'h3A) ncwp = (cwp + NWINDOWS - 1) % NWINDOWS;
        else if (op3 == 6'h3C) begin cls = 0; wr = 1; ncwp = (cwp + NWINDOWS - 1) % NWINDOWS; end
        else if (op3 == 6'h3D) begin cls = 0; wr = 1; ncwp = (cwp + 1) % NWINDOWS; end
        else if (op3 == 6'h36) begin
          cp = 1;
          cop = cp_op_e'(t.instr[13:9]);
        end
      end else begin
        if (op3[2] && !op3[3]) begin cls = 4; st = 1; if (op3[5]) c = '0; end
        else begin cls = 3; ld = 1; wr = !op3[5]; end
      end
      if (rd == 0) c = '0;

      if (cp) begin
        case (cop)
          CP_WR_TPR:   tpr[rd[1:0]] = t.addr;
          CP_WR_TCR:   tcr[rd[1:0]] = t.addr;
          CP_SET_RTAG: begin wr = 1; res = imm4; end
          CP_RD_RTAG:  rb_q.push_back(32'(a));
          CP_SET_MTAG: if (itag == 0) mt[t.addr[31:2]] = imm4;
          CP_RD_MTAG:  rb_q.push_back(32'(mget(t.addr)));
          CP_RD_EXC:   rb_q.push_back(exc_pc);
          CP_CLR_EXC:  begin exc = 0; exc_bits = '0; end
          CP_WR_CWP:   ncwp = t.addr[CWP_W-1:0];
          default: ;
        endcase
      end else begin
        logic [3:0] amask;
        for (int p = 0; p < NPOL; p++) amask[p] = ld ? tpr[p][16] : tpr[p][17];
        if (ld) begin
          src = mget(t.addr); adr = a | b;
          res = combine(src, adr & amask, cls);
        end else if (st) begin
          src = c; adr = a | b;
          if (itag == 0) mt[t.addr[31:2]] = combine(c, adr & amask, cls);
        end else if (cls == 0 || cls == 1) begin
          src = a | b;
          res = combine(a, b, cls);
        end else if (cls == 5) begin
          adr = a | b;
        end
        for (int p = 0; p < NPOL; p++)
          fb[p] = (src[p] & tcr[p][3*cls]) | (adr[p] & tcr[p][3*cls+1]) | (itag[p] & tcr[p][3*cls+2]);
        if (fb != 0) begin
          n_exc++;
          if (!exc) begin exc = 1; exc_pc = t.pc; exc_bits = fb; end
        end
      end
      if (wr && wrd != 0) rt[pidx(ncwp, wrd)] = res;
      cwp = ncwp;
    endfunction
  endclass
endpackage
