// dift_coprocessor: the DIFT coprocessor's four-stage tag pipeline.
//
// Takes committed instruction tuples (PC, instruction word, memory address)
// from the decoupling queue and, for each, propagates and checks 4-bit tags
// without knowing any data value:
//
//   IR  input register, loaded from the queue.
//   D   security decode: primitive operation class, registers, rules from the
//       policy registers; tag register file read (rs1, rs2, store data).
//       Register window changes and policy register writes take effect here.
//   P   propagate: operand forwarding from C and W, the tag ALU, and the
//       single port of the unified tag cache. The instruction tag comes from
//       the L0 buffer; for a load or store the cache port serves the memory
//       tag. When the L0 buffer misses, the cache port first fetches the
//       instruction tag (and refills L0). For a non-memory instruction this
//       costs nothing; for a load or store it costs one extra cycle, the only
//       structural stall. A tag cache miss holds P (and D, IR) until the
//       line has been fetched. A store writes its tag only when its
//       instruction tag is zero.
//   C   tag check: a failing check latches a pending security exception
//       (faulting PC and policy bits) and raises sec_exc to the core as an
//       asynchronous interrupt until software clears it.
//   W   writeback of the destination register's tag.
//
// Forwarding from C and W to P means no dependent instruction ever waits;
// the stage that stalls (P) keeps re-capturing forwarded operands so none is
// lost while older instructions retire. One tuple is accepted per cycle.
//
// The stage order and work, OR/AND/XOR propagation, L0 plus unified cache
// and the stall rule follow the document. Where the instruction tag is first
// looked up (P rather than D), the coprocessor instruction set, the
// exception register and readback port, and the event outputs are this
// design's own.
module dift_coprocessor
  import dift_pkg::*;
#(
  parameter int unsigned     TCACHE_BYTES = 512,
  parameter int unsigned     LINE_BYTES   = 32,
  parameter logic [XLEN-1:0] TAG_BASE     = 32'hE000_0000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // instruction tuples from the decoupling queue
  input  logic                    in_valid,
  output logic                    in_ready,
  input  tuple_t                  in_tuple,
  output logic                    idle,       // no instruction in the pipeline
  // security exception to the main core
  output logic                    sec_exc,
  output logic [XLEN-1:0]         exc_pc,
  output tag_t                    exc_bits,
  // readback of coprocessor state (CP_RD_* instructions)
  output logic                    rb_valid,
  output logic [XLEN-1:0]         rb_data,
  // tag memory port (towards the L2 cache)
  output logic                    mem_req,
  output logic                    mem_we,
  output logic [XLEN-1:0]         mem_addr,
  output logic [LINE_BYTES*8-1:0] mem_wdata,
  input  logic                    mem_ack,
  input  logic [LINE_BYTES*8-1:0] mem_rdata,
  // events, one pulse per occurrence
  output logic                    ev_fwd,        // an operand was forwarded
  output logic                    ev_l0_stall,   // extra cycle: L0 miss on a load/store
  output logic                    ev_cache_stall,// P held by a tag cache miss
  output logic                    ev_tcache_miss // tag line fetched
);
  // ---------------------------------------------------------------- IR
  logic   ir_valid;
  tuple_t ir;
  logic   d_adv;

  assign in_ready = !ir_valid || d_adv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_valid <= 1'b0;
      ir       <= '0;
    end else if (in_ready) begin
      ir_valid <= in_valid;
      if (in_valid) ir <= in_tuple;
    end
  end

  // ---------------------------------------------------------------- D
  logic [NPOL-1:0][XLEN-1:0] tpr, tcr;
  dec_t              d_dec;
  rules_t            d_rules;
  logic [CWP_W-1:0]  cwp, cwp_next;
  logic [PHYS_W-1:0] d_pa, d_pb, d_pc, d_pd;
  tag_t              d_ta, d_tb, d_tc;

  security_decode u_dec (
    .instr (ir.instr),
    .tpr   (tpr),
    .tcr   (tcr),
    .dec   (d_dec),
    .rules (d_rules)
  );

  always_comb begin
    cwp_next = cwp;
    if (d_dec.cwp_dec) cwp_next = cwp - 1'b1;
    if (d_dec.cwp_inc) cwp_next = cwp + 1'b1;
    if (d_dec.is_cp && d_dec.cp_op == CP_WR_CWP) cwp_next = ir.addr[CWP_W-1:0];
  end

  // Sources use the current window, the destination the window after
  // SAVE/RESTORE (SPARC semantics).
  assign d_pa = d_dec.rs1_en   ? phys_idx(cwp, d_dec.rs1) : '0;
  assign d_pb = d_dec.rs2_en   ? phys_idx(cwp, d_dec.rs2) : '0;
  assign d_pc = d_dec.rd_rd_en ? phys_idx(cwp, d_dec.rd)  : '0;
  assign d_pd = d_dec.rd_en    ? phys_idx(cwp_next, d_dec.rd) : '0;

  policy_regs u_pol (
    .clk    (clk),
    .rst_n  (rst_n),
    .we_tpr (d_adv && d_dec.is_cp && d_dec.cp_op == CP_WR_TPR),
    .we_tcr (d_adv && d_dec.is_cp && d_dec.cp_op == CP_WR_TCR),
    .idx    (d_dec.rd[1:0]),
    .wdata  (ir.addr),
    .tpr    (tpr),
    .tcr    (tcr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cwp <= '0;
    else if (d_adv) cwp <= cwp_next;
  end

  // W stage write port (declared here, driven below)
  logic              w_we;
  logic [PHYS_W-1:0] w_pd;
  tag_t              w_tag;

  tag_reg_file u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .ra    (d_pa),
    .rb    (d_pb),
    .rc    (d_pc),
    .ta    (d_ta),
    .tb    (d_tb),
    .tc    (d_tc),
    .we    (w_we),
    .wa    (w_pd),
    .wd    (w_tag)
  );

  // ---------------------------------------------------------------- P
  typedef struct packed {
    logic              valid;
    logic [XLEN-1:0]   pc;
    logic [XLEN-1:0]   addr;
    dec_t              dec;
    rules_t            rules;
    logic [PHYS_W-1:0] pa, pb, pc_, pd;
    tag_t              ta, tb, tc;
    logic              itag_ok;   // instruction tag already fetched (after an L0 miss)
    tag_t              itag;
  } s1_t;

  typedef struct packed {
    logic              valid;
    logic [XLEN-1:0]   pc;
    dec_t              dec;
    rules_t            rules;
    logic [PHYS_W-1:0] pd;
    tag_t              result;
    tag_t              src_tag;
    tag_t              addr_tag;
    tag_t              itag;
    tag_t              rb_tag;
  } s2_t;

  typedef struct packed {
    logic              valid;
    logic              rd_en;
    logic [PHYS_W-1:0] pd;
    tag_t              result;
  } s3_t;

  s1_t s1;
  s2_t s2;
  s3_t s3;

  logic p_adv, p_done;

  assign d_adv = ir_valid && (!s1.valid || p_adv);

  // Forwarding: youngest older producer first (C, then W).
  function automatic tag_t fwd(input logic [PHYS_W-1:0] p, input tag_t cur);
    if (p == '0) return '0;
    if (s2.valid && s2.dec.rd_en && s2.pd == p) return s2.result;
    if (s3.valid && s3.rd_en && s3.pd == p) return s3.result;
    return cur;
  endfunction

  function automatic logic fwd_hit(input logic [PHYS_W-1:0] p);
    return p != '0 && ((s2.valid && s2.dec.rd_en && s2.pd == p) ||
                       (s3.valid && s3.rd_en && s3.pd == p));
  endfunction

  tag_t p_ta, p_tb, p_tc, p_addr_tag;
  assign p_ta = fwd(s1.pa, s1.ta);
  assign p_tb = fwd(s1.pb, s1.tb);
  assign p_tc = fwd(s1.pc_, s1.tc);
  assign p_addr_tag = p_ta | p_tb;

  // L0 buffer and tag cache
  logic                    l0_hit;
  tag_t                    l0_itag;
  logic                    c_req, c_we, c_ready, c_miss;
  logic [XLEN-1:0]         c_addr;
  tag_t                    c_wtag, c_rtag;
  logic [LINE_BYTES*8-1:0] c_line;
  logic                    mem_op, need_itag, st_ok;
  tag_t                    p_itag;

  l0_tag_buffer #(.LINE_BYTES(LINE_BYTES)) u_l0 (
    .clk        (clk),
    .rst_n      (rst_n),
    .pc         (s1.pc),
    .hit        (l0_hit),
    .itag       (l0_itag),
    .fill       (s1.valid && need_itag && c_ready),
    .fill_addr  (s1.pc),
    .fill_line  (c_line),
    .inval      (c_ready && c_we),
    .inval_addr (c_addr)
  );

  assign mem_op         = s1.dec.is_load || s1.dec.is_store;
  assign need_itag      = !s1.itag_ok && !l0_hit;
  assign p_itag         = s1.itag_ok ? s1.itag : (l0_hit ? l0_itag : c_rtag);
  // The document: the second stage updates the tag "on store instructions
  // (if the tag of the instruction is zero)".
  assign st_ok          = s1.dec.is_store && (p_itag == '0);

  assign c_req  = s1.valid && (need_itag || mem_op);
  assign c_addr = need_itag ? s1.pc : s1.addr;
  assign c_we   = !need_itag && st_ok;

  // ALU operand selection by class
  tag_t alu_a, alu_b, p_result, p_src_tag;
  always_comb begin
    alu_a     = '0;
    alu_b     = '0;
    p_src_tag = '0;
    if (s1.dec.is_load) begin
      alu_a     = c_rtag;                       // memory tag
      alu_b     = p_addr_tag & s1.rules.addr_prop;
      p_src_tag = c_rtag;
    end else if (s1.dec.is_store) begin
      alu_a     = p_tc;                         // store data register
      alu_b     = p_addr_tag & s1.rules.addr_prop;
      p_src_tag = p_tc;
    end else if (s1.dec.cls == CLS_ARITH || s1.dec.cls == CLS_LOGIC) begin
      alu_a     = p_ta;
      alu_b     = p_tb;
      p_src_tag = p_ta | p_tb;
    end
  end

  tag_t alu_y;
  tag_alu u_alu (.a(alu_a), .b(alu_b), .mode(s1.rules.mode), .y(alu_y));

  always_comb begin
    p_result = alu_y;
    if (s1.dec.is_cp && s1.dec.cp_op == CP_SET_RTAG) p_result = s1.dec.cp_imm;
  end

  assign c_wtag = (s1.dec.is_cp && s1.dec.cp_op == CP_SET_MTAG) ? s1.dec.cp_imm : alu_y;

  tag_cache #(
    .SIZE_BYTES (TCACHE_BYTES),
    .LINE_BYTES (LINE_BYTES),
    .TAG_BASE   (TAG_BASE)
  ) u_tc (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (c_req),
    .we        (c_we),
    .addr      (c_addr),
    .wtag      (c_wtag),
    .ready     (c_ready),
    .rtag      (c_rtag),
    .rline     (c_line),
    .miss      (c_miss),
    .mem_req   (mem_req),
    .mem_we    (mem_we),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata),
    .mem_ack   (mem_ack),
    .mem_rdata (mem_rdata)
  );

  // P completes when it needs the cache port for at most one access and that
  // access hits, or needs no cache access at all.
  assign p_done = !c_req || (c_ready && !(need_itag && mem_op));
  assign p_adv  = s1.valid && p_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
    end else if (d_adv) begin
      s1.valid   <= 1'b1;
      s1.pc      <= ir.pc;
      s1.addr    <= ir.addr;
      s1.dec     <= d_dec;
      s1.rules   <= d_rules;
      s1.pa      <= d_pa;
      s1.pb      <= d_pb;
      s1.pc_     <= d_pc;
      s1.pd      <= d_pd;
      s1.ta      <= d_ta;
      s1.tb      <= d_tb;
      s1.tc      <= d_tc;
      s1.itag_ok <= 1'b0;
      s1.itag    <= '0;
    end else if (p_adv) begin
      s1.valid   <= 1'b0;
    end else if (s1.valid) begin
      // held in P: keep forwarded operands, remember a fetched instruction tag
      s1.ta <= p_ta;
      s1.tb <= p_tb;
      s1.tc <= p_tc;
      if (need_itag && c_ready) begin
        s1.itag_ok <= 1'b1;
        s1.itag    <= c_rtag;
      end
    end
  end

  // ---------------------------------------------------------------- C
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2 <= '0;
    end else begin
      s2.valid <= p_adv;
      if (p_adv) begin
        s2.pc       <= s1.pc;
        s2.dec      <= s1.dec;
        s2.rules    <= s1.rules;
        s2.pd       <= s1.pd;
        s2.result   <= p_result;
        s2.src_tag  <= p_src_tag;
        s2.addr_tag <= (s1.dec.is_load || s1.dec.is_store || s1.dec.cls == CLS_JUMP)
                       ? p_addr_tag : '0;
        s2.itag     <= p_itag;
        s2.rb_tag   <= (s1.dec.cp_op == CP_RD_MTAG) ? c_rtag : p_ta;
      end
    end
  end

  logic c_fail;
  tag_t c_fail_bits;

  tag_check u_chk (
    .valid     (s2.valid),
    .src_tag   (s2.src_tag),
    .addr_tag  (s2.addr_tag),
    .instr_tag (s2.itag),
    .chk_src   (s2.rules.chk_src),
    .chk_addr  (s2.rules.chk_addr),
    .chk_instr (s2.rules.chk_instr),
    .fail      (c_fail),
    .fail_bits (c_fail_bits)
  );

  logic c_clr;
  assign c_clr = s2.valid && s2.dec.is_cp && s2.dec.cp_op == CP_CLR_EXC;

  // The first failure is kept until software clears it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sec_exc  <= 1'b0;
      exc_pc   <= '0;
      exc_bits <= '0;
    end else if (c_clr) begin
      sec_exc  <= 1'b0;
      exc_bits <= '0;
    end else if (c_fail && !sec_exc) begin
      sec_exc  <= 1'b1;
      exc_pc   <= s2.pc;
      exc_bits <= c_fail_bits;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb_valid <= 1'b0;
      rb_data  <= '0;
    end else begin
      rb_valid <= 1'b0;
      if (s2.valid && s2.dec.is_cp) begin
        unique case (s2.dec.cp_op)
          CP_RD_RTAG, CP_RD_MTAG: begin
            rb_valid <= 1'b1;
            rb_data  <= XLEN'(s2.rb_tag);
          end
          CP_RD_EXC: begin
            rb_valid <= 1'b1;
            rb_data  <= exc_pc;
          end
          default: ;
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- W
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3 <= '0;
    end else begin
      s3.valid  <= s2.valid;
      s3.rd_en  <= s2.valid && s2.dec.rd_en;
      s3.pd     <= s2.pd;
      s3.result <= s2.result;
    end
  end

  assign w_we  = s3.valid && s3.rd_en;
  assign w_pd  = s3.pd;
  assign w_tag = s3.result;

  assign idle = !ir_valid && !s1.valid && !s2.valid && !s3.valid;

  // ---------------------------------------------------------------- events
  assign ev_fwd         = p_adv && (fwd_hit(s1.pa) || fwd_hit(s1.pb) || fwd_hit(s1.pc_));
  assign ev_l0_stall    = s1.valid && need_itag && mem_op && c_ready;
  assign ev_cache_stall = c_req && !c_ready;
  assign ev_tcache_miss = c_miss;
endmodule
