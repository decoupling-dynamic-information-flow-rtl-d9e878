// tb_security_decode: directed decode of representative SPARC V8
// instructions (class, operands, side effects) and random checks that the
// rules are the fields of the class selected from the policy registers.
module tb_security_decode;
  import dift_pkg::*;
  import dift_ref_pkg::*;
  logic [31:0] instr;
  logic [NPOL-1:0][31:0] tpr, tcr;
  dec_t dec;
  rules_t rules;
  int checks = 0, failures = 0;

  security_decode dut (.*);

  task automatic expect_dec(logic [31:0] i, op_class_e c, bit r1, bit r2, bit rdr, bit w,
                            bit ld, bit st, bit cd, bit ci, bit trap, string name);
    instr = i;
    #1;
    checks++;
    if (dec.cls != c || dec.rs1_en != r1 || dec.rs2_en != r2 || dec.rd_rd_en != rdr ||
        dec.rd_en != w || dec.is_load != ld || dec.is_store != st || dec.cwp_dec != cd ||
        dec.cwp_inc != ci || dec.is_trap != trap) begin
      failures++;
      $display("FAIL: %s: cls=%0d rs1=%b rs2=%b rdr=%b rd=%b ld=%b st=%b dec=%b inc=%b trap=%b",
               name, dec.cls, dec.rs1_en, dec.rs2_en, dec.rd_rd_en, dec.rd_en, dec.is_load,
               dec.is_store, dec.cwp_dec, dec.cwp_inc, dec.is_trap);
    end
  endtask

  initial begin
    tpr = '0; tcr = '0;
    //                                                          cls         r1 r2 rdr w ld st cd ci tr
    expect_dec(enc_alu(6'h00, 5'd3, 5'd1, 1'b0, 13'd2),   CLS_ARITH,  1, 1, 0, 1, 0, 0, 0, 0, 0, "add reg");
    expect_dec(enc_alu(6'h00, 5'd3, 5'd1, 1'b1, 13'd5),   CLS_ARITH,  1, 0, 0, 1, 0, 0, 0, 0, 0, "add imm");
    expect_dec(enc_alu(6'h03, 5'd3, 5'd1, 1'b0, 13'd2),   CLS_LOGIC,  1, 1, 0, 1, 0, 0, 0, 0, 0, "xor");
    expect_dec(enc_alu(6'h12, 5'd3, 5'd1, 1'b0, 13'd2),   CLS_LOGIC,  1, 1, 0, 1, 0, 0, 0, 0, 0, "orcc");
    expect_dec(enc_alu(6'h25, 5'd3, 5'd1, 1'b1, 13'd2),   CLS_LOGIC,  1, 0, 0, 1, 0, 0, 0, 0, 0, "sll");
    expect_dec(enc_alu(6'h0A, 5'd3, 5'd1, 1'b0, 13'd2),   CLS_ARITH,  1, 1, 0, 1, 0, 0, 0, 0, 0, "umul");
    expect_dec(enc_alu(6'h14, 5'd0, 5'd1, 1'b0, 13'd2),   CLS_ARITH,  1, 1, 0, 0, 0, 0, 0, 0, 0, "subcc to g0");
    expect_dec(enc_sethi(5'd4, 22'h1234),                  CLS_MOVE,   0, 0, 0, 1, 0, 0, 0, 0, 0, "sethi");
    expect_dec(NOP,                                        CLS_MOVE,   0, 0, 0, 0, 0, 0, 0, 0, 0, "nop");
    expect_dec(enc_bicc(4'd8, 22'd4),                      CLS_BRANCH, 0, 0, 0, 0, 0, 0, 0, 0, 0, "ba");
    expect_dec(enc_call(30'd100),                          CLS_BRANCH, 0, 0, 0, 1, 0, 0, 0, 0, 0, "call");
    expect_dec(enc_alu(6'h38, 5'd15, 5'd9, 1'b1, 13'd8),  CLS_JUMP,   1, 0, 0, 1, 0, 0, 0, 0, 0, "jmpl");
    expect_dec(enc_alu(6'h39, 5'd0, 5'd17, 1'b1, 13'd0),  CLS_JUMP,   1, 0, 0, 0, 0, 0, 0, 1, 0, "rett");
    expect_dec(enc_ticc(7'h10),                            CLS_OTHER,  0, 0, 0, 0, 0, 0, 1, 0, 1, "ta 0x10");
    expect_dec(enc_alu(6'h3C, 5'd14, 5'd14, 1'b1, 13'h1FA0), CLS_ARITH, 1, 0, 0, 1, 0, 0, 1, 0, 0, "save");
    expect_dec(enc_alu(6'h3D, 5'd0, 5'd0, 1'b0, 13'd0),   CLS_ARITH,  0, 0, 0, 0, 0, 0, 0, 1, 0, "restore");
    expect_dec(enc_alu(6'h28, 5'd5, 5'd0, 1'b0, 13'd0),   CLS_OTHER,  0, 0, 0, 1, 0, 0, 0, 0, 0, "rd y");
    expect_dec(enc_mem(6'h00, 5'd5, 5'd1, 1'b1, 13'd4),   CLS_LOAD,   1, 0, 0, 1, 1, 0, 0, 0, 0, "ld");
    expect_dec(enc_mem(6'h01, 5'd5, 5'd1, 1'b0, 13'd2),   CLS_LOAD,   1, 1, 0, 1, 1, 0, 0, 0, 0, "ldub");
    expect_dec(enc_mem(6'h20, 5'd5, 5'd1, 1'b0, 13'd2),   CLS_LOAD,   1, 1, 0, 0, 1, 0, 0, 0, 0, "ldf");
    expect_dec(enc_mem(6'h04, 5'd5, 5'd1, 1'b0, 13'd2),   CLS_STORE,  1, 1, 1, 0, 0, 1, 0, 0, 0, "st");
    expect_dec(enc_mem(6'h05, 5'd0, 5'd1, 1'b1, 13'd2),   CLS_STORE,  1, 0, 0, 0, 0, 1, 0, 0, 0, "stb g0");
    expect_dec(enc_mem(6'h24, 5'd5, 5'd1, 1'b1, 13'd2),   CLS_STORE,  1, 0, 0, 0, 0, 1, 0, 0, 0, "stf");
    expect_dec(enc_cp(CP_SET_RTAG, 5'd7, 5'd0, 4'd3),      CLS_OTHER,  0, 0, 0, 1, 0, 0, 0, 0, 0, "cp set rtag");
    expect_dec(enc_cp(CP_SET_MTAG, 5'd0, 5'd0, 4'd3),      CLS_OTHER,  0, 0, 0, 0, 0, 1, 0, 0, 0, "cp set mtag");
    checks++;
    if (!(dec.is_cp && dec.cp_op == CP_SET_MTAG && dec.cp_imm == 4'd3)) failures++;

    // rules: random policies, check field selection per class
    for (int i = 0; i < 2000; i++) begin
      int unsigned c;
      for (int p = 0; p < 4; p++) begin tpr[p] = $urandom; tcr[p] = $urandom; end
      instr = enc_alu(6'h02, 5'd3, 5'd1, 1'b0, 13'd2);   // LOGIC
      if (i % 2) instr = enc_mem(6'h00, 5'd5, 5'd1, 1'b1, 13'd4);  // LOAD
      #1;
      c = int'(dec.cls);
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rules.mode[p] != tpr[p][2*c +: 2] || rules.chk_src[p] != tcr[p][3*c] ||
            rules.chk_addr[p] != tcr[p][3*c+1] || rules.chk_instr[p] != tcr[p][3*c+2] ||
            (dec.is_load && rules.addr_prop[p] != tpr[p][16])) begin
          failures++;
          if (failures < 10) $display("FAIL: rules policy %0d class %0d", p, c);
        end
      end
    end
    instr = enc_cp(CP_RD_RTAG, 5'd0, 5'd3, 4'd0);
    #1;
    checks++;
    if (rules != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
