// tag_check: the tag check logic of the third pipeline stage.
//
// A check fails when a tag bit that the active rules ask to check is set
// (the document: "If the check fails (non-zero tag value), a security
// exception is raised"). Three operand groups can be checked per policy:
// the source operand tags, the tags of the registers that form a memory or
// jump address (pointer dereference), and the tag of the instruction word
// itself (code injection). Which groups are checked per operation class comes
// from the check policy registers; grouping them this way is this design's
// choice. Purely combinational.
//
//   valid       an instruction is in the stage
//   src_tag     OR of the source operand tags
//   addr_tag    OR of the address register tags
//   instr_tag   tag of the instruction's memory word
//   chk_*       per-policy check enables of the instruction's class
//   fail        security exception request
//   fail_bits   which policies failed
module tag_check
  import dift_pkg::*;
(
  input  logic            valid,
  input  tag_t            src_tag,
  input  tag_t            addr_tag,
  input  tag_t            instr_tag,
  input  logic [NPOL-1:0] chk_src,
  input  logic [NPOL-1:0] chk_addr,
  input  logic [NPOL-1:0] chk_instr,
  output logic            fail,
  output tag_t            fail_bits
);
  always_comb begin
    fail_bits = valid ? ((src_tag & chk_src) | (addr_tag & chk_addr) | (instr_tag & chk_instr))
                      : '0;
    fail      = |fail_bits;
  end
endmodule
