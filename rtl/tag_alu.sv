// tag_alu: the 4-bit tag ALU of the propagate stage.
//
// Each of the four tag bits belongs to one security policy and is combined on
// its own: the policy's propagation mode for the instruction's operation class
// picks OR, AND or XOR of the two source tag bits, or clears the bit. The
// three logical operations are the ones the document gives for this ALU; the
// "clear" mode (no propagation) and the 2-bit mode encoding are this design's
// choice. Purely combinational.
//
//   a, b   source tags (operands that an instruction does not read are 0)
//   mode   per tag bit: PROP_CLEAR, PROP_OR, PROP_AND, PROP_XOR
//   y      destination tag
module tag_alu
  import dift_pkg::*;
(
  input  tag_t                 a,
  input  tag_t                 b,
  input  logic [NPOL-1:0][1:0] mode,
  output tag_t                 y
);
  always_comb begin
    for (int p = 0; p < NPOL; p++) begin
      unique case (prop_mode_e'(mode[p]))
        PROP_CLEAR: y[p] = 1'b0;
        PROP_OR:    y[p] = a[p] | b[p];
        PROP_AND:   y[p] = a[p] & b[p];
        PROP_XOR:   y[p] = a[p] ^ b[p];
        default:    y[p] = 1'b0;
      endcase
    end
  end
endmodule
