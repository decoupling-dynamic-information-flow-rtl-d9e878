// tag_reg_file: tags of the main core's integer registers.
//
// One 4-bit tag per physical SPARC V8 register: 8 globals plus 16 per
// register window (NWINDOWS windows), indexed with dift_pkg::phys_idx so the
// window overlap of the main core is mirrored. Three combinational read
// ports serve rs1, rs2 and the store-data register; one write port is used
// by the writeback stage. A write in the same cycle as a read of the same
// entry is forwarded to the read (write-through). The tag of %g0 reads as 0.
// A tag register per architectural register follows the document; windowing
// and write-through are this design's choice. Reset clears all tags.
module tag_reg_file
  import dift_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PHYS_W-1:0] ra,
  input  logic [PHYS_W-1:0] rb,
  input  logic [PHYS_W-1:0] rc,
  output tag_t              ta,
  output tag_t              tb,
  output tag_t              tc,
  input  logic              we,
  input  logic [PHYS_W-1:0] wa,
  input  tag_t              wd
);
  tag_t mem [NPHYS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPHYS; i++) mem[i] <= '0;
    end else if (we && wa != '0 && int'(wa) < NPHYS) begin
      mem[wa] <= wd;
    end
  end

  function automatic tag_t rd(input logic [PHYS_W-1:0] a);
    if (a == '0 || int'(a) >= NPHYS) return '0;
    if (we && wa == a) return wd;
    return mem[a];
  endfunction

  assign ta = rd(ra);
  assign tb = rd(rb);
  assign tc = rd(rc);
endmodule
