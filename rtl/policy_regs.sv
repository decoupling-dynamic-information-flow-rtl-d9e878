// policy_regs: the coprocessor's configuration registers.
//
// Four pairs of 32-bit registers, one pair per tag bit (security policy): a
// tag propagation register (TPR) and a tag check register (TCR). They hold
// the propagation mode and the check enables of every primitive operation
// class (bit layout in dift_pkg). Software writes them with coprocessor
// instructions, which the pipeline turns into one-cycle write strobes.
// Four pairs and coprocessor-instruction access follow the document; the bit
// layout and the reset value (all zero: no propagation, no checks) are this
// design's choice.
//
// Timing: a write lands at the clock edge; the registers are read
// combinationally by the decode stage.
module policy_regs
  import dift_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we_tpr,
  input  logic                       we_tcr,
  input  logic [1:0]                 idx,
  input  logic [XLEN-1:0]            wdata,
  output logic [NPOL-1:0][XLEN-1:0]  tpr,
  output logic [NPOL-1:0][XLEN-1:0]  tcr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tpr <= '0;
      tcr <= '0;
    end else begin
      if (we_tpr) tpr[idx] <= wdata;
      if (we_tcr) tcr[idx] <= wdata;
    end
  end
endmodule
