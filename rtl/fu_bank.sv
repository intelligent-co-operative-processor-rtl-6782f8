// fu_bank - the bank of 2^n functional units of the CPU_minor model.
//
// Both operands are applied to every unit at once and all results are
// returned side by side, indexed by cim_pkg::fu_sel_e. CPU_minor selects one
// result with the job op-code; the observer's job-nature extractor compares
// all of them against the value CPU_major writes, so it can tell which unit
// reproduces the loop body. Purely combinational. The document gives the
// bank (2^n units) but not its contents: ADD, SUB, AND and OR are this
// design's choice.
module fu_bank
  import cim_pkg::*;
#(
  parameter int unsigned DATA_W = 16
) (
  input  logic [DATA_W-1:0] a_i,
  input  logic [DATA_W-1:0] b_i,
  output logic [DATA_W-1:0] res_o [NUM_FU]
);

  always_comb begin
    res_o[FU_ADD] = a_i + b_i;
    res_o[FU_SUB] = a_i - b_i;
    res_o[FU_AND] = a_i & b_i;
    res_o[FU_OR]  = a_i | b_i;
  end

endmodule
