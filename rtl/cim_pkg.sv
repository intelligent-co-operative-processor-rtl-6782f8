// cim_pkg - types and constants shared by the co-operative intelligent memory.
//
// The design has two CPU levels: a conventional CPU_major and a small
// iterative engine, CPU_minor, placed beside a shared memory (the CPIM).
// An observer watches CPU_major's buses, learns one iterative loop and
// hands it over to the CPIM. This package holds what those blocks share:
//   * job-nature (VJN) op-code layout. The low bits select one of the 2^n
//     functional units (n = 2 here: ADD, SUB, AND, OR); bit 2 selects the
//     cumulative form (ACC <- ACC op M[i]) instead of the pairwise form
//     (M[d+k] <- M[a+2k] op M[a+2k+1]). The 4-bit op-code width follows the
//     document; the unit list and the bit meanings are this design's choice.
//   * the CPU_major instruction codes the observer must recognise (CMP, BRA,
//     NOP). The document names the instruction types only; the 4-bit codes in
//     the top nibble of a 16-bit word are this design's choice.
//   * the selector used to load the iteration control unit registers.
package cim_pkg;

  // Functional units (2^FU_SEL_W of them).
  localparam int unsigned FU_SEL_W = 2;
  localparam int unsigned NUM_FU   = 1 << FU_SEL_W;

  typedef enum logic [FU_SEL_W-1:0] {
    FU_ADD = 2'd0,
    FU_SUB = 2'd1,
    FU_AND = 2'd2,
    FU_OR  = 2'd3
  } fu_sel_e;

  // Job nature op-code (low 4 bits of Rjn).
  typedef struct packed {
    logic    rsvd;        // reserved, written as 0
    logic    cumulative;  // 1: ACC <- ACC op M[i], single result
    fu_sel_e fu;          // functional unit
  } job_op_t;

  // Iteration control unit register selector.
  typedef enum logic [2:0] {
    SEL_RA   = 3'd0,  // operand block start address (VSA)
    SEL_RJS  = 3'd1,  // job size in operands (VJS)
    SEL_RJN  = 3'd2,  // job nature: [3:0] op-code, [7:4] operand step
    SEL_RSAI = 3'd3,  // bypassed instruction block start (VIB)
    SEL_REAI = 3'd4,  // bypassed instruction block end (VIB)
    SEL_RSDI = 3'd5,  // destination block start, step in bits [ADDR_W+3:ADDR_W] (VDB)
    SEL_REDI = 3'd6   // destination block end (VDB)
  } reg_sel_e;

  localparam int unsigned STEP_W = 4;   // address step field width
  localparam int unsigned VEC_W  = 32;  // register load data bus width

  // CPU_major instruction codes seen by the observer (top nibble of a word).
  localparam logic [3:0] OPC_NOP = 4'h0;
  localparam logic [3:0] OPC_CMP = 4'h3;
  localparam logic [3:0] OPC_BRA = 4'h8;

endpackage
