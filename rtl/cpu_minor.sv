// cpu_minor - the task-specific processor of the CPIM.
//
// Runs the job the iteration control unit describes, one machine cycle per
// clock, with no instruction fetch or decode: its "program" is the job
// op-code. Machine cycles (names from the document's pipeline figures):
//   OF1  read operand 1 at the operand pointer
//   OF2  read operand 2 (operand 1 arrives from the synchronous memory)
//   IE   execute on the selected functional unit; in the pairwise form the
//        result is written back to memory in the same cycle (WBM), in the
//        cumulative form it is written to the accumulator (WBA)
//   WBM  cumulative form only: write the accumulator to the result address
// Pairwise job, M[d+k] <- M[a+2k] op M[a+2k+1]: OF1, OF2, IE per result, 3
// cycles per iteration as in the document's timing analysis. Cumulative job,
// ACC <- M[a] op M[a+1], then ACC <- ACC op M[a+i], M[d] <- ACC: OF1, OF2, IE
// for the first pair, OF2, IE for each further operand (operand 1 is the
// accumulator, so it needs no fetch) and one WBM. A job of Rjs operands
// therefore takes 1 + 3*floor(Rjs/2) + 1 cycles (pairwise, an odd last operand
// is ignored) or 1 + 3 + 2*(Rjs-2) + 1 + 1 cycles (cumulative), counting the
// setup cycle after start_i and the done cycle. Jobs with fewer than two
// operands end at once. The document draws the pipeline on both clock edges;
// this design uses the rising edge only.
module cpu_minor
  import cim_pkg::*;
#(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned JS_W   = 20
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // from/to the iteration control unit
  input  logic              start_i,
  input  job_op_t           op_i,
  input  logic [ADDR_W-1:0] src_addr_i,
  input  logic [ADDR_W-1:0] dst_addr_i,
  input  logic [JS_W-1:0]   remaining_i,
  output logic              adv_src_o,
  output logic              adv_dst_o,
  output logic              done_o,
  // shared memory (through the arbiter, never refused)
  output logic              mem_req_o,
  output logic              mem_we_o,
  output logic [ADDR_W-1:0] mem_addr_o,
  output logic [DATA_W-1:0] mem_wdata_o,
  input  logic [DATA_W-1:0] mem_rdata_i
);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_OF1, S_OF2, S_IE, S_WBM, S_DONE} state_e;

  state_e            state_q, state_d;
  job_op_t           op_q;
  logic [DATA_W-1:0] op1_q, acc_q;
  logic              first_q;
  logic [DATA_W-1:0] fu_a;
  logic [DATA_W-1:0] fu_res [NUM_FU];
  logic [DATA_W-1:0] result;

  assign fu_a   = (op_q.cumulative && !first_q) ? acc_q : op1_q;
  assign result = fu_res[op_q.fu];

  fu_bank #(.DATA_W(DATA_W)) u_fu (
    .a_i   (fu_a),
    .b_i   (mem_rdata_i),
    .res_o (fu_res)
  );

  always_comb begin
    state_d     = state_q;
    adv_src_o   = 1'b0;
    adv_dst_o   = 1'b0;
    done_o      = 1'b0;
    mem_req_o   = 1'b0;
    mem_we_o    = 1'b0;
    mem_addr_o  = src_addr_i;
    mem_wdata_o = result;
    unique case (state_q)
      S_IDLE:  if (start_i) state_d = S_SETUP;
      S_SETUP: state_d = (remaining_i >= JS_W'(2)) ? S_OF1 : S_DONE;
      S_OF1: begin
        mem_req_o = 1'b1;
        adv_src_o = 1'b1;
        state_d   = S_OF2;
      end
      S_OF2: begin
        mem_req_o = 1'b1;
        adv_src_o = 1'b1;
        state_d   = S_IE;
      end
      S_IE: begin
        if (op_q.cumulative) begin
          state_d = (remaining_i != '0) ? S_OF2 : S_WBM;
        end else begin
          mem_req_o  = 1'b1;
          mem_we_o   = 1'b1;
          mem_addr_o = dst_addr_i;
          adv_dst_o  = 1'b1;
          state_d    = (remaining_i >= JS_W'(2)) ? S_OF1 : S_DONE;
        end
      end
      S_WBM: begin
        mem_req_o   = 1'b1;
        mem_we_o    = 1'b1;
        mem_addr_o  = dst_addr_i;
        mem_wdata_o = acc_q;
        adv_dst_o   = 1'b1;
        state_d     = S_DONE;
      end
      S_DONE: begin
        done_o  = 1'b1;
        state_d = S_IDLE;
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      op_q    <= '0;
      op1_q   <= '0;
      acc_q   <= '0;
      first_q <= 1'b1;
    end else begin
      state_q <= state_d;
      if (state_q == S_OF1) first_q <= 1'b1;
      if (state_q == S_SETUP) op_q <= op_i;
      if (state_q == S_OF2 && first_q) op1_q <= mem_rdata_i;
      if (state_q == S_IE) begin
        acc_q   <= result;
        first_q <= 1'b0;
      end
    end
  end

endmodule
