// cpu_major_model - behavioural model of CPU_major, for simulation only.
//
// A tiny accumulator machine that executes a program from the CIM's
// instruction memory and uses the CIM's data memory, so that the observer
// sees a real loop on the buses. It is not part of the design: the CIM
// treats CPU_major as an existing conventional processor. Instruction word:
// [15:12] op-code, [11:0] immediate.
//   0 NOP             pc+1 (the code the bypass writes over a learned loop)
//   1 LDX imm         X <- imm (operand pointer)
//   2 LDY imm         Y <- imm (result pointer)
//   3 CMP imm         Z <- (X == imm)
//   4 BEQ imm         if Z: pc <- imm
//   5 LDA             A <- DM[X]; X <- X+1
//   6 OPM f           A <- A op_f DM[X]; X <- X+1 (f in imm[1:0]: add sub and or)
//   7 STA             DM[Y] <- A; Y <- Y+1
//   8 BRA imm         pc <- imm
//   9 HALT
//  10 LDAI imm        A <- DM[imm]
// Timing: one fetch cycle and one execute cycle per instruction, plus one
// cycle for the returned word of a data read. Before each fetch the model
// checks bus_req_i; if set it raises bus_ack_o and waits until bus_req_i
// falls. run_i starts the program at address 0; halted_o is high after HALT.
module cpu_major_model #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              run_i,
  output logic              halted_o,
  output logic [31:0]       cycles_o,     // cycles since run_i
  output logic [31:0]       stall_cycles_o,
  output logic              im_fetch_o,
  output logic [ADDR_W-1:0] im_fetch_addr_o,
  input  logic [DATA_W-1:0] im_instr_i,
  output logic              dm_req_o,
  output logic              dm_we_o,
  output logic [ADDR_W-1:0] dm_addr_o,
  output logic [DATA_W-1:0] dm_wdata_o,
  input  logic [DATA_W-1:0] dm_rdata_i,
  input  logic              bus_req_i,
  output logic              bus_ack_o
);

  typedef enum logic [2:0] {C_HALT, C_FETCH, C_EXEC, C_MEM, C_ACK} cstate_e;

  cstate_e           st;
  logic [ADDR_W-1:0] pc, x, y;
  logic [DATA_W-1:0] a;
  logic              z;
  logic [3:0]        opc, mem_op;
  logic [11:0]       imm;
  logic [1:0]        mem_f;

  assign opc = im_instr_i[15:12];
  assign imm = im_instr_i[11:0];

  always_comb begin
    im_fetch_o      = (st == C_FETCH) && !bus_req_i;
    im_fetch_addr_o = pc;
    bus_ack_o       = (st == C_ACK);
    halted_o        = (st == C_HALT);
    dm_req_o        = 1'b0;
    dm_we_o         = 1'b0;
    dm_addr_o       = x;
    dm_wdata_o      = a;
    if (st == C_EXEC) begin
      unique case (opc)
        4'd5, 4'd6: dm_req_o = 1'b1;
        4'd7: begin dm_req_o = 1'b1; dm_we_o = 1'b1; dm_addr_o = y; end
        4'd10: begin dm_req_o = 1'b1; dm_addr_o = ADDR_W'(imm); end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      st <= C_HALT; pc <= '0; x <= '0; y <= '0; a <= '0; z <= 1'b0;
      mem_op <= '0; mem_f <= '0; cycles_o <= '0; stall_cycles_o <= '0;
    end else begin
      if (st != C_HALT) cycles_o <= cycles_o + 1;
      if (st == C_ACK)  stall_cycles_o <= stall_cycles_o + 1;
      unique case (st)
        C_HALT: if (run_i) begin
          st <= C_FETCH; pc <= '0; cycles_o <= '0; stall_cycles_o <= '0;
        end
        C_FETCH: st <= bus_req_i ? C_ACK : C_EXEC;
        C_ACK:   if (!bus_req_i) st <= C_FETCH;
        C_EXEC: begin
          st <= C_FETCH;
          pc <= pc + 1'b1;
          unique case (opc)
            4'd1: x <= ADDR_W'(imm);
            4'd2: y <= ADDR_W'(imm);
            4'd3: z <= (x == ADDR_W'(imm));
            4'd4: if (z) pc <= ADDR_W'(imm);
            4'd5, 4'd6, 4'd10: begin
              st <= C_MEM; mem_op <= opc; mem_f <= imm[1:0];
              if (opc != 4'd10) x <= x + 1'b1;
            end
            4'd7: y <= y + 1'b1;
            4'd8: pc <= ADDR_W'(imm);
            4'd9: st <= C_HALT;
            default: ;
          endcase
        end
        C_MEM: begin
          st <= C_FETCH;
          if (mem_op == 4'd6) begin
            unique case (mem_f)
              2'd0: a <= a + dm_rdata_i;
              2'd1: a <= a - dm_rdata_i;
              2'd2: a <= a & dm_rdata_i;
              default: a <= a | dm_rdata_i;
            endcase
          end else a <= dm_rdata_i;
        end
        default: st <= C_HALT;
      endcase
    end
  end

endmodule
