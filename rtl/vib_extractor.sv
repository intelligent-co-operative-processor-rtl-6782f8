// vib_extractor - finds the instruction block of an iterative loop.
//
// Watches the instructions CPU_major fetches. The address of every CMP type
// instruction is kept in one register and that of every BRA type instruction
// in another (a loop starts with its compare and ends with its unconditional
// branch back). When record_i marks that the observed loop has ended, the
// addresses currently held become the bypassed instruction block (VIB):
// vib_start_o = CMP address, vib_end_o = BRA address. valid_o requires both to
// have been seen with the CMP at or below the BRA. Instruction codes are in
// cim_pkg. fetch_valid_i, fetch_addr_i and instr_i must be aligned: the
// address is that of the instruction word on instr_i.
module vib_extractor
  import cim_pkg::*;
#(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              enable_i,
  input  logic              clear_i,     // forget everything learned so far
  input  logic              fetch_valid_i,
  input  logic [ADDR_W-1:0] fetch_addr_i,
  input  logic [DATA_W-1:0] instr_i,
  input  logic              record_i,
  output logic              valid_o,
  output logic [ADDR_W-1:0] vib_start_o,
  output logic [ADDR_W-1:0] vib_end_o
);

  logic [ADDR_W-1:0] cmp_q, bra_q;
  logic              cmp_seen_q, bra_seen_q;
  logic [3:0]        opc;

  assign opc = instr_i[DATA_W-1 -: 4];

  always_ff @(posedge clk_i) begin
    if (!rst_ni || clear_i) begin
      cmp_q       <= '0;
      bra_q       <= '0;
      cmp_seen_q  <= 1'b0;
      bra_seen_q  <= 1'b0;
      valid_o     <= 1'b0;
      vib_start_o <= '0;
      vib_end_o   <= '0;
    end else if (enable_i) begin
      if (fetch_valid_i && opc == OPC_CMP) begin
        cmp_q      <= fetch_addr_i;
        cmp_seen_q <= 1'b1;
      end
      if (fetch_valid_i && opc == OPC_BRA) begin
        bra_q      <= fetch_addr_i;
        bra_seen_q <= 1'b1;
      end
      if (record_i && !valid_o) begin
        valid_o     <= cmp_seen_q && bra_seen_q && (cmp_q <= bra_q);
        vib_start_o <= cmp_q;
        vib_end_o   <= bra_q;
      end
    end
  end

endmodule
