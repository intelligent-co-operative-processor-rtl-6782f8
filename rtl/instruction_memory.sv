// instruction_memory - CPU_major's program memory in the Harvard arrangement.
//
// Two ports: a synchronous fetch port for CPU_major (address in one cycle,
// instruction word on instr_o in the next) and a write port. The write port
// loads the program and is used by the transfer controller to overwrite the
// learned loop with NOP codes, which is how the loop is removed from the
// main instruction stream. Separate instruction and data memories and the
// NOP overwrite follow the document; the two-port organisation is this
// design's choice.
module instruction_memory #(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk_i,
  // fetch port
  input  logic              fetch_i,
  input  logic [ADDR_W-1:0] fetch_addr_i,
  output logic [DATA_W-1:0] instr_o,
  // write port
  input  logic              we_i,
  input  logic [ADDR_W-1:0] waddr_i,
  input  logic [DATA_W-1:0] wdata_i
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk_i) begin
    if (we_i)    mem[waddr_i] <= wdata_i;
    if (fetch_i) instr_o      <= mem[fetch_addr_i];
  end

endmodule
