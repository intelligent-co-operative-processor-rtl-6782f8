// shared_memory - the CPIM's on-chip SRAM.
//
// Holds the operand block of the iterative job and the results CPU_minor
// writes back. One port, shared through sm_arbiter. Synchronous: a read
// presented in one cycle returns its word on rdata_o in the next cycle; a
// write takes effect at the clock edge. Contents are not reset (an SRAM).
// The document asks only for capacity enough for a high-resolution frame;
// the default of 2^20 words of 16 bits (for example a 1024 x 768 frame of
// 16-bit pixels) is this design's choice.
module shared_memory #(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk_i,
  input  logic              req_i,
  input  logic              we_i,
  input  logic [ADDR_W-1:0] addr_i,
  input  logic [DATA_W-1:0] wdata_i,
  output logic [DATA_W-1:0] rdata_o
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk_i) begin
    if (req_i) begin
      if (we_i) mem[addr_i] <= wdata_i;
      else      rdata_o     <= mem[addr_i];
    end
  end

endmodule
