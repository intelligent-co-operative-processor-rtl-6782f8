// data_memory - CPU_major's data memory in the Harvard arrangement of the CIM.
//
// Single synchronous port: a read presented in one cycle returns its word on
// rdata_o the next cycle; a write lands at the clock edge. The system top
// multiplexes the port between CPU_major and the observer's transfer
// controller, which reads the operand block from here to copy it into the
// shared memory. Separate instruction and data memories follow the document;
// size and timing are this design's choice.
module data_memory #(
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
