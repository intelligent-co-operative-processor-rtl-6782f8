// sm_arbiter - shared memory arbiter of the CPIM.
//
// Two masters share the single SRAM port: CPU_minor and an external master
// (CPU_major, or the observer's transfer controller while it owns the bus).
// In active mode (a job is loaded and running) CPU_minor has fixed priority
// and is never refused, so its reads and writes form an unbroken burst; the
// external master is granted only the cycles CPU_minor leaves free (cycle
// stealing). In sleep mode CPU_minor issues nothing and the external master
// has every cycle. A refused external request is simply held and presented
// again; ext_gnt_o tells the master that the request was accepted in this
// cycle, and ext_rvalid_o marks the following cycle, when the read data is on
// rdata_o. The priority rule and the two transfer styles follow the document;
// the request/grant signalling is this design's choice.
module sm_arbiter #(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              active_i,     // CPIM in active mode
  // CPU_minor
  input  logic              min_req_i,
  input  logic              min_we_i,
  input  logic [ADDR_W-1:0] min_addr_i,
  input  logic [DATA_W-1:0] min_wdata_i,
  // external master
  input  logic              ext_req_i,
  input  logic              ext_we_i,
  input  logic [ADDR_W-1:0] ext_addr_i,
  input  logic [DATA_W-1:0] ext_wdata_i,
  output logic              ext_gnt_o,
  output logic              ext_rvalid_o,
  output logic              ext_stolen_o, // granted while in active mode
  // memory port
  output logic              mem_req_o,
  output logic              mem_we_o,
  output logic [ADDR_W-1:0] mem_addr_o,
  output logic [DATA_W-1:0] mem_wdata_o
);

  logic min_sel;

  assign min_sel      = active_i && min_req_i;
  assign ext_gnt_o    = ext_req_i && !min_sel;
  assign ext_stolen_o = ext_gnt_o && active_i;

  always_comb begin
    if (min_sel) begin
      mem_req_o   = 1'b1;
      mem_we_o    = min_we_i;
      mem_addr_o  = min_addr_i;
      mem_wdata_o = min_wdata_i;
    end else begin
      mem_req_o   = ext_req_i;
      mem_we_o    = ext_we_i;
      mem_addr_o  = ext_addr_i;
      mem_wdata_o = ext_wdata_i;
    end
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) ext_rvalid_o <= 1'b0;
    else         ext_rvalid_o <= ext_gnt_o && !ext_we_i;
  end

  // CPU_minor only runs in active mode.
  assert property (@(posedge clk_i) disable iff (!rst_ni) min_req_i |-> active_i);

endmodule
