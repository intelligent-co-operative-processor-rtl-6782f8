// cim_top - Co-operative Intelligent Memory (CIM) system.
//
// Around an external CPU_major with separate instruction and data memories
// (Harvard), the CIM adds an observer and a CPIM. In the learning stage
// CPU_major runs its program, loop included, while the observer watches its
// buses and extracts the loop's vectors; when the loop has ended and the data
// memory is free, the observer's transfer controller requests the buses
// (bus_req_o / bus_ack_i), loads the CPIM's iteration control unit, copies the
// operand block into the CPIM's shared memory, overwrites the loop in the
// instruction memory with NOPs and signals dtc_o. The CPIM then runs the loop
// itself and raises irq_o. In the serving stage CPU_major meets NOPs where
// the loop was, and its fetch of the first of them starts the CPIM on the
// loop again, in parallel with CPU_major.
//
// CPU_major ports (all synchronous, read data one cycle after the request):
//   im_fetch_*  instruction fetch;  im_load_*  program load
//   dm_*        data memory;        sm_*       shared memory (request held
//               until sm_gnt_o, data valid with sm_rvalid_o)
//   icu_rd_*    read back of the CPIM registers; irq_o / irq_clr_i
// While the observer owns the buses (bus_req_o high and acknowledged) the
// CPU_major requests are ignored and CPU_major must wait. The system
// arrangement follows the document; port protocols are this design's.
// icu_rd_data_o bits above ADDR_W+3 always read zero.
module cim_top
  import cim_pkg::*;
#(
  parameter int unsigned ADDR_W      = 20,
  parameter int unsigned DATA_W      = 16,
  parameter int unsigned JS_W        = 20,
  parameter int unsigned LOOP_THRESH = 8,
  parameter int unsigned IDLE_CYCLES = 4
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // CPU_major instruction side
  input  logic              im_fetch_i,
  input  logic [ADDR_W-1:0] im_fetch_addr_i,
  output logic [DATA_W-1:0] im_instr_o,
  input  logic              im_load_we_i,
  input  logic [ADDR_W-1:0] im_load_addr_i,
  input  logic [DATA_W-1:0] im_load_data_i,
  // CPU_major data side
  input  logic              dm_req_i,
  input  logic              dm_we_i,
  input  logic [ADDR_W-1:0] dm_addr_i,
  input  logic [DATA_W-1:0] dm_wdata_i,
  output logic [DATA_W-1:0] dm_rdata_o,
  // CPU_major access to the shared memory
  input  logic              sm_req_i,
  input  logic              sm_we_i,
  input  logic [ADDR_W-1:0] sm_addr_i,
  input  logic [DATA_W-1:0] sm_wdata_i,
  output logic              sm_gnt_o,
  output logic              sm_rvalid_o,
  output logic [DATA_W-1:0] sm_rdata_o,
  output logic              sm_stolen_o,
  // CPIM register read back and status
  input  reg_sel_e          icu_rd_sel_i,
  output logic [VEC_W-1:0]  icu_rd_data_o,
  output logic              busy_o,
  output logic              job_start_o,
  output logic              irq_o,
  input  logic              irq_clr_i,
  // bus hand-over to the observer
  output logic              bus_req_o,
  input  logic              bus_ack_i,
  output logic              dtc_o,
  output logic              learned_o,
  output logic              loop_recorded_o,
  output logic [31:0]       xfer_cycles_o
);

  logic              own;
  logic              obs_dm_req;
  logic [ADDR_W-1:0] obs_dm_addr;
  logic              obs_sm_req;
  logic [ADDR_W-1:0] obs_sm_addr;
  logic [DATA_W-1:0] obs_sm_wdata;
  logic              obs_ld_we, obs_hold, obs_im_we;
  reg_sel_e          obs_ld_sel;
  logic [VEC_W-1:0]  obs_ld_data;
  logic [ADDR_W-1:0] obs_im_addr;
  logic [DATA_W-1:0] obs_im_wdata;
  logic              dm_req, dm_we;
  logic [ADDR_W-1:0] dm_addr;
  logic              ext_req, ext_we, ext_gnt;
  logic [ADDR_W-1:0] ext_addr;
  logic [DATA_W-1:0] ext_wdata;
  logic              im_we;
  logic [ADDR_W-1:0] im_waddr;
  logic [DATA_W-1:0] im_wdata;

  // bus ownership multiplexers
  assign dm_req    = own ? obs_dm_req  : dm_req_i;
  assign dm_we     = own ? 1'b0        : dm_we_i;
  assign dm_addr   = own ? obs_dm_addr : dm_addr_i;
  assign ext_req   = own ? obs_sm_req  : sm_req_i;
  assign ext_we    = own ? 1'b1        : sm_we_i;
  assign ext_addr  = own ? obs_sm_addr : sm_addr_i;
  assign ext_wdata = own ? obs_sm_wdata : sm_wdata_i;
  assign im_we     = own ? obs_im_we   : im_load_we_i;
  assign im_waddr  = own ? obs_im_addr : im_load_addr_i;
  assign im_wdata  = own ? obs_im_wdata : im_load_data_i;
  assign sm_gnt_o  = ext_gnt && !own;

  instruction_memory #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_im (
    .clk_i, .fetch_i(im_fetch_i), .fetch_addr_i(im_fetch_addr_i), .instr_o(im_instr_o),
    .we_i(im_we), .waddr_i(im_waddr), .wdata_i(im_wdata)
  );

  data_memory #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_dm (
    .clk_i, .req_i(dm_req), .we_i(dm_we), .addr_i(dm_addr), .wdata_i(dm_wdata_i),
    .rdata_o(dm_rdata_o)
  );

  observer #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .JS_W(JS_W),
             .LOOP_THRESH(LOOP_THRESH), .IDLE_CYCLES(IDLE_CYCLES)) u_obs (
    .clk_i, .rst_ni,
    .mon_fetch_i(im_fetch_i), .mon_fetch_addr_i(im_fetch_addr_i), .mon_instr_i(im_instr_o),
    .mon_dm_req_i(dm_req_i), .mon_dm_we_i(dm_we_i), .mon_dm_addr_i(dm_addr_i),
    .mon_dm_wdata_i(dm_wdata_i), .mon_dm_rdata_i(dm_rdata_o),
    .bus_req_o, .bus_ack_i, .own_o(own), .dtc_o, .done_o(learned_o),
    .recorded_o(loop_recorded_o), .xfer_cycles_o,
    .dm_req_o(obs_dm_req), .dm_addr_o(obs_dm_addr),
    .sm_req_o(obs_sm_req), .sm_addr_o(obs_sm_addr), .sm_wdata_o(obs_sm_wdata),
    .sm_gnt_i(ext_gnt),
    .ld_we_o(obs_ld_we), .ld_sel_o(obs_ld_sel), .ld_data_o(obs_ld_data), .hold_o(obs_hold),
    .im_we_o(obs_im_we), .im_addr_o(obs_im_addr), .im_wdata_o(obs_im_wdata)
  );

  cpim #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .JS_W(JS_W)) u_cpim (
    .clk_i, .rst_ni,
    .ext_req_i(ext_req), .ext_we_i(ext_we), .ext_addr_i(ext_addr), .ext_wdata_i(ext_wdata),
    .ext_gnt_o(ext_gnt), .ext_rvalid_o(sm_rvalid_o), .ext_rdata_o(sm_rdata_o),
    .ext_stolen_o(sm_stolen_o),
    .ld_we_i(obs_ld_we), .ld_sel_i(obs_ld_sel), .ld_data_i(obs_ld_data),
    .rd_sel_i(icu_rd_sel_i), .rd_data_o(icu_rd_data_o), .hold_i(obs_hold),
    .fetch_i(im_fetch_i && !own), .fetch_addr_i(im_fetch_addr_i),
    .busy_o, .learned_o(), .start_o(job_start_o), .irq_o, .irq_clr_i
  );

endmodule
