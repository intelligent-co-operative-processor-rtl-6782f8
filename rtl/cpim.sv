// cpim - Co-operative Pseudo Intelligent Memory: the memory-side processor.
//
// A shared SRAM, an arbiter, the iteration control unit (ICU) and CPU_minor.
// A master loads the loop vectors into the ICU registers (ld_*) and the
// operand block into the shared memory (ext_*). Once Ra, Rjs and Rjn are
// loaded, and hold_i is low, the CPIM enters active mode: CPU_minor runs the
// whole loop out of the shared memory in a burst, external accesses get only
// the cycles it leaves free, and irq_o rises when the job is finished. Results
// stay in the shared memory, where the external port reads them. A fetch by
// CPU_major of the first bypassed instruction (fetch_i/fetch_addr_i equal to
// Rsai) re-runs the learned job on the current memory contents.
//
// The external port: present ext_req_i with ext_we_i/addr/wdata and hold it
// until ext_gnt_o; read data is on ext_rdata_o in the cycle ext_rvalid_o is
// high, the cycle after the grant. The structure follows the document; the
// port protocols are this design's choice.
module cpim
  import cim_pkg::*;
#(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned JS_W   = 20
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // external shared-memory port
  input  logic              ext_req_i,
  input  logic              ext_we_i,
  input  logic [ADDR_W-1:0] ext_addr_i,
  input  logic [DATA_W-1:0] ext_wdata_i,
  output logic              ext_gnt_o,
  output logic              ext_rvalid_o,
  output logic [DATA_W-1:0] ext_rdata_o,
  output logic              ext_stolen_o,
  // ICU register port
  input  logic              ld_we_i,
  input  reg_sel_e          ld_sel_i,
  input  logic [VEC_W-1:0]  ld_data_i,
  input  reg_sel_e          rd_sel_i,
  output logic [VEC_W-1:0]  rd_data_o,
  input  logic              hold_i,
  // CPU_major instruction fetch monitor
  input  logic              fetch_i,
  input  logic [ADDR_W-1:0] fetch_addr_i,
  // status
  output logic              busy_o,
  output logic              learned_o,
  output logic              start_o,
  output logic              irq_o,
  input  logic              irq_clr_i
);

  job_op_t           op;
  logic [ADDR_W-1:0] src_addr, dst_addr;
  logic [JS_W-1:0]   remaining;
  logic              adv_src, adv_dst, done;
  logic              min_req, min_we;
  logic [ADDR_W-1:0] min_addr;
  logic [DATA_W-1:0] min_wdata;
  logic              mem_req, mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;

  icu #(.ADDR_W(ADDR_W), .JS_W(JS_W)) u_icu (
    .clk_i, .rst_ni,
    .ld_we_i, .ld_sel_i, .ld_data_i, .rd_sel_i, .rd_data_o, .hold_i,
    .fetch_i, .fetch_addr_i,
    .start_o, .op_o(op), .src_addr_o(src_addr), .dst_addr_o(dst_addr),
    .remaining_o(remaining), .adv_src_i(adv_src), .adv_dst_i(adv_dst),
    .done_i(done), .busy_o, .learned_o, .irq_o, .irq_clr_i
  );

  cpu_minor #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .JS_W(JS_W)) u_minor (
    .clk_i, .rst_ni,
    .start_i(start_o), .op_i(op), .src_addr_i(src_addr), .dst_addr_i(dst_addr),
    .remaining_i(remaining), .adv_src_o(adv_src), .adv_dst_o(adv_dst),
    .done_o(done),
    .mem_req_o(min_req), .mem_we_o(min_we), .mem_addr_o(min_addr),
    .mem_wdata_o(min_wdata), .mem_rdata_i(mem_rdata)
  );

  sm_arbiter #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_arb (
    .clk_i, .rst_ni, .active_i(busy_o),
    .min_req_i(min_req), .min_we_i(min_we), .min_addr_i(min_addr),
    .min_wdata_i(min_wdata),
    .ext_req_i, .ext_we_i, .ext_addr_i, .ext_wdata_i,
    .ext_gnt_o, .ext_rvalid_o, .ext_stolen_o,
    .mem_req_o(mem_req), .mem_we_o(mem_we), .mem_addr_o(mem_addr),
    .mem_wdata_o(mem_wdata)
  );

  shared_memory #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_sm (
    .clk_i, .req_i(mem_req), .we_i(mem_we), .addr_i(mem_addr),
    .wdata_i(mem_wdata), .rdata_o(mem_rdata)
  );

  assign ext_rdata_o = mem_rdata;

endmodule
