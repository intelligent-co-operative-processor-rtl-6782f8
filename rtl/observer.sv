// observer - learns one iterative loop of CPU_major at run time and hands it
// to the CPIM.
//
// It sits on CPU_major's instruction and data buses and only listens until
// it has learned a loop:
//   * vsa_vjs_extractor: operand block start, size and step from the read
//     addresses; its record pulse marks the end of a loop worth bypassing;
//   * vjn_vdb_extractor: the job nature from comparing written words with
//     the functional units' results, and the destination block;
//   * vib_extractor: the loop's CMP and BRA instruction addresses.
// If a loop ends and any of the three could not describe it, all three forget
// it and learning continues. When all three are valid, the itc takes the
// buses and transfers registers, data and NOP codes (see itc.sv); learning
// then stops (done_o) and one loop is kept, as the CIM has one CPIM.
//
// Timing: memories are synchronous, so read data and fetched instructions
// arrive one cycle after their request. The observer delays the request
// strobes and addresses by one cycle to line them up with the data.
// As in the itc, the NOP word, the unused top bits of the register data and
// the copied data word (the data memory output passed on) are outputs that
// carry no logic of their own.
module observer
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
  // CPU_major buses (monitored)
  input  logic              mon_fetch_i,
  input  logic [ADDR_W-1:0] mon_fetch_addr_i,
  input  logic [DATA_W-1:0] mon_instr_i,
  input  logic              mon_dm_req_i,
  input  logic              mon_dm_we_i,
  input  logic [ADDR_W-1:0] mon_dm_addr_i,
  input  logic [DATA_W-1:0] mon_dm_wdata_i,
  input  logic [DATA_W-1:0] mon_dm_rdata_i,
  // bus hand-over
  output logic              bus_req_o,
  input  logic              bus_ack_i,
  output logic              own_o,
  output logic              dtc_o,
  output logic              done_o,
  output logic              recorded_o,   // a loop end was detected
  output logic [31:0]       xfer_cycles_o,
  // data memory, shared memory, ICU and instruction memory masters
  output logic              dm_req_o,
  output logic [ADDR_W-1:0] dm_addr_o,
  output logic              sm_req_o,
  output logic [ADDR_W-1:0] sm_addr_o,
  output logic [DATA_W-1:0] sm_wdata_o,
  input  logic              sm_gnt_i,
  output logic              ld_we_o,
  output reg_sel_e          ld_sel_o,
  output logic [VEC_W-1:0]  ld_data_o,
  output logic              hold_o,
  output logic              im_we_o,
  output logic [ADDR_W-1:0] im_addr_o,
  output logic [DATA_W-1:0] im_wdata_o
);

  logic              learning, clear_q;
  logic              rd, wr, rd_valid_q, run_start, run_start_q;
  logic              fetch_valid_q;
  logic [ADDR_W-1:0] fetch_addr_q;
  logic              rec_q;
  logic              vsa_valid, vjn_valid, vib_valid, all_valid;
  logic [ADDR_W-1:0] vsa, vdb_start, vdb_end, vib_start, vib_end;
  logic [JS_W-1:0]   vjs;
  logic [STEP_W-1:0] vsa_step, vdb_step;
  job_op_t           vjn;

  assign rd        = mon_dm_req_i && !mon_dm_we_i && !own_o;
  assign wr        = mon_dm_req_i &&  mon_dm_we_i && !own_o;
  assign learning  = !done_o && !own_o;
  assign all_valid = vsa_valid && vjn_valid && vib_valid;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      rd_valid_q    <= 1'b0;
      run_start_q   <= 1'b0;
      fetch_valid_q <= 1'b0;
      fetch_addr_q  <= '0;
      rec_q         <= 1'b0;
      clear_q       <= 1'b0;
    end else begin
      rd_valid_q    <= rd;
      run_start_q   <= run_start;
      fetch_valid_q <= mon_fetch_i && !own_o;
      fetch_addr_q  <= mon_fetch_addr_i;
      rec_q         <= recorded_o;
      // a recorded loop that could not be fully described is dropped
      clear_q       <= rec_q && !all_valid;
    end
  end

  vsa_vjs_extractor #(.ADDR_W(ADDR_W), .JS_W(JS_W), .LOOP_THRESH(LOOP_THRESH)) u_vsa (
    .clk_i, .rst_ni, .enable_i(learning), .clear_i(clear_q),
    .rd_i(rd), .rd_addr_i(mon_dm_addr_i),
    .run_start_o(run_start), .record_o(recorded_o), .valid_o(vsa_valid),
    .vsa_o(vsa), .vjs_o(vjs), .step_o(vsa_step)
  );

  vjn_vdb_extractor #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_vjn (
    .clk_i, .rst_ni, .enable_i(learning), .clear_i(clear_q),
    .rd_valid_i(rd_valid_q), .rd_data_i(mon_dm_rdata_i), .run_start_i(run_start_q),
    .wr_i(wr), .wr_addr_i(mon_dm_addr_i), .wr_data_i(mon_dm_wdata_i),
    .record_i(recorded_o), .valid_o(vjn_valid), .vjn_o(vjn),
    .vdb_start_o(vdb_start), .vdb_end_o(vdb_end), .vdb_step_o(vdb_step)
  );

  vib_extractor #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_vib (
    .clk_i, .rst_ni, .enable_i(learning), .clear_i(clear_q),
    .fetch_valid_i(fetch_valid_q), .fetch_addr_i(fetch_addr_q), .instr_i(mon_instr_i),
    .record_i(recorded_o), .valid_o(vib_valid),
    .vib_start_o(vib_start), .vib_end_o(vib_end)
  );

  itc #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .JS_W(JS_W), .IDLE_CYCLES(IDLE_CYCLES)) u_itc (
    .clk_i, .rst_ni,
    .vec_valid_i(all_valid), .vsa_i(vsa), .vjs_i(vjs), .vsa_step_i(vsa_step),
    .vjn_i(vjn), .vdb_start_i(vdb_start), .vdb_end_i(vdb_end), .vdb_step_i(vdb_step),
    .vib_start_i(vib_start), .vib_end_i(vib_end),
    .dm_busy_i(mon_dm_req_i), .bus_req_o, .bus_ack_i, .own_o, .dtc_o, .done_o,
    .xfer_cycles_o,
    .dm_req_o, .dm_addr_o, .dm_rdata_i(mon_dm_rdata_i),
    .sm_req_o, .sm_addr_o, .sm_wdata_o, .sm_gnt_i,
    .ld_we_o, .ld_sel_o, .ld_data_o, .hold_o,
    .im_we_o, .im_addr_o, .im_wdata_o
  );

endmodule
