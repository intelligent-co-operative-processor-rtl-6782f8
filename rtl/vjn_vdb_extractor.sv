// vjn_vdb_extractor - finds what an iterative loop computes and where it
// writes.
//
// Every data word CPU_major reads is shifted into a two-entry operand window
// and folded into one running accumulator per functional unit. When
// CPU_major writes, the written word is compared with every functional unit's
// result on the last two operands (pairwise job) and with every accumulator
// (cumulative job). A mask of the comparisons that have held on every write
// of the current run is kept; when record_i marks the end of the loop, an
// encoder turns the mask into the job op-code (VJN), cumulative matches
// taking priority, then the lowest functional unit. The first and last write
// address of the run and the step between writes form the destination block
// (VDB). run_start_i (aligned with rd_valid_i of the run's first read)
// restarts the window. valid_o rises when a loop has been recorded with at
// least one write and one matching unit.
//
// Functional units, comparators and encoder follow the document; keeping a
// mask over all writes and the accumulators for cumulative jobs are this
// design's choices.
module vjn_vdb_extractor
  import cim_pkg::*;
#(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              enable_i,
  input  logic              clear_i,     // forget everything learned so far
  input  logic              rd_valid_i,   // read data of CPU_major on rd_data_i
  input  logic [DATA_W-1:0] rd_data_i,
  input  logic              run_start_i,  // this read starts a new run
  input  logic              wr_i,         // CPU_major data write this cycle
  input  logic [ADDR_W-1:0] wr_addr_i,
  input  logic [DATA_W-1:0] wr_data_i,
  input  logic              record_i,
  output logic              valid_o,
  output job_op_t           vjn_o,
  output logic [ADDR_W-1:0] vdb_start_o,
  output logic [ADDR_W-1:0] vdb_end_o,
  output logic [STEP_W-1:0] vdb_step_o
);

  logic [DATA_W-1:0]   d_prev_q, d_last_q;
  logic [DATA_W-1:0]   acc_q  [NUM_FU];
  logic [DATA_W-1:0]   pair_res [NUM_FU];
  logic [DATA_W-1:0]   acc_res  [NUM_FU][NUM_FU];
  logic [2*NUM_FU-1:0] match, mask_q;
  logic [ADDR_W-1:0]   wstart_q, wlast_q, wstep_q;
  logic                have_wr_q, have_step_q;
  job_op_t             code;
  logic                code_ok;

  fu_bank #(.DATA_W(DATA_W)) u_pair (.a_i(d_prev_q), .b_i(d_last_q), .res_o(pair_res));

  for (genvar f = 0; f < NUM_FU; f++) begin : g_acc
    fu_bank #(.DATA_W(DATA_W)) u_acc (.a_i(acc_q[f]), .b_i(rd_data_i), .res_o(acc_res[f]));
  end

  // comparators: bits [NUM_FU-1:0] pairwise, [2*NUM_FU-1:NUM_FU] cumulative
  always_comb begin
    for (int f = 0; f < NUM_FU; f++) begin
      match[f]          = (wr_data_i == pair_res[f]);
      match[NUM_FU + f] = (wr_data_i == acc_q[f]);
    end
  end

  // encoder
  always_comb begin
    code    = '0;
    code_ok = 1'b0;
    for (int f = NUM_FU - 1; f >= 0; f--) begin
      if (mask_q[f]) begin
        code    = '{rsvd: 1'b0, cumulative: 1'b0, fu: fu_sel_e'(f)};
        code_ok = 1'b1;
      end
    end
    for (int f = NUM_FU - 1; f >= 0; f--) begin
      if (mask_q[NUM_FU + f]) begin
        code    = '{rsvd: 1'b0, cumulative: 1'b1, fu: fu_sel_e'(f)};
        code_ok = 1'b1;
      end
    end
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni || clear_i) begin
      d_prev_q    <= '0;
      d_last_q    <= '0;
      for (int f = 0; f < NUM_FU; f++) acc_q[f] <= '0;
      mask_q      <= '1;
      wstart_q    <= '0;
      wlast_q     <= '0;
      wstep_q     <= '0;
      have_wr_q   <= 1'b0;
      have_step_q <= 1'b0;
      valid_o     <= 1'b0;
      vjn_o       <= '0;
      vdb_start_o <= '0;
      vdb_end_o   <= '0;
      vdb_step_o  <= '0;
    end else if (enable_i) begin
      if (rd_valid_i) begin
        d_prev_q <= d_last_q;
        d_last_q <= rd_data_i;
        for (int f = 0; f < NUM_FU; f++)
          acc_q[f] <= run_start_i ? rd_data_i : acc_res[f][f];
        if (run_start_i) begin
          mask_q      <= '1;
          have_wr_q   <= 1'b0;
          have_step_q <= 1'b0;
        end
      end else if (wr_i) begin
        mask_q  <= mask_q & match;
        wlast_q <= wr_addr_i;
        if (!have_wr_q) begin
          wstart_q  <= wr_addr_i;
          have_wr_q <= 1'b1;
        end else if (!have_step_q) begin
          wstep_q     <= wr_addr_i - wlast_q;
          have_step_q <= 1'b1;
        end
      end
      if (record_i && !valid_o) begin
        valid_o     <= have_wr_q && code_ok;
        vjn_o       <= code;
        vdb_start_o <= wstart_q;
        vdb_end_o   <= wlast_q;
        vdb_step_o  <= have_step_q ? wstep_q[STEP_W-1:0] : STEP_W'(1);
      end
    end
  end

endmodule
