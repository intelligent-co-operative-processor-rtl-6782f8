// itc - Information Transfer Control, the part of the observer that hands a
// learned loop over to the CPIM.
//
// Once all vectors are valid (vec_valid_i) it waits until CPU_major's data
// memory has been free for IDLE_CYCLES cycles in a row, then:
//   1. raises bus_req_o (the interrupt asking CPU_major for its buses) and
//      waits for bus_ack_i; own_o is high from then until the end;
//   2. writes the seven ICU registers, one per cycle (VIB, VDB, then Ra, Rjs
//      and Rjn), with hold_o high so the job does not start yet;
//   3. copies the operand block, VJS words from VSA in steps of the operand
//      step, from the data memory to the same addresses of the shared memory
//      (read in one cycle, write when the shared memory grants);
//   4. writes the NOP code over every word of the instruction block VIB;
//   5. pulses dtc_o (data transfer complete), drops bus_req_o and hold_o, and
//      stays done (done_o) - the CPIM then starts the job.
// The sequence follows the document; the idle count, the register order and
// the one-word-per-cycle timing are this design's choices. The transfer takes
// 1 + 7 + 2*VJS + (VIB length) + 1 cycles after the acknowledge, plus any
// shared-memory refusals; xfer_cycles_o counts the cycles from bus_req_o to
// dtc_o.
// Output bits that never vary by design: im_wdata_o is always the NOP word,
// ld_data_o above bit ADDR_W+3 is zero (no register is wider), and
// sm_wdata_o is dm_rdata_i passed straight through.
module itc
  import cim_pkg::*;
#(
  parameter int unsigned ADDR_W      = 20,
  parameter int unsigned DATA_W      = 16,
  parameter int unsigned JS_W        = 20,
  parameter int unsigned IDLE_CYCLES = 4
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // learned vectors
  input  logic              vec_valid_i,
  input  logic [ADDR_W-1:0] vsa_i,
  input  logic [JS_W-1:0]   vjs_i,
  input  logic [STEP_W-1:0] vsa_step_i,
  input  job_op_t           vjn_i,
  input  logic [ADDR_W-1:0] vdb_start_i,
  input  logic [ADDR_W-1:0] vdb_end_i,
  input  logic [STEP_W-1:0] vdb_step_i,
  input  logic [ADDR_W-1:0] vib_start_i,
  input  logic [ADDR_W-1:0] vib_end_i,
  // CPU_major activity and bus hand-over
  input  logic              dm_busy_i,
  output logic              bus_req_o,
  input  logic              bus_ack_i,
  output logic              own_o,
  output logic              dtc_o,
  output logic              done_o,
  output logic [31:0]       xfer_cycles_o,
  // data memory (read only)
  output logic              dm_req_o,
  output logic [ADDR_W-1:0] dm_addr_o,
  input  logic [DATA_W-1:0] dm_rdata_i,
  // shared memory (write only)
  output logic              sm_req_o,
  output logic [ADDR_W-1:0] sm_addr_o,
  output logic [DATA_W-1:0] sm_wdata_o,
  input  logic              sm_gnt_i,
  // ICU register load
  output logic              ld_we_o,
  output reg_sel_e          ld_sel_o,
  output logic [VEC_W-1:0]  ld_data_o,
  output logic              hold_o,
  // instruction memory (write only)
  output logic              im_we_o,
  output logic [ADDR_W-1:0] im_addr_o,
  output logic [DATA_W-1:0] im_wdata_o
);

  typedef enum logic [3:0] {
    T_IDLE, T_WAIT_FREE, T_REQ, T_LOAD, T_COPY_RD, T_COPY_WR, T_NOP, T_DTC, T_DONE
  } tstate_e;

  tstate_e           state_q;
  logic [7:0]        idle_q;
  reg_sel_e          sel_q;
  logic [ADDR_W-1:0] ptr_q;
  logic [JS_W-1:0]   cnt_q;

  assign own_o      = (state_q inside {T_LOAD, T_COPY_RD, T_COPY_WR, T_NOP, T_DTC});
  assign bus_req_o  = (state_q inside {T_REQ, T_LOAD, T_COPY_RD, T_COPY_WR, T_NOP});
  assign hold_o     = own_o;
  assign dtc_o      = (state_q == T_DTC);
  assign done_o     = (state_q == T_DONE);

  assign ld_we_o    = (state_q == T_LOAD);
  assign ld_sel_o   = sel_q;
  assign dm_req_o   = (state_q == T_COPY_RD);
  assign dm_addr_o  = ptr_q;
  assign sm_req_o   = (state_q == T_COPY_WR);
  assign sm_addr_o  = ptr_q;
  assign sm_wdata_o = dm_rdata_i;
  assign im_we_o    = (state_q == T_NOP);
  assign im_addr_o  = ptr_q;
  assign im_wdata_o = {OPC_NOP, {(DATA_W-4){1'b0}}};

  always_comb begin
    ld_data_o = '0;
    unique case (sel_q)
      SEL_RA:   ld_data_o[ADDR_W-1:0] = vsa_i;
      SEL_RJS:  ld_data_o[JS_W-1:0]   = vjs_i;
      SEL_RJN:  ld_data_o[7:0]        = {vsa_step_i, 4'(vjn_i)};
      SEL_RSAI: ld_data_o[ADDR_W-1:0] = vib_start_i;
      SEL_REAI: ld_data_o[ADDR_W-1:0] = vib_end_i;
      SEL_RSDI: begin
        ld_data_o[ADDR_W-1:0]       = vdb_start_i;
        ld_data_o[ADDR_W +: STEP_W] = vdb_step_i;
      end
      SEL_REDI: ld_data_o[ADDR_W-1:0] = vdb_end_i;
      default: ;
    endcase
  end

  // register load order: VIB, VDB, then the three that start the job
  function automatic reg_sel_e next_sel(reg_sel_e s);
    unique case (s)
      SEL_RSAI: return SEL_REAI;
      SEL_REAI: return SEL_RSDI;
      SEL_RSDI: return SEL_REDI;
      SEL_REDI: return SEL_RA;
      SEL_RA:   return SEL_RJS;
      SEL_RJS:  return SEL_RJN;
      default:  return SEL_RSAI;
    endcase
  endfunction

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state_q       <= T_IDLE;
      idle_q        <= '0;
      sel_q         <= SEL_RSAI;
      ptr_q         <= '0;
      cnt_q         <= '0;
      xfer_cycles_o <= '0;
    end else begin
      if (bus_req_o) xfer_cycles_o <= xfer_cycles_o + 1'b1;
      unique case (state_q)
        T_IDLE: if (vec_valid_i) begin
          state_q <= T_WAIT_FREE;
          idle_q  <= '0;
        end
        T_WAIT_FREE: begin
          if (dm_busy_i) idle_q <= '0;
          else if (idle_q >= 8'(IDLE_CYCLES - 1)) state_q <= T_REQ;
          else idle_q <= idle_q + 1'b1;
        end
        T_REQ: if (bus_ack_i) begin
          state_q <= T_LOAD;
          sel_q   <= SEL_RSAI;
        end
        T_LOAD: begin
          sel_q <= next_sel(sel_q);
          if (sel_q == SEL_RJN) begin
            state_q <= (vjs_i != '0) ? T_COPY_RD : T_NOP;
            ptr_q   <= (vjs_i != '0) ? vsa_i : vib_start_i;
            cnt_q   <= vjs_i;
          end
        end
        T_COPY_RD: state_q <= T_COPY_WR;
        T_COPY_WR: if (sm_gnt_i) begin
          if (cnt_q == JS_W'(1)) begin
            state_q <= T_NOP;
            ptr_q   <= vib_start_i;
          end else begin
            state_q <= T_COPY_RD;
            ptr_q   <= ptr_q + ADDR_W'(vsa_step_i);
          end
          cnt_q <= cnt_q - 1'b1;
        end
        T_NOP: begin
          if (ptr_q >= vib_end_i) state_q <= T_DTC;
          else ptr_q <= ptr_q + 1'b1;
        end
        T_DTC:  state_q <= T_DONE;
        T_DONE: ;
        default: state_q <= T_IDLE;
      endcase
    end
  end

  // the buses are only driven after CPU_major has acknowledged
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   (own_o && !dtc_o) |-> bus_ack_i);

endmodule
