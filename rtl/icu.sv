// icu - Iteration Control Unit of the CPIM.
//
// Holds the vectors that describe one iterative loop and steps CPU_minor
// through it:
//   Ra   operand block start (VSA)       Rjs  number of operands (VJS)
//   Rjn  job nature: [3:0] op-code (VJN), [7:4] operand address step
//   Rsai/Reai  first/last address of the bypassed instruction block (VIB)
//   Rsdi/Redi  first/last result address (VDB); Rsdi also carries the
//              result address step in bits [ADDR_W+3:ADDR_W]
// Registers are written through ld_we_i/ld_sel_i/ld_data_i and read back
// combinationally through rd_sel_i/rd_data_o; reading Rjn also returns the
// busy flag in bit 15.
//
// Start: as in the document, the job starts once Ra, Rjs and Rjn have all
// been written since the last start. This design adds hold_i, which delays
// the start while a loader is still copying the operands into the shared
// memory. In the serving stage the job starts again, on the registers it
// already holds, when CPU_major fetches the first word of the bypassed
// instruction block (fetch_i with fetch_addr_i == Rsai); this trigger is
// this design's reading of how the learned loop is re-run.
//
// Run: start_o pulses for one cycle, busy_o rises, the operand pointer is
// loaded from Ra and the result pointer from Rsdi. CPU_minor pulses
// adv_src_i for each operand it fetches (pointer += operand step, count -= 1)
// and adv_dst_i for each result it writes (pointer += result step). When it
// pulses done_i, busy_o falls and irq_o is set until irq_clr_i.
// rd_data_o is VEC_W bits wide; bits above the widest register (ADDR_W+4)
// read as zero.
module icu
  import cim_pkg::*;
#(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned JS_W   = 20
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // register load / read back
  input  logic              ld_we_i,
  input  reg_sel_e          ld_sel_i,
  input  logic [VEC_W-1:0]  ld_data_i,
  input  reg_sel_e          rd_sel_i,
  output logic [VEC_W-1:0]  rd_data_o,
  input  logic              hold_i,
  // CPU_major instruction fetch (serving-stage trigger)
  input  logic              fetch_i,
  input  logic [ADDR_W-1:0] fetch_addr_i,
  // CPU_minor
  output logic              start_o,
  output job_op_t           op_o,
  output logic [ADDR_W-1:0] src_addr_o,
  output logic [ADDR_W-1:0] dst_addr_o,
  output logic [JS_W-1:0]   remaining_o,
  input  logic              adv_src_i,
  input  logic              adv_dst_i,
  input  logic              done_i,
  // status
  output logic              busy_o,
  output logic              learned_o,  // a bypassed block (VIB) is loaded
  output logic              irq_o,
  input  logic              irq_clr_i
);

  logic [ADDR_W-1:0] ra_q, rsai_q, reai_q, rsdi_q, redi_q;
  logic [JS_W-1:0]   rjs_q;
  logic [7:0]        rjn_q;
  logic [STEP_W-1:0] dstep_q;
  logic              ld_ra_q, ld_rjs_q, ld_rjn_q, ld_sai_q, ld_eai_q;
  logic              start_load, start_serve;

  assign learned_o   = ld_sai_q && ld_eai_q;
  assign start_load  = ld_ra_q && ld_rjs_q && ld_rjn_q && !hold_i && !busy_o;
  assign start_serve = fetch_i && learned_o && (fetch_addr_i == rsai_q)
                       && !hold_i && !busy_o;
  assign start_o     = start_load || start_serve;
  assign op_o        = job_op_t'(rjn_q[3:0]);

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      ra_q <= '0; rsai_q <= '0; reai_q <= '0; rsdi_q <= '0; redi_q <= '0;
      rjs_q <= '0; rjn_q <= '0; dstep_q <= '0;
      ld_ra_q <= 1'b0; ld_rjs_q <= 1'b0; ld_rjn_q <= 1'b0;
      ld_sai_q <= 1'b0; ld_eai_q <= 1'b0;
      busy_o <= 1'b0; irq_o <= 1'b0;
      src_addr_o <= '0; dst_addr_o <= '0; remaining_o <= '0;
    end else begin
      if (ld_we_i) begin
        unique case (ld_sel_i)
          SEL_RA:   begin ra_q  <= ld_data_i[ADDR_W-1:0]; ld_ra_q  <= 1'b1; end
          SEL_RJS:  begin rjs_q <= ld_data_i[JS_W-1:0];   ld_rjs_q <= 1'b1; end
          SEL_RJN:  begin rjn_q <= ld_data_i[7:0];        ld_rjn_q <= 1'b1; end
          SEL_RSAI: begin rsai_q <= ld_data_i[ADDR_W-1:0]; ld_sai_q <= 1'b1; end
          SEL_REAI: begin reai_q <= ld_data_i[ADDR_W-1:0]; ld_eai_q <= 1'b1; end
          SEL_RSDI: begin
            rsdi_q  <= ld_data_i[ADDR_W-1:0];
            dstep_q <= ld_data_i[ADDR_W +: STEP_W];
          end
          SEL_REDI: redi_q <= ld_data_i[ADDR_W-1:0];
          default: ;
        endcase
      end
      if (start_o) begin
        busy_o      <= 1'b1;
        src_addr_o  <= ra_q;
        dst_addr_o  <= rsdi_q;
        remaining_o <= rjs_q;
        ld_ra_q <= 1'b0; ld_rjs_q <= 1'b0; ld_rjn_q <= 1'b0;
      end else if (busy_o) begin
        if (adv_src_i) begin
          src_addr_o  <= src_addr_o + ADDR_W'(rjn_q[7:4]);
          remaining_o <= remaining_o - 1'b1;
        end
        if (adv_dst_i) dst_addr_o <= dst_addr_o + ADDR_W'(dstep_q);
        if (done_i) begin
          busy_o <= 1'b0;
          irq_o  <= 1'b1;
        end
      end
      if (irq_clr_i && !(busy_o && done_i)) irq_o <= 1'b0;
    end
  end

  always_comb begin
    rd_data_o = '0;
    unique case (rd_sel_i)
      SEL_RA:   rd_data_o[ADDR_W-1:0] = ra_q;
      SEL_RJS:  rd_data_o[JS_W-1:0]   = rjs_q;
      SEL_RJN:  begin rd_data_o[7:0] = rjn_q; rd_data_o[15] = busy_o; end
      SEL_RSAI: rd_data_o[ADDR_W-1:0] = rsai_q;
      SEL_REAI: rd_data_o[ADDR_W-1:0] = reai_q;
      SEL_RSDI: begin
        rd_data_o[ADDR_W-1:0]       = rsdi_q;
        rd_data_o[ADDR_W +: STEP_W] = dstep_q;
      end
      SEL_REDI: rd_data_o[ADDR_W-1:0] = redi_q;
      default: ;
    endcase
  end

  // The start trigger is a single-cycle pulse and never fires while busy.
  assert property (@(posedge clk_i) disable iff (!rst_ni) start_o |-> !busy_o);

endmodule
