// itc_tb - gives the transfer controller a set of learned vectors and plays
// CPU_major (acknowledge after a delay), the data memory (one-cycle reads),
// the shared memory (random refusals) and the instruction memory. Checks that
// the bus is requested only after the data memory has been idle for
// IDLE_CYCLES, the seven register loads with their values and order under
// hold, the copied block, the NOP writes over the instruction block, the DTC
// pulse and release, and the transfer cycle count.
module itc_tb;
  import cim_pkg::*;
  localparam int AW = 12;
  localparam int DW = 16;
  localparam int JW = 16;
  localparam int IDLE = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, vv, dm_busy, breq, back, own, dtc, done;
  logic dm_req, sm_req, sm_gnt, ld_we, hold, im_we;
  logic [AW-1:0] vsa, vdbs, vdbe, vibs, vibe, dm_addr, sm_addr, im_addr;
  logic [JW-1:0] vjs;
  logic [STEP_W-1:0] sstep, dstep;
  job_op_t vjn;
  logic [15:0] xfer;
  logic [DW-1:0] dm_rdata, sm_wdata, im_wdata;
  reg_sel_e ld_sel;
  logic [VEC_W-1:0] ld_data;
  logic [DW-1:0] dm [2**AW];
  logic [DW-1:0] smem [2**AW];
  logic [DW-1:0] im [2**AW];
  int checks = 0, failures = 0, refusals = 0, nown = 0, nld = 0, ndtc = 0, idle_run = 0;
  reg_sel_e exp_order [7] = '{SEL_RSAI, SEL_REAI, SEL_RSDI, SEL_REDI, SEL_RA, SEL_RJS, SEL_RJN};

  itc #(.ADDR_W(AW), .DATA_W(DW), .JS_W(JW), .IDLE_CYCLES(IDLE)) dut (
    .clk_i(clk), .rst_ni(rst_n), .vec_valid_i(vv), .vsa_i(vsa), .vjs_i(vjs),
    .vsa_step_i(sstep), .vjn_i(vjn), .vdb_start_i(vdbs), .vdb_end_i(vdbe),
    .vdb_step_i(dstep), .vib_start_i(vibs), .vib_end_i(vibe), .dm_busy_i(dm_busy),
    .bus_req_o(breq), .bus_ack_i(back), .own_o(own), .dtc_o(dtc), .done_o(done),
    .xfer_cycles_o(xfer), .dm_req_o(dm_req), .dm_addr_o(dm_addr), .dm_rdata_i(dm_rdata),
    .sm_req_o(sm_req), .sm_addr_o(sm_addr), .sm_wdata_o(sm_wdata), .sm_gnt_i(sm_gnt),
    .ld_we_o(ld_we), .ld_sel_o(ld_sel), .ld_data_o(ld_data), .hold_o(hold),
    .im_we_o(im_we), .im_addr_o(im_addr), .im_wdata_o(im_wdata));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // memories, CPU_major and checks on every cycle
  logic breq_q;
  always @(posedge clk) begin
    if (rst_n) begin
      breq_q <= breq;
      idle_run = dm_busy ? 0 : idle_run + 1;
      if (breq && !breq_q) chk(idle_run >= IDLE, "bus requested only after the idle period");
      if (dm_req) dm_rdata <= dm[dm_addr];
      if (sm_req && !sm_gnt) refusals++;
      if (sm_req && sm_gnt) smem[sm_addr] <= sm_wdata;
      if (im_we) im[im_addr] <= im_wdata;
      if ((dm_req || sm_req || ld_we || im_we) && !own) chk(0, "bus driven without ownership");
      if (ld_we) begin
        chk(hold, "hold high during register load");
        chk(nld < 7 && ld_sel == exp_order[nld], "register load order");
        case (ld_sel)
          SEL_RA:   chk(ld_data[AW-1:0] == vsa, "Ra value");
          SEL_RJS:  chk(ld_data[JW-1:0] == vjs, "Rjs value");
          SEL_RJN:  chk(ld_data[7:0] == {sstep, 4'(vjn)}, "Rjn value");
          SEL_RSAI: chk(ld_data[AW-1:0] == vibs, "Rsai value");
          SEL_REAI: chk(ld_data[AW-1:0] == vibe, "Reai value");
          SEL_RSDI: chk(ld_data[AW+STEP_W-1:0] == {dstep, vdbs}, "Rsdi value");
          SEL_REDI: chk(ld_data[AW-1:0] == vdbe, "Redi value");
          default:  chk(0, "bad selector");
        endcase
        nld++;
      end
      if (dtc) ndtc++;
      if (own && !dtc) nown++;
    end
  end
  always @(negedge clk) sm_gnt <= ($urandom % 3) != 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; vv = 0; dm_busy = 0; back = 0;
    vsa = 12'h100; vjs = 16'd12; sstep = 4'd2; vjn = '{rsvd: 0, cumulative: 1, fu: FU_OR};
    vdbs = 12'h800; vdbe = 12'h80B; dstep = 4'd1; vibs = 12'h020; vibe = 12'h027;
    for (int i = 0; i < 2**AW; i++) begin dm[i] = DW'($urandom); smem[i] = '0; im[i] = 16'hFFFF; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // CPU_major busy on the data memory for a while after the vectors are valid
    vv = 1;
    for (int i = 0; i < 20; i++) begin @(negedge clk); dm_busy = (i % 3 != 2); end
    chk(!breq, "no request while the data memory is busy");
    @(negedge clk); dm_busy = 0;
    while (!breq) @(negedge clk);
    repeat (5) @(negedge clk);
    chk(!own && nld == 0, "nothing happens before the acknowledge");
    back = 1;
    while (breq) @(negedge clk);
    chk(dtc, "DTC pulses when the bus is released");
    back = 0;
    @(negedge clk);
    chk(done && !own && !hold, "done, buses released");
    chk(nld == 7, "seven registers loaded");
    for (int i = 0; i < 12; i++)
      chk(smem[12'h100 + 2*i] == dm[12'h100 + 2*i], "operand copied to the shared memory");
    chk(smem[12'h101] == '0, "words between operands not copied");
    for (int a = 12'h01F; a <= 12'h028; a++)
      chk((a >= 12'h020 && a <= 12'h027) ? im[a] == '0 : im[a] == 16'hFFFF, "NOP overwrite of the block only");
    chk(nown == 7 + 2*12 + refusals + 8, $sformatf("transfer took %0d cycles", nown));
    chk(32'(xfer) > nown, "transfer cycle counter covers the hand-over");
    repeat (20) @(negedge clk);
    chk(ndtc == 1 && !breq, "one transfer only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
