// icu_tb - loads the ICU registers, checks the start rule (Ra, Rjs and Rjn
// all written, hold low), pointer stepping on advance pulses, completion
// interrupt, register read back, and the serving-stage restart on a fetch of
// Rsai.
module icu_tb;
  import cim_pkg::*;
  localparam int AW = 16;
  localparam int JW = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, ld_we, hold, fetch, start, adv_src, adv_dst, done, busy, learned, irq, irq_clr;
  reg_sel_e ld_sel, rd_sel;
  logic [VEC_W-1:0] ld_data, rd_data;
  logic [AW-1:0] fetch_addr, src, dst;
  logic [JW-1:0] rem;
  job_op_t op;
  int checks = 0, failures = 0;

  icu #(.ADDR_W(AW), .JS_W(JW)) dut (
    .clk_i(clk), .rst_ni(rst_n), .ld_we_i(ld_we), .ld_sel_i(ld_sel), .ld_data_i(ld_data),
    .rd_sel_i(rd_sel), .rd_data_o(rd_data), .hold_i(hold), .fetch_i(fetch),
    .fetch_addr_i(fetch_addr), .start_o(start), .op_o(op), .src_addr_o(src),
    .dst_addr_o(dst), .remaining_o(rem), .adv_src_i(adv_src), .adv_dst_i(adv_dst),
    .done_i(done), .busy_o(busy), .learned_o(learned), .irq_o(irq), .irq_clr_i(irq_clr));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic ld(input reg_sel_e s, input logic [VEC_W-1:0] v);
    @(negedge clk); ld_we = 1; ld_sel = s; ld_data = v;
    #1 chk(!start || s == SEL_RJN || s == SEL_RJS || s == SEL_RA, "start only by a job register");
    @(negedge clk); ld_we = 0;
  endtask

  task automatic run_job(input int nsrc, input int sstep, input int dstep,
                         input logic [AW-1:0] a0, input logic [AW-1:0] d0);
    chk(busy, "busy after start");
    chk(src == a0 && dst == d0 && rem == JW'(nsrc), "pointers loaded at start");
    for (int i = 0; i < nsrc; i++) begin
      @(negedge clk); adv_src = 1; adv_dst = i[0];
      @(negedge clk); adv_src = 0; adv_dst = 0;
      chk(src == AW'(a0 + (i+1)*sstep), "operand pointer steps");
      chk(dst == AW'(d0 + ((i+1)/2)*dstep), "result pointer steps");
      chk(rem == JW'(nsrc - i - 1), "remaining count");
    end
    @(negedge clk); done = 1;
    @(negedge clk); done = 0;
    chk(!busy && irq, "done clears busy and raises irq");
    @(negedge clk); irq_clr = 1;
    @(negedge clk); irq_clr = 0;
    chk(!irq, "irq cleared");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nstart = 0;
  always @(posedge clk) if (rst_n && start) nstart++;

  initial begin
    rst_n = 0; ld_we = 0; ld_sel = SEL_RA; ld_data = 0; hold = 0; fetch = 0;
    fetch_addr = 0; adv_src = 0; adv_dst = 0; done = 0; irq_clr = 0; rd_sel = SEL_RA;
    repeat (2) @(negedge clk);
    rst_n = 1;
    hold = 1;
    ld(SEL_RSAI, 32'h0000_0030);
    ld(SEL_REAI, 32'h0000_0037);
    ld(SEL_RSDI, 32'h0002_0800);   // start 0x800, step 2
    ld(SEL_REDI, 32'h0000_0806);
    ld(SEL_RA,   32'h0000_0100);
    ld(SEL_RJS,  32'h0000_0008);
    chk(nstart == 0 && !busy, "no start before Rjn");
    ld(SEL_RJN,  32'h0000_0035);   // step 3, cumulative ADD... op 5 = cumulative SUB
    repeat (3) @(negedge clk);
    chk(nstart == 0 && !busy, "no start while hold is high");
    rd_sel = SEL_RJN;  #1 chk(rd_data[7:0] == 8'h35 && !rd_data[15], "Rjn read back, not busy");
    rd_sel = SEL_RSDI; #1 chk(rd_data[19:0] == 20'h2_0800, "Rsdi read back with step");
    rd_sel = SEL_REAI; #1 chk(rd_data[15:0] == 16'h0037, "Reai read back");
    chk(learned, "VIB loaded");
    hold = 0;
    @(negedge clk);
    chk(nstart == 1, "start once hold falls");
    chk(op.cumulative && op.fu == FU_SUB, "op-code decoded");
    rd_sel = SEL_RJN;  #1 chk(rd_data[15], "busy flag in Rjn");
    // a fetch of Rsai while busy must not restart
    fetch = 1; fetch_addr = 16'h30; #1 chk(!start, "no restart while busy");
    @(negedge clk); fetch = 0;
    run_job(8, 3, 2, 16'h100, 16'h800);
    chk(nstart == 1, "one start");
    // serving stage: fetch of another address does nothing, of Rsai restarts
    @(negedge clk); fetch = 1; fetch_addr = 16'h31;
    @(negedge clk); fetch_addr = 16'h30;
    @(negedge clk); fetch = 0;
    chk(nstart == 2, "restart on fetch of Rsai");
    run_job(8, 3, 2, 16'h100, 16'h800);
    // a new load of the three job registers starts a new job
    ld(SEL_RA, 32'h0000_0200);
    ld(SEL_RJS, 32'h0000_0004);
    @(negedge clk);
    chk(nstart == 2, "no start on two registers");
    ld(SEL_RJN, 32'h0000_0010);
    @(negedge clk);
    chk(nstart == 3, "start on the third register");
    run_job(4, 1, 2, 16'h200, 16'h800);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
