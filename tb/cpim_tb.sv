// cpim_tb - the CPIM as in its first, software-loaded form: the test bench
// plays CPU_major, writes operands into the shared memory, stores the loop
// vectors into the ICU registers and waits for the interrupt. Checked: both
// document scenarios (cumulative and pairwise addition), the job starts only
// when Ra, Rjs and Rjn are loaded, CPU_minor's cycle count (3 cycles per
// pairwise iteration), external reads during the job get only free cycles
// and return the right data, and a fetch of Rsai re-runs the job on new data.
module cpim_tb;
  import cim_pkg::*;
  localparam int AW = 12;
  localparam int DW = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, ereq, ewe, egnt, ervalid, estolen, ld_we, hold, fetch;
  logic busy, learned, start, irq, irq_clr;
  logic [AW-1:0] eaddr, faddr;
  logic [DW-1:0] ewd, erd;
  reg_sel_e ld_sel, rd_sel;
  logic [VEC_W-1:0] ld_data, rd_data;
  int checks = 0, failures = 0, busy_cycles = 0, stolen = 0;

  cpim #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .ext_req_i(ereq), .ext_we_i(ewe), .ext_addr_i(eaddr), .ext_wdata_i(ewd),
    .ext_gnt_o(egnt), .ext_rvalid_o(ervalid), .ext_rdata_o(erd), .ext_stolen_o(estolen),
    .ld_we_i(ld_we), .ld_sel_i(ld_sel), .ld_data_i(ld_data), .rd_sel_i(rd_sel),
    .rd_data_o(rd_data), .hold_i(hold), .fetch_i(fetch), .fetch_addr_i(faddr),
    .busy_o(busy), .learned_o(learned), .start_o(start), .irq_o(irq), .irq_clr_i(irq_clr));

  always @(posedge clk) begin
    if (rst_n && busy) busy_cycles++;
    if (rst_n && estolen) stolen++;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic sm(input bit we, input logic [AW-1:0] a, input logic [DW-1:0] wd,
                    output logic [DW-1:0] rd, output int waits);
    waits = 0;
    @(negedge clk); ereq = 1; ewe = we; eaddr = a; ewd = wd;
    @(posedge clk);
    while (!egnt) begin waits++; @(posedge clk); end
    @(negedge clk); ereq = 0;
    if (!we) chk(ervalid, "read valid");
    rd = erd;
  endtask

  task automatic ld(input reg_sel_e s, input logic [VEC_W-1:0] v);
    @(negedge clk); ld_we = 1; ld_sel = s; ld_data = v;
    @(negedge clk); ld_we = 0;
  endtask

  task automatic wait_irq();
    while (!irq) @(negedge clk);
    irq_clr = 1; @(negedge clk); irq_clr = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] d [64];
  logic [DW-1:0] v, acc;
  int w, b0, total_waits;

  initial begin
    rst_n = 0; ereq = 0; ewe = 0; eaddr = 0; ewd = 0; ld_we = 0; ld_sel = SEL_RA;
    ld_data = 0; hold = 0; fetch = 0; faddr = 0; irq_clr = 0; rd_sel = SEL_RA;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- scenario 1: cumulative addition of 20 words at 0x040 into 0x300
    for (int i = 0; i < 20; i++) begin d[i] = DW'($urandom); sm(1, AW'(12'h040 + i), d[i], v, w); end
    acc = 0;
    for (int i = 0; i < 20; i++) acc += d[i];
    ld(SEL_RSDI, (32'd1 << AW) | 32'h300);   // result step 1 above the address
    ld(SEL_RA,   32'h040);
    ld(SEL_RJS,  32'd20);
    chk(!busy, "idle before Rjn is loaded");
    b0 = busy_cycles;
    ld(SEL_RJN,  32'h14);          // step 1, cumulative ADD
    wait_irq();
    chk(busy_cycles - b0 == 1 + 3 + 2*18 + 2, $sformatf("cumulative job took %0d cycles", busy_cycles - b0));
    sm(0, 12'h300, 0, v, w);
    chk(v == acc, "scenario 1 result");

    // ---- scenario 2: pairwise addition of 32 words at 0x080 into 0x400..
    for (int i = 0; i < 32; i++) begin d[i] = DW'($urandom); sm(1, AW'(12'h080 + i), d[i], v, w); end
    ld(SEL_RSAI, 32'h010);
    ld(SEL_REAI, 32'h015);
    ld(SEL_RSDI, (32'd1 << AW) | 32'h400);
    ld(SEL_REDI, 32'h040F);
    ld(SEL_RA,   32'h080);
    ld(SEL_RJS,  32'd32);
    b0 = busy_cycles;
    ld(SEL_RJN,  32'h10);          // step 1, pairwise ADD
    // external reads during the job: only free cycles are granted
    total_waits = 0;
    for (int i = 0; i < 4; i++) begin
      sm(0, AW'(12'h080 + i), 0, v, w);
      total_waits += w;
      chk(v == d[i], "read during the job returns the operand");
    end
    chk(total_waits > 0, "external reads waited for CPU_minor");
    wait_irq();
    chk(busy_cycles - b0 == 1 + 3*16 + 1, $sformatf("pairwise job took %0d cycles", busy_cycles - b0));
    chk(stolen >= 1, "cycles stolen during the job (the pairwise burst leaves only its setup and done cycles free)");
    for (int k = 0; k < 16; k++) begin
      sm(0, AW'(12'h400 + k), 0, v, w);
      chk(v == DW'(d[2*k] + d[2*k+1]), "scenario 2 result");
    end

    // ---- serving stage: new operands, fetch of Rsai re-runs the job
    for (int i = 0; i < 32; i++) begin d[i] = DW'($urandom); sm(1, AW'(12'h080 + i), d[i], v, w); end
    @(negedge clk); fetch = 1; faddr = 12'h011;
    @(negedge clk); chk(!busy, "fetch elsewhere does not start");
    faddr = 12'h010;
    @(negedge clk); fetch = 0;
    chk(busy, "fetch of Rsai starts the job");
    wait_irq();
    for (int k = 0; k < 16; k++) begin
      sm(0, AW'(12'h400 + k), 0, v, w);
      chk(v == DW'(d[2*k] + d[2*k+1]), "serving-stage result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
