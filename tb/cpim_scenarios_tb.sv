// cpim_scenarios_tb - the two CPIM workloads at full size, on the CPIM with
// its default parameters (2^20-word shared memory, 20-bit job size).
//   Scenario 1, cumulative successive addition: y = 1,000,000 operands at
//     address 0, one result at the top word of the memory.
//   Scenario 2, non-cumulative successive addition: y = 600,000 operands at
//     address 0, y/2 results from address 600,000 on; operands and results
//     together fill 900,000 of the 1,048,576 words.
// Operands come from the formula d(i) = (i * 40503 + 7) ^ (i >> 5), truncated
// to 16 bits, and are written through the external port, as CPU_major would.
// The loop vectors are then stored into the ICU registers and the test waits
// for the interrupt. Checked: every result against a reference computed here,
// the job's cycle count (1 + 3 + 2(y-2) + 2 cumulative, 1 + 3(y/2) + 1
// pairwise), and the speedup over a non-pipelined sequential machine that
// spends 5 cycles per iteration (fetch, decode, two operand fetches,
// execute and write back): the pairwise job must come within 0.1% of 5/3.
module cpim_scenarios_tb;
  import cim_pkg::*;
  localparam int AW = 20;
  localparam int DW = 16;
  localparam int Y1 = 1_000_000;
  localparam int Y2 = 600_000;
  localparam logic [AW-1:0] R1 = '1;            // scenario 1 result address
  localparam logic [AW-1:0] R2 = AW'(Y2);       // scenario 2 first result

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, ereq, ewe, egnt, ervalid, estolen, ld_we, hold, fetch;
  logic busy, learned, start, irq, irq_clr;
  logic [AW-1:0] eaddr, faddr;
  logic [DW-1:0] ewd, erd;
  reg_sel_e ld_sel, rd_sel;
  logic [VEC_W-1:0] ld_data, rd_data;
  int checks = 0, failures = 0;
  longint busy_cycles = 0;

  cpim dut (
    .clk_i(clk), .rst_ni(rst_n),
    .ext_req_i(ereq), .ext_we_i(ewe), .ext_addr_i(eaddr), .ext_wdata_i(ewd),
    .ext_gnt_o(egnt), .ext_rvalid_o(ervalid), .ext_rdata_o(erd), .ext_stolen_o(estolen),
    .ld_we_i(ld_we), .ld_sel_i(ld_sel), .ld_data_i(ld_data), .rd_sel_i(rd_sel),
    .rd_data_o(rd_data), .hold_i(hold), .fetch_i(fetch), .fetch_addr_i(faddr),
    .busy_o(busy), .learned_o(learned), .start_o(start), .irq_o(irq), .irq_clr_i(irq_clr));

  always @(posedge clk) if (rst_n && busy) busy_cycles++;

  function automatic logic [DW-1:0] d(int i);
    return DW'((i * 40503 + 7) ^ (i >> 5));
  endfunction

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // one external access; the CPIM is idle, so it is granted at once
  task automatic sm(input bit we, input logic [AW-1:0] a, input logic [DW-1:0] wd,
                    output logic [DW-1:0] rd);
    @(negedge clk); ereq = 1; ewe = we; eaddr = a; ewd = wd;
    @(posedge clk);
    while (!egnt) @(posedge clk);
    @(negedge clk); ereq = 0;
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
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] v, acc;
  longint b0;
  int cyc;
  int bad;
  real s;

  initial begin
    rst_n = 0; ereq = 0; ewe = 0; eaddr = 0; ewd = 0; ld_we = 0; ld_sel = SEL_RA;
    ld_data = 0; hold = 0; fetch = 0; faddr = 0; irq_clr = 0; rd_sel = SEL_RA;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- scenario 1: cumulative addition
    acc = '0;
    for (int i = 0; i < Y1; i++) begin
      sm(1, AW'(i), d(i), v);
      acc += d(i);
    end
    ld(SEL_RSDI, (32'd1 << AW) | 32'(R1));
    ld(SEL_RA,   32'd0);
    ld(SEL_RJS,  32'(Y1));
    b0 = busy_cycles;
    ld(SEL_RJN,  32'h14);                  // step 1, cumulative ADD
    wait_irq();
    cyc = int'(busy_cycles - b0);
    chk(cyc == 1 + 3 + 2*(Y1-2) + 2, $sformatf("scenario 1 took %0d cycles", cyc));
    sm(0, R1, '0, v);
    chk(v == acc, "scenario 1 result");
    s = 5.0 * (Y1 - 1) / real'(cyc);
    $display("scenario 1: y=%0d, %0d cycles, speedup over 5-cycle SISD %.3f", Y1, cyc, s);

    // ---- scenario 2: pairwise addition
    for (int i = 0; i < Y2; i++) sm(1, AW'(i), d(i), v);
    ld(SEL_RSDI, (32'd1 << AW) | 32'(R2));
    ld(SEL_REDI, 32'(R2 + AW'(Y2/2 - 1)));
    ld(SEL_RA,   32'd0);
    ld(SEL_RJS,  32'(Y2));
    b0 = busy_cycles;
    ld(SEL_RJN,  32'h10);                  // step 1, pairwise ADD
    wait_irq();
    cyc = int'(busy_cycles - b0);
    chk(cyc == 1 + 3*(Y2/2) + 1, $sformatf("scenario 2 took %0d cycles", cyc));
    s = 5.0 * (Y2/2) / real'(cyc);
    $display("scenario 2: y=%0d, %0d cycles, speedup over 5-cycle SISD %.4f", Y2, cyc, s);
    chk(s > 5.0/3.0 * 0.999 && s <= 5.0/3.0, "scenario 2 speedup 5/3");
    bad = 0;
    for (int k = 0; k < Y2/2; k++) begin
      sm(0, R2 + AW'(k), '0, v);
      if (v != DW'(d(2*k) + d(2*k+1))) bad++;
    end
    chk(bad == 0, $sformatf("scenario 2: %0d of %0d results wrong", bad, Y2/2));
    // the operands are untouched (the jobs are non-destructive)
    bad = 0;
    for (int i = 0; i < Y2; i += 997) begin
      sm(0, AW'(i), '0, v);
      if (v != d(i)) bad++;
    end
    chk(bad == 0, "operands unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
