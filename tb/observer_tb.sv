// observer_tb - plays CPU_major's instruction and data buses while it runs,
// first, a read-only scan loop (no writes: must be dropped and forgotten),
// then a pairwise SUB loop that must be learned. The test bench answers the
// observer's data-memory reads, grants its shared-memory writes and records
// its register loads and instruction-memory writes, then checks the learned
// vectors, the copied operands and the NOP overwrite.
module observer_tb;
  import cim_pkg::*;
  localparam int AW = 16;
  localparam int DW = 16;
  localparam int K  = 10;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, fetch, dm_req, dm_we, breq, back, own, dtc, done, recorded;
  logic o_dm_req, o_sm_req, ld_we, hold, im_we;
  logic [AW-1:0] faddr, dm_addr, o_dm_addr, o_sm_addr, im_addr;
  logic [DW-1:0] instr, dm_wdata, dm_rdata, o_sm_wdata, im_wdata;
  logic [15:0] xfer;
  reg_sel_e ld_sel;
  logic [VEC_W-1:0] ld_data;
  logic [VEC_W-1:0] regs [8];
  logic [DW-1:0] dm [2**AW];
  logic [DW-1:0] smem [2**AW];
  int checks = 0, failures = 0, nrec = 0, nnop = 0;

  observer #(.ADDR_W(AW), .DATA_W(DW), .LOOP_THRESH(8), .IDLE_CYCLES(4)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .mon_fetch_i(fetch), .mon_fetch_addr_i(faddr), .mon_instr_i(instr),
    .mon_dm_req_i(dm_req), .mon_dm_we_i(dm_we), .mon_dm_addr_i(dm_addr),
    .mon_dm_wdata_i(dm_wdata), .mon_dm_rdata_i(dm_rdata),
    .bus_req_o(breq), .bus_ack_i(back), .own_o(own), .dtc_o(dtc), .done_o(done),
    .recorded_o(recorded), .xfer_cycles_o(xfer),
    .dm_req_o(o_dm_req), .dm_addr_o(o_dm_addr),
    .sm_req_o(o_sm_req), .sm_addr_o(o_sm_addr), .sm_wdata_o(o_sm_wdata), .sm_gnt_i(1'b1),
    .ld_we_o(ld_we), .ld_sel_o(ld_sel), .ld_data_o(ld_data), .hold_o(hold),
    .im_we_o(im_we), .im_addr_o(im_addr), .im_wdata_o(im_wdata));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // memories seen by the observer: read data one cycle after the request
  always @(posedge clk) begin
    if (own && o_dm_req) dm_rdata <= dm[o_dm_addr];
    else if (dm_req && !dm_we) dm_rdata <= dm[dm_addr];
    if (dm_req && dm_we) dm[dm_addr] = dm_wdata;
    if (rst_n && o_sm_req) smem[o_sm_addr] = o_sm_wdata;
    if (rst_n && ld_we) regs[ld_sel] = ld_data;
    if (rst_n && im_we) begin
      nnop++;
      chk(im_wdata[15:12] == OPC_NOP, "NOP code written");
    end
    if (rst_n && recorded) nrec++;
  end

  // one CPU_major instruction: fetch, then an optional data access
  task automatic step(input logic [AW-1:0] pc, input logic [3:0] opc,
                      input int acc, input logic [AW-1:0] a, input logic [DW-1:0] wd);
    @(negedge clk); fetch = 1; faddr = pc;
    @(negedge clk); fetch = 0; instr = {opc, 12'h0};
    if (acc != 0) begin
      dm_req = 1; dm_we = (acc == 2); dm_addr = a; dm_wdata = wd;
      @(negedge clk); dm_req = 0; dm_we = 0;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; fetch = 0; faddr = 0; instr = 0; dm_req = 0; dm_we = 0; dm_addr = 0;
    dm_wdata = 0; back = 0;
    for (int i = 0; i < 2**AW; i++) begin dm[i] = DW'($urandom); smem[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // scan loop: 12 reads, no write
    for (int i = 0; i < 12; i++) begin
      step(16'h0004, OPC_CMP, 0, 0, 0);
      step(16'h0005, 4'h6, 1, AW'(16'h300 + i), 0);
      step(16'h0006, OPC_BRA, 0, 0, 0);
    end
    step(16'h0007, 4'hA, 1, 16'h0050, 0);
    repeat (12) step(16'h0008, OPC_NOP, 0, 0, 0);
    chk(nrec == 1 && !breq, "scan loop recorded but not transferred");
    // pairwise SUB loop: M[0x600+k] <- M[0x340+2k] - M[0x341+2k]
    for (int k = 0; k < K; k++) begin
      logic [DW-1:0] a, b;
      a = dm[AW'(16'h340 + 2*k)]; b = dm[AW'(16'h341 + 2*k)];
      step(16'h0010, OPC_CMP, 0, 0, 0);
      step(16'h0011, 4'h4, 0, 0, 0);
      step(16'h0012, 4'h5, 1, AW'(16'h340 + 2*k), 0);
      step(16'h0013, 4'h6, 1, AW'(16'h341 + 2*k), 0);
      step(16'h0014, 4'h7, 2, AW'(16'h600 + k), a - b);
      step(16'h0015, OPC_BRA, 0, 0, 0);
    end
    step(16'h0010, OPC_CMP, 0, 0, 0);
    step(16'h0011, 4'h4, 0, 0, 0);
    step(16'h0016, 4'hA, 1, 16'h0050, 0);
    fork
      repeat (30) step(16'h0017, OPC_NOP, 0, 0, 0);
      begin
        for (int w = 0; w < 400 && !breq; w++) @(negedge clk);
        chk(breq, "bus requested after the second loop");
        back = 1;
        while (breq) @(negedge clk);
        @(negedge clk); back = 0;
      end
    join
    chk(nrec == 2, "second loop recorded");
    chk(done, "observer done");
    chk(regs[SEL_RA][15:0] == 16'h340, "VSA");
    chk(regs[SEL_RJS][15:0] == 16'(2*K), "VJS");
    chk(regs[SEL_RJN][7:0] == 8'h11, $sformatf("VJN pairwise SUB, step 1: %h", regs[SEL_RJN][7:0]));
    chk(regs[SEL_RSAI][15:0] == 16'h0010 && regs[SEL_REAI][15:0] == 16'h0015, "VIB");
    chk(regs[SEL_RSDI][19:0] == 20'h1_0600 && regs[SEL_REDI][15:0] == 16'(16'h600 + K - 1), "VDB");
    for (int i = 0; i < 2*K; i++)
      chk(smem[AW'(16'h340 + i)] == dm[AW'(16'h340 + i)],
          "operand copied");
    chk(nnop == 6, "six NOP words written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
