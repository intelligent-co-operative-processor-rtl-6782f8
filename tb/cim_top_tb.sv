// cim_top_tb - end-to-end test of the co-operative intelligent memory.
//
// A behavioural CPU_major runs two programs, each twice, on cim_top at its
// default parameters:
//   A  pairwise loop  M[0x400+k] <- M[0x100+2k] + M[0x101+2k], k < K
//   B  cumulative loop M[0x500] <- M[0x100] - M[0x101] - ... - M[0x100+N-1]
// Each program first reads a short run of consecutive words, which the
// observer must reject as too short. Pass 1 (learning): CPU_major runs the
// loop itself; the observer must record the loop, take the buses, load the
// ICU, copy the operands, overwrite the loop with NOPs and release the buses;
// the CPIM then runs the job. Pass 2 (serving): new operands are written to
// the shared memory, CPU_major runs the program again, meets NOPs, and its
// fetch of the first NOP restarts the CPIM. While the CPIM runs, the test
// reads the shared memory (cycle stealing). Results, extracted vectors,
// CPU_minor cycle counts and the CPU_major time saved are checked, and every
// mechanism is counted and must occur.
module cim_top_tb;
  import cim_pkg::*;

  localparam int AW = 20;
  localparam int DW = 16;
  localparam int K  = 32;            // pairs in program A
  localparam int N  = 40;            // operands in program B

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // CPU_major model <-> CIM
  logic          run, halted, im_fetch, dm_req, dm_we, bus_req, bus_ack;
  logic [31:0]   cpu_cycles, cpu_stalls;
  logic [AW-1:0] im_fetch_addr, dm_addr;
  logic [DW-1:0] im_instr, dm_wdata, dm_rdata;
  // test bench side
  logic          im_load_we, sm_req, sm_we, sm_gnt, sm_rvalid, sm_stolen, irq_clr;
  logic [AW-1:0] im_load_addr, sm_addr;
  logic [DW-1:0] im_load_data, sm_wdata, sm_rdata;
  reg_sel_e      icu_rd_sel;
  logic [VEC_W-1:0] icu_rd_data;
  logic          busy, job_start, irq, dtc, learned, recorded;
  logic [31:0]   xfer_cycles;

  cpu_major_model #(.ADDR_W(AW), .DATA_W(DW)) u_cpu (
    .clk_i(clk), .rst_ni(rst_n), .run_i(run), .halted_o(halted),
    .cycles_o(cpu_cycles), .stall_cycles_o(cpu_stalls),
    .im_fetch_o(im_fetch), .im_fetch_addr_o(im_fetch_addr), .im_instr_i(im_instr),
    .dm_req_o(dm_req), .dm_we_o(dm_we), .dm_addr_o(dm_addr), .dm_wdata_o(dm_wdata),
    .dm_rdata_i(dm_rdata), .bus_req_i(bus_req), .bus_ack_o(bus_ack)
  );

  cim_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .im_fetch_i(im_fetch), .im_fetch_addr_i(im_fetch_addr), .im_instr_o(im_instr),
    .im_load_we_i(im_load_we), .im_load_addr_i(im_load_addr), .im_load_data_i(im_load_data),
    .dm_req_i(dm_req), .dm_we_i(dm_we), .dm_addr_i(dm_addr), .dm_wdata_i(dm_wdata),
    .dm_rdata_o(dm_rdata),
    .sm_req_i(sm_req), .sm_we_i(sm_we), .sm_addr_i(sm_addr), .sm_wdata_i(sm_wdata),
    .sm_gnt_o(sm_gnt), .sm_rvalid_o(sm_rvalid), .sm_rdata_o(sm_rdata), .sm_stolen_o(sm_stolen),
    .icu_rd_sel_i(icu_rd_sel), .icu_rd_data_o(icu_rd_data),
    .busy_o(busy), .job_start_o(job_start), .irq_o(irq), .irq_clr_i(irq_clr),
    .bus_req_o(bus_req), .bus_ack_i(bus_ack), .dtc_o(dtc), .learned_o(learned),
    .loop_recorded_o(recorded), .xfer_cycles_o(xfer_cycles)
  );

  // ---------------------------------------------------------------- checks
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------ mechanism counts
  int n_reject, n_record, n_busreq, n_copy, n_nop, n_dtc, n_load_start;
  int n_serve_start, n_stolen, n_irq, n_busy_cycles;
  logic bus_req_q, irq_q;
  always_ff @(posedge clk) begin
    bus_req_q <= bus_req;
    irq_q     <= irq;
    if (rst_n) begin
      if (dut.u_obs.u_vsa.brk && !recorded && !dut.u_obs.u_vsa.valid_o) n_reject++;
      if (recorded) n_record++;
      if (bus_req && !bus_req_q) n_busreq++;
      if (dut.u_obs.u_itc.sm_req_o && dut.ext_gnt) n_copy++;
      if (dut.u_obs.u_itc.im_we_o) n_nop++;
      if (dtc) n_dtc++;
      if (job_start && !dut.u_cpim.u_icu.start_serve) n_load_start++;
      if (job_start &&  dut.u_cpim.u_icu.start_serve) n_serve_start++;
      if (sm_stolen) n_stolen++;
      if (irq && !irq_q) n_irq++;
      if (busy) n_busy_cycles++;
    end
  end

  // ---------------------------------------------------------------- helpers
  function automatic logic [15:0] ins(int op, int imm);
    return {4'(op), 12'(imm)};
  endfunction

  task automatic load_prog(input logic [15:0] p[$]);
    foreach (p[i]) begin
      @(negedge clk);
      im_load_we = 1'b1; im_load_addr = AW'(i); im_load_data = p[i];
    end
    @(negedge clk);
    im_load_we = 1'b0;
  endtask

  task automatic sm_access(input bit we, input logic [AW-1:0] a,
                           input logic [DW-1:0] wd, output logic [DW-1:0] rd);
    @(negedge clk);
    sm_req = 1'b1; sm_we = we; sm_addr = a; sm_wdata = wd;
    @(posedge clk);
    while (!sm_gnt) @(posedge clk);
    @(negedge clk);
    sm_req = 1'b0;
    rd = sm_rdata;           // valid in the cycle after the grant
    if (!we) check(sm_rvalid, "shared memory read data valid after grant");
  endtask

  task automatic run_cpu(output int cyc, output int stalls);
    @(negedge clk); run = 1'b1;
    @(negedge clk); run = 1'b0;
    while (!halted) @(posedge clk);
    cyc = cpu_cycles; stalls = cpu_stalls;
  endtask

  task automatic wait_irq();
    while (!irq) @(posedge clk);
    @(negedge clk); irq_clr = 1'b1;
    @(negedge clk); irq_clr = 1'b0;
  endtask

  task automatic reset_dut();
    @(negedge clk); rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  endtask

  // ------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------------------- test
  logic [DW-1:0] d [2*K > N ? 2*K : N];
  logic [DW-1:0] rd, exp_v;
  int learn_cyc, learn_stall, serve_cyc, serve_stall, b0, steal_seen;

  task automatic steal_during_job(input logic [AW-1:0] a, input logic [DW-1:0] e);
    logic [DW-1:0] v;
    while (!busy) @(posedge clk);
    sm_access(1'b0, a, '0, v);
    check(v == e, $sformatf("stolen read of %h during the job", a));
  endtask

  initial begin
    logic [15:0] prog[$];
    run = 0; im_load_we = 0; im_load_addr = 0; im_load_data = 0;
    sm_req = 0; sm_we = 0; sm_addr = 0; sm_wdata = 0; irq_clr = 0;
    icu_rd_sel = SEL_RA;
    reset_dut();

    // ============================== program A: pairwise ADD (scenario 2)
    prog = {ins(1,'h200), ins(5,0), ins(6,0), ins(6,0),        // short run: 3 reads
            ins(1,'h100), ins(2,'h400),
            ins(3,'h100+2*K), ins(4,12), ins(5,0), ins(6,0), ins(7,0), ins(8,6),
            ins(10,'h0F0)};
    repeat (8) prog.push_back(ins(0,0));
    prog.push_back(ins(9,0));
    load_prog(prog);
    for (int i = 0; i < 2*K; i++) begin
      d[i] = DW'($urandom);
      dut.u_dm.mem[16'h100 + i] = d[i];
    end
    for (int i = 0; i < 3; i++) dut.u_dm.mem[16'h200 + i] = DW'($urandom);
    dut.u_dm.mem[16'h0F0] = 16'h1234;

    // learning pass
    b0 = n_busy_cycles;
    run_cpu(learn_cyc, learn_stall);
    wait_irq();
    check(learned, "A: observer finished learning");
    for (int k = 0; k < K; k++)
      check(dut.u_dm.mem[16'h400 + k] == DW'(d[2*k] + d[2*k+1]), "A: CPU_major result in DM");
    icu_rd_sel = SEL_RA;   #1 check(icu_rd_data[15:0] == 16'h100, "A: Ra = VSA");
    icu_rd_sel = SEL_RJS;  #1 check(icu_rd_data[15:0] == 16'(2*K), "A: Rjs = VJS");
    icu_rd_sel = SEL_RJN;  #1 check(icu_rd_data[7:0] == 8'h10, "A: Rjn = step 1, pairwise ADD");
    icu_rd_sel = SEL_RSAI; #1 check(icu_rd_data[15:0] == 16'd6, "A: Rsai = CMP address");
    icu_rd_sel = SEL_REAI; #1 check(icu_rd_data[15:0] == 16'd11, "A: Reai = BRA address");
    icu_rd_sel = SEL_RSDI; #1 check(icu_rd_data[AW+3:0] == {4'd1, AW'('h400)}, "A: Rsdi = VDB start, step 1");
    icu_rd_sel = SEL_REDI; #1 check(icu_rd_data[15:0] == 16'(16'h400 + K - 1), "A: Redi = VDB end");
    for (int a = 6; a <= 11; a++)
      check(dut.u_im.mem[a][15:12] == OPC_NOP, "A: loop replaced by NOP");
    check(dut.u_im.mem[12] == ins(10,'h0F0), "A: code after loop kept");
    check(n_busy_cycles - b0 == 1 + 3*K + 1, $sformatf("A: CPU_minor took %0d cycles, expected %0d",
          n_busy_cycles - b0, 1 + 3*K + 1));
    for (int k = 0; k < K; k++) begin
      sm_access(1'b0, AW'(16'h400 + k), '0, rd);
      check(rd == DW'(d[2*k] + d[2*k+1]), "A: CPIM result in shared memory (learning)");
    end

    // serving pass with a new data set written into the shared memory
    for (int i = 0; i < 2*K; i++) begin
      d[i] = DW'($urandom);
      sm_access(1'b1, AW'(16'h100 + i), d[i], rd);
    end
    b0 = n_busy_cycles;
    fork
      run_cpu(serve_cyc, serve_stall);
      steal_during_job(16'h100, d[0]);
    join
    wait_irq();
    check(serve_stall == 0, "A: no bus hand-over in the serving stage");
    check(serve_cyc + (K * 14) / 2 < learn_cyc - learn_stall,
          $sformatf("A: serving pass %0d cycles vs learning pass %0d", serve_cyc, learn_cyc - learn_stall));
    check(n_busy_cycles - b0 == 1 + 3*K + 1, "A: CPU_minor cycles (serving)");
    for (int k = 0; k < K; k++) begin
      sm_access(1'b0, AW'(16'h400 + k), '0, rd);
      check(rd == DW'(d[2*k] + d[2*k+1]), "A: CPIM result in shared memory (serving)");
    end
    $display("A: learning %0d cycles (%0d on the bus hand-over of %0d cycles), serving %0d cycles",
             learn_cyc, learn_stall, xfer_cycles, serve_cyc);

    // ============================ program B: cumulative SUB (scenario 1)
    reset_dut();
    prog = {ins(1,'h200), ins(5,0), ins(6,0),                  // short run: 2 reads
            ins(1,'h100), ins(2,'h500), ins(5,0),
            ins(3,'h100+N), ins(4,10), ins(6,1), ins(8,6),
            ins(7,0), ins(10,'h0F0)};
    repeat (8) prog.push_back(ins(0,0));
    prog.push_back(ins(9,0));
    load_prog(prog);
    for (int i = 0; i < N; i++) begin
      d[i] = DW'($urandom);
      dut.u_dm.mem[16'h100 + i] = d[i];
    end
    exp_v = d[0];
    for (int i = 1; i < N; i++) exp_v = exp_v - d[i];
    b0 = n_busy_cycles;
    run_cpu(learn_cyc, learn_stall);
    wait_irq();
    check(dut.u_dm.mem[16'h500] == exp_v, "B: CPU_major result in DM");
    icu_rd_sel = SEL_RJS;  #1 check(icu_rd_data[15:0] == 16'(N), "B: Rjs = VJS");
    icu_rd_sel = SEL_RJN;  #1 check(icu_rd_data[7:0] == 8'h15, "B: Rjn = step 1, cumulative SUB");
    icu_rd_sel = SEL_RSAI; #1 check(icu_rd_data[15:0] == 16'd6, "B: Rsai");
    icu_rd_sel = SEL_REAI; #1 check(icu_rd_data[15:0] == 16'd9, "B: Reai");
    check(n_busy_cycles - b0 == 1 + 3 + 2*(N-2) + 1 + 1,
          $sformatf("B: CPU_minor took %0d cycles", n_busy_cycles - b0));
    sm_access(1'b0, 16'h500, '0, rd);
    check(rd == exp_v, "B: CPIM cumulative result (learning)");
    for (int i = 0; i < N; i++) begin
      d[i] = DW'($urandom);
      sm_access(1'b1, AW'(16'h100 + i), d[i], rd);
    end
    exp_v = d[0];
    for (int i = 1; i < N; i++) exp_v = exp_v - d[i];
    fork
      run_cpu(serve_cyc, serve_stall);
      steal_during_job(16'h101, d[1]);
    join
    wait_irq();
    sm_access(1'b0, 16'h500, '0, rd);
    check(rd == exp_v, "B: CPIM cumulative result (serving)");
    check(serve_cyc < learn_cyc - learn_stall, "B: serving pass shorter than learning pass");
    $display("B: learning %0d cycles, serving %0d cycles", learn_cyc, serve_cyc);

    // ----------------------------------------------------- mechanisms seen
    $display("mechanisms: reject=%0d record=%0d busreq=%0d copy=%0d nop=%0d dtc=%0d",
             n_reject, n_record, n_busreq, n_copy, n_nop, n_dtc);
    $display("            load_start=%0d serve_start=%0d stolen=%0d irq=%0d",
             n_load_start, n_serve_start, n_stolen, n_irq);
    check(n_reject >= 2, "short run rejected");
    check(n_record == 2, "loop recorded once per program");
    check(n_busreq == 2, "bus requested once per program");
    check(n_copy == 2*K + N, "operand words copied");
    check(n_nop == 6 + 4, "NOP words written");
    check(n_dtc == 2, "data transfer complete");
    check(n_load_start == 2, "job started by the register load");
    check(n_serve_start == 2, "job restarted by the serving-stage fetch");
    check(n_stolen >= 2, "cycle stealing during a job");
    check(n_irq == 4, "completion interrupt per job");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
