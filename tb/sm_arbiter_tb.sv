// sm_arbiter_tb - random requests from CPU_minor and an external master in
// active and sleep mode. Checks against an independent model: CPU_minor is
// always served in active mode, the external master is granted exactly the
// free cycles, the memory port carries the granted request, and read valid
// follows a granted read by one cycle.
module sm_arbiter_tb;
  localparam int AW = 8;
  localparam int DW = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic active, mreq, mwe, ereq, ewe, egnt, ervalid, estolen, req, we;
  logic [AW-1:0] maddr, eaddr, addr;
  logic [DW-1:0] mwd, ewd, wd;
  int checks = 0, failures = 0, n_steal = 0, n_refused = 0;
  logic exp_rvalid;

  sm_arbiter #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk_i(clk), .rst_ni(rst_n), .active_i(active),
    .min_req_i(mreq), .min_we_i(mwe), .min_addr_i(maddr), .min_wdata_i(mwd),
    .ext_req_i(ereq), .ext_we_i(ewe), .ext_addr_i(eaddr), .ext_wdata_i(ewd),
    .ext_gnt_o(egnt), .ext_rvalid_o(ervalid), .ext_stolen_o(estolen),
    .mem_req_o(req), .mem_we_o(we), .mem_addr_o(addr), .mem_wdata_o(wd));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; active = 0; mreq = 0; mwe = 0; ereq = 0; ewe = 0;
    maddr = 0; eaddr = 0; mwd = 0; ewd = 0; exp_rvalid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      chk(ervalid == exp_rvalid, "read valid one cycle after a granted read");
      active = (i / 200) % 2 == 0;
      mreq = active && ($urandom % 4 != 0);
      mwe = $urandom; maddr = AW'($urandom); mwd = DW'($urandom);
      ereq = $urandom; ewe = $urandom; eaddr = AW'($urandom); ewd = DW'($urandom);
      #1;
      if (mreq) begin
        chk(req && we == mwe && addr == maddr && wd == mwd, "CPU_minor drives the memory");
        chk(!egnt, "external refused while CPU_minor uses the cycle");
        if (ereq) n_refused++;
      end else begin
        chk(egnt == ereq, "external granted a free cycle");
        chk(req == ereq && (!ereq || (we == ewe && addr == eaddr && wd == ewd)),
            "external drives the memory");
      end
      chk(estolen == (egnt && active), "stolen flag");
      if (estolen) n_steal++;
      exp_rvalid = egnt && !ewe;
    end
    chk(n_steal > 0 && n_refused > 0, "both stealing and refusal happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
