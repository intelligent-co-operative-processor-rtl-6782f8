// vsa_vjs_extractor_tb - feeds runs of data-read addresses and checks which
// runs are recorded: runs shorter than the threshold are dropped, the first
// run of at least LOOP_THRESH operands is recorded with its start, length and
// step when the step changes, later runs are ignored, clear_i forgets the
// loop, and zero or too-large steps never qualify. A random section then
// checks 200 streams of runs of random length and step against a reference
// of the same run rules.
module vsa_vjs_extractor_tb;
  import cim_pkg::*;
  localparam int AW = 16;
  localparam int JW = 16;
  localparam int TH = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, en, clr, rd, run_start, rec, valid;
  logic [AW-1:0] addr, vsa;
  logic [JW-1:0] vjs;
  logic [STEP_W-1:0] step;
  int checks = 0, failures = 0, nrec = 0, nstart = 0;

  vsa_vjs_extractor #(.ADDR_W(AW), .JS_W(JW), .LOOP_THRESH(TH)) dut (
    .clk_i(clk), .rst_ni(rst_n), .enable_i(en), .clear_i(clr), .rd_i(rd), .rd_addr_i(addr),
    .run_start_o(run_start), .record_o(rec), .valid_o(valid), .vsa_o(vsa), .vjs_o(vjs),
    .step_o(step));

  always @(posedge clk) begin
    if (rst_n && rec) nrec++;
    if (rst_n && run_start) nstart++;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // n reads from a0 with step s, with idle cycles in between
  task automatic run(input logic [AW-1:0] a0, input int n, input int s);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); rd = 1; addr = AW'(a0 + i*s);
      @(negedge clk); rd = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 1; clr = 0; rd = 0; addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(16'h0010, TH - 1, 1);          // one short of the threshold
    run(16'h0050, TH + 2, 2);          // qualifies (ends at the next read)
    chk(nrec == 0, "nothing recorded before the step changes");
    chk(nstart == 2, "two runs started");
    run(16'h0300, 1, 1);
    chk(nrec == 1 && valid, "loop recorded at the step change");
    chk(vsa == 16'h0050 && vjs == JW'(TH + 2) && step == 4'd2, "VSA, VJS and step");
    run(16'h0400, 3*TH, 1);
    run(16'h0900, 2, 1);
    chk(nrec == 1 && vsa == 16'h0050, "later loops do not overwrite the recorded one");
    // clear, then a run that reaches exactly the threshold
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    chk(!valid, "clear forgets the loop");
    run(16'h1000, 2, 5);
    run(16'h2000, TH, 3);
    run(16'h0000, 1, 1);
    chk(nrec == 2 && vsa == 16'h2000 && vjs == JW'(TH) && step == 4'd3, "run of exactly the threshold");
    // zero step and oversize step never qualify
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    run(16'h3000, 2*TH, 0);
    run(16'h4000, 2*TH, 20);
    run(16'h0001, 1, 1);
    chk(nrec == 2 && !valid, "zero and oversize steps rejected");
    // disabled: nothing happens
    en = 0;
    run(16'h5000, 2*TH, 1);
    run(16'h0002, 1, 1);
    chk(nrec == 2 && !valid, "disabled extractor records nothing");
    en = 1;
    // random read streams: runs of random length and step, checked against
    // a reference of the run rules
    for (int t = 0; t < 200; t++) begin
      logic [AW-1:0] p, st, sp, a, m_vsa;
      logic [JW-1:0] c, m_vjs;
      bit hp, sok, mv;
      logic [AW-1:0] m_step;
      int n0, mrec;
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      hp = 0; sok = 0; mv = 0; c = 0; p = 0; st = 0; sp = 0; mrec = 0;
      m_vsa = 0; m_vjs = 0; m_step = 0;
      n0 = nrec;
      for (int r = 0, nr = $urandom_range(1, 4); r < nr; r++) begin
        logic [AW-1:0] a0;
        int len, stp;
        a0  = AW'($urandom);
        len = $urandom_range(1, 2*TH);
        stp = ($urandom_range(0, 5) == 0) ? $urandom_range(0, 40) : $urandom_range(1, 4);
        for (int i = 0; i < len; i++) begin
          a = AW'(a0 + i*stp);
          @(negedge clk); rd = 1; addr = a;
          @(negedge clk); rd = 0;
          if (!hp) begin st = a; c = 1; sok = 0; end
          else if (!sok) begin sp = a - p; sok = 1; c++; end
          else if (a - p != sp) begin
            if (!mv && sp != 0 && sp < 16 && c >= JW'(TH)) begin
              mv = 1; m_vsa = st; m_vjs = c; m_step = sp; mrec++;
            end
            st = a; c = 1; sok = 0;
          end else c++;
          p = a; hp = 1;
        end
      end
      chk(valid == mv && nrec - n0 == mrec, "random: loop recorded or not");
      if (mv) chk(vsa == m_vsa && vjs == m_vjs && step == m_step[STEP_W-1:0],
                  "random: VSA, VJS and step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
