// vib_extractor_tb - feeds a fetch stream containing CMP and BRA words and
// checks that the addresses held when record_i arrives become the
// instruction block, that the latest CMP/BRA win, that a record without both
// (or with BRA before CMP) is not valid, and that only the first valid record
// is kept until clear_i. A random section then checks 300 fetch streams
// against a reference that tracks the latest CMP and BRA addresses.
module vib_extractor_tb;
  import cim_pkg::*;
  localparam int AW = 16;
  localparam int DW = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, en, clr, fv, rec, valid;
  logic [AW-1:0] fa, vs, ve;
  logic [DW-1:0] instr;
  int checks = 0, failures = 0;

  vib_extractor #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk_i(clk), .rst_ni(rst_n), .enable_i(en), .clear_i(clr), .fetch_valid_i(fv),
    .fetch_addr_i(fa), .instr_i(instr), .record_i(rec), .valid_o(valid),
    .vib_start_o(vs), .vib_end_o(ve));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic f(input logic [AW-1:0] a, input logic [3:0] opc);
    @(negedge clk); fv = 1; fa = a; instr = {opc, 12'($urandom)};
    @(negedge clk); fv = 0;
  endtask

  task automatic record();
    @(negedge clk); rec = 1; @(negedge clk); rec = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 1; clr = 0; fv = 0; fa = 0; instr = 0; rec = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    f(16'h0005, OPC_CMP);
    record();
    chk(!valid, "no BRA seen: not valid");
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    // earlier loop, then the real one, run three times
    f(16'h0002, OPC_CMP); f(16'h0003, 4'h4); f(16'h0004, OPC_BRA);
    for (int it = 0; it < 3; it++) begin
      f(16'h0020, OPC_CMP); f(16'h0021, 4'h4); f(16'h0022, 4'h5); f(16'h0023, 4'h7);
      f(16'h0024, OPC_BRA);
    end
    f(16'h0020, OPC_CMP); f(16'h0021, 4'h4); f(16'h0025, 4'hA);
    // fetch_valid low: ignored
    @(negedge clk); fa = 16'h0099; instr = {OPC_CMP, 12'h0}; @(negedge clk);
    record();
    chk(valid && vs == 16'h0020 && ve == 16'h0024, "VIB = last CMP .. last BRA");
    f(16'h0040, OPC_CMP); f(16'h0048, OPC_BRA);
    record();
    chk(vs == 16'h0020 && ve == 16'h0024, "first VIB kept");
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    chk(!valid, "cleared");
    f(16'h0060, OPC_BRA); f(16'h0070, OPC_CMP);
    record();
    chk(!valid, "BRA before CMP is not a loop block");
    // enable low: fetches are not watched
    @(negedge clk); clr = 1; @(negedge clk); clr = 0; en = 0;
    f(16'h0010, OPC_CMP); f(16'h0018, OPC_BRA);
    en = 1;
    record();
    chk(!valid, "nothing learned while disabled");
    // random fetch streams against a reference of the latest CMP and BRA
    for (int t = 0; t < 300; t++) begin
      logic [AW-1:0] rc, rb, a;
      bit sc, sb;
      logic [3:0] opc;
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      sc = 0; sb = 0; rc = 0; rb = 0;
      for (int i = 0, n = 1 + $urandom_range(0, 12); i < n; i++) begin
        a = AW'($urandom);
        case ($urandom_range(0, 3))
          0: opc = OPC_CMP;
          1: opc = OPC_BRA;
          default: opc = 4'($urandom_range(1, 15));
        endcase
        f(a, opc);
        if (opc == OPC_CMP) begin rc = a; sc = 1; end
        if (opc == OPC_BRA) begin rb = a; sb = 1; end
      end
      record();
      chk(valid == (sc && sb && rc <= rb), "random: validity");
      if (valid) chk(vs == rc && ve == rb, "random: VIB addresses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
