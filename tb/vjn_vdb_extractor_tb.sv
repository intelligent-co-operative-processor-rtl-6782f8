// vjn_vdb_extractor_tb - plays the data-bus trace of CPU_major running a
// loop, for every job op-code in its pairwise and cumulative form, with
// random operands and random destination steps, and checks the job nature
// code and destination block recorded at the end. A loop that writes nothing
// must not give a valid job nature.
module vjn_vdb_extractor_tb;
  import cim_pkg::*;
  localparam int AW = 16;
  localparam int DW = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, en, clr, rv, rs, wr, rec, valid;
  logic [DW-1:0] rdat, wdat;
  logic [AW-1:0] waddr, vs, ve;
  logic [STEP_W-1:0] vstep;
  job_op_t vjn;
  int checks = 0, failures = 0;

  vjn_vdb_extractor #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk_i(clk), .rst_ni(rst_n), .enable_i(en), .clear_i(clr), .rd_valid_i(rv),
    .rd_data_i(rdat), .run_start_i(rs), .wr_i(wr), .wr_addr_i(waddr), .wr_data_i(wdat),
    .record_i(rec), .valid_o(valid), .vjn_o(vjn), .vdb_start_o(vs), .vdb_end_o(ve),
    .vdb_step_o(vstep));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [DW-1:0] f(fu_sel_e s, logic [DW-1:0] a, logic [DW-1:0] b);
    case (s)
      FU_ADD: return a + b;
      FU_SUB: return a - b;
      FU_AND: return a & b;
      default: return a | b;
    endcase
  endfunction

  task automatic rd(input logic [DW-1:0] v, input bit first);
    @(negedge clk); rv = 1; rdat = v; rs = first;
    @(negedge clk); rv = 0; rs = 0;
  endtask

  task automatic wrt(input logic [AW-1:0] a, input logic [DW-1:0] v);
    @(negedge clk); wr = 1; waddr = a; wdat = v;
    @(negedge clk); wr = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 1; clr = 0; rv = 0; rs = 0; wr = 0; rec = 0; rdat = 0; wdat = 0; waddr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 16; t++) begin
      job_op_t op;
      int n, ds;
      logic [AW-1:0] d0;
      logic [DW-1:0] a, b, acc;
      op = '{rsvd: 1'b0, cumulative: t[0], fu: fu_sel_e'(t[2:1])};
      n = 8 + 2 * ($urandom % 8);
      ds = 1 + ($urandom % 3);
      d0 = AW'(16'h0400 + 16 * t);
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      // a few unrelated reads before the loop
      rd(DW'($urandom), 1); rd(DW'($urandom), 0);
      if (op.cumulative) begin
        acc = DW'($urandom);
        rd(acc, 1);
        for (int i = 1; i < n; i++) begin
          b = DW'($urandom);
          rd(b, 0);
          acc = f(op.fu, acc, b);
        end
        wrt(d0, acc);
      end else begin
        for (int k = 0; k < n/2; k++) begin
          a = DW'($urandom); b = DW'($urandom);
          rd(a, k == 0); rd(b, 0);
          wrt(AW'(d0 + k*ds), f(op.fu, a, b));
        end
      end
      @(negedge clk); rec = 1; @(negedge clk); rec = 0;
      chk(valid, $sformatf("op %h: valid", op));
      chk(vjn == op, $sformatf("op %h: VJN %h", op, vjn));
      chk(vs == d0, "VDB start");
      chk(op.cumulative ? (ve == d0 && vstep == 1) : (ve == AW'(d0 + (n/2-1)*ds) && vstep == STEP_W'(ds)),
          "VDB end and step");
    end
    // a loop with no write is not a job
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    rd(16'h1, 1); rd(16'h2, 0); rd(16'h3, 0);
    @(negedge clk); rec = 1; @(negedge clk); rec = 0;
    chk(!valid, "no write: not valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
