// cpu_minor_tb - runs CPU_minor on every job op-code, pairwise and
// cumulative, with random operand counts (odd, even, 0 and 1 included). The
// test bench plays the iteration control unit (pointers, counter) and the
// shared memory (one-cycle read latency). Results are checked against a
// reference computed here, and the job's cycle count against
// 1 + 3*floor(n/2) + 1 (pairwise) and 1 + 3 + 2*(n-2) + 2 (cumulative).
module cpu_minor_tb;
  import cim_pkg::*;
  localparam int AW = 12;
  localparam int DW = 16;
  localparam int JW = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start, adv_src, adv_dst, done, req, we;
  job_op_t op;
  logic [AW-1:0] src, dst, addr;
  logic [JW-1:0] rem;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] mem [2**AW];
  int unsigned sstep, dstep;
  int checks = 0, failures = 0;

  cpu_minor #(.ADDR_W(AW), .DATA_W(DW), .JS_W(JW)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .op_i(op), .src_addr_i(src),
    .dst_addr_i(dst), .remaining_i(rem), .adv_src_o(adv_src), .adv_dst_o(adv_dst),
    .done_o(done), .mem_req_o(req), .mem_we_o(we), .mem_addr_o(addr),
    .mem_wdata_o(wdata), .mem_rdata_i(rdata));

  // memory and ICU stand-ins
  always_ff @(posedge clk) begin
    if (req && we) mem[addr] <= wdata;
    if (req && !we) rdata <= mem[addr];
    if (adv_src) begin src <= src + AW'(sstep); rem <= rem - 1'b1; end
    if (adv_dst) dst <= dst + AW'(dstep);
  end

  function automatic logic [DW-1:0] f(fu_sel_e s, logic [DW-1:0] a, logic [DW-1:0] b);
    case (s)
      FU_ADD: return a + b;
      FU_SUB: return a - b;
      FU_AND: return a & b;
      default: return a | b;
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; op = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int n, cyc, exp_cyc;
      logic [AW-1:0] a0, d0;
      logic [DW-1:0] ref_mem [2**AW];
      logic [DW-1:0] acc;
      n = (t < 4) ? t : 2 + ($urandom % 30);
      op = '{rsvd: 1'b0, cumulative: t[0], fu: fu_sel_e'(t[2:1])};
      sstep = 1 + ($urandom % 3); dstep = 1 + ($urandom % 2);
      a0 = 12'h100; d0 = 12'h800;
      for (int i = 0; i < 2**AW; i++) mem[i] = DW'($urandom);
      ref_mem = mem;
      if (n >= 2) begin
        if (op.cumulative) begin
          acc = ref_mem[a0];
          for (int i = 1; i < n; i++) acc = f(op.fu, acc, ref_mem[a0 + i*sstep]);
          ref_mem[d0] = acc;
        end else begin
          for (int k = 0; k < n/2; k++)
            ref_mem[d0 + k*dstep] = f(op.fu, ref_mem[a0 + 2*k*sstep], ref_mem[a0 + (2*k+1)*sstep]);
        end
      end
      exp_cyc = (n < 2) ? 2 : op.cumulative ? 1 + 3 + 2*(n-2) + 2 : 1 + 3*(n/2) + 1;
      @(negedge clk);
      src = a0; dst = d0; rem = JW'(n); start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      @(negedge clk);
      checks++;
      if (cyc != exp_cyc) begin
        failures++;
        $display("FAIL: op %h n %0d took %0d cycles, expected %0d", op, n, cyc, exp_cyc);
      end
      checks++;
      if (mem != ref_mem) begin
        failures++;
        $display("FAIL: op %h n %0d memory contents wrong", op, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
