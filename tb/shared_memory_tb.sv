// shared_memory_tb - writes random words to random addresses, reads them back and
// checks the data and its one-cycle read latency against a reference array.
module shared_memory_tb;
  localparam int AW = 8;
  localparam int DW = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic          req, we;
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  shared_memory #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk_i(clk), .req_i(req), .we_i(we), .addr_i(addr), .wdata_i(wdata), .rdata_o(rdata));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      req = 1; we = 1; addr = AW'(i); wdata = DW'($urandom);
      ref_mem[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      req = 1; addr = AW'($urandom); we = ($urandom % 3 == 0);
      wdata = DW'($urandom);
      if (we) ref_mem[addr] = wdata;
      else begin
        logic [DW-1:0] e;
        e = ref_mem[addr];
        @(negedge clk);
        req = 0;
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL read %h: %h vs %h", addr, rdata, e); end
        // output holds while idle
        @(negedge clk);
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL read data not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
