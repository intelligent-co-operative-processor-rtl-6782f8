// instruction_memory_tb - loads a program through the write port, fetches it
// back with the one-cycle fetch latency, and checks that a write and a fetch
// in the same cycle (the NOP overwrite while CPU_major fetches elsewhere)
// both work.
module instruction_memory_tb;
  localparam int AW = 8;
  localparam int DW = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic          fetch, we;
  logic [AW-1:0] faddr, waddr;
  logic [DW-1:0] instr, wdata;
  logic [DW-1:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  instruction_memory #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk_i(clk), .fetch_i(fetch), .fetch_addr_i(faddr), .instr_o(instr),
    .we_i(we), .waddr_i(waddr), .wdata_i(wdata));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fetch = 0; we = 0; faddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = DW'($urandom);
      ref_mem[i] = wdata;
    end
    for (int i = 0; i < 1000; i++) begin
      logic [DW-1:0] e;
      @(negedge clk);
      fetch = 1; faddr = AW'($urandom);
      we = ($urandom % 2 == 0); waddr = AW'($urandom); wdata = DW'($urandom);
      if (waddr == faddr) we = 0;
      e = ref_mem[faddr];
      if (we) ref_mem[waddr] = wdata;
      @(negedge clk);
      fetch = 0; we = 0;
      checks++;
      if (instr !== e) begin failures++; $display("FAIL fetch %h: %h vs %h", faddr, instr, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
