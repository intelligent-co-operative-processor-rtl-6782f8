// fu_bank_tb - checks every functional unit against an independent model on
// random and corner operands.
module fu_bank_tb;
  import cim_pkg::*;
  localparam int DW = 16;
  logic [DW-1:0] a, b;
  logic [DW-1:0] res [NUM_FU];
  int checks = 0, failures = 0;

  fu_bank #(.DATA_W(DW)) dut (.a_i(a), .b_i(b), .res_o(res));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      int unsigned ea, eb;
      if (i < 4) begin a = (i[0]) ? '1 : '0; b = (i[1]) ? '1 : '0; end
      else begin a = DW'($urandom); b = DW'($urandom); end
      ea = a; eb = b;
      #1;
      checks += 4;
      if (res[FU_ADD] != DW'(ea + eb))      begin failures++; $display("FAIL add %h %h", a, b); end
      if (res[FU_SUB] != DW'(ea - eb))      begin failures++; $display("FAIL sub %h %h", a, b); end
      if (res[FU_AND] != DW'(ea & eb))      begin failures++; $display("FAIL and %h %h", a, b); end
      if (res[FU_OR]  != DW'(ea | eb))      begin failures++; $display("FAIL or %h %h", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
