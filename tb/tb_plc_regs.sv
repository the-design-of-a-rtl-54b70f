// tb_plc_regs: register block. Compares against a shadow array kept by the
// testbench: single, pair and 4-register writes (with wrap-around), the two
// read ports, the host port, flags and the two stack registers.
module tb_plc_regs;
  import plc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] ra = 0, rb = 0, wa = 0, h_addr = 0;
  logic [31:0] rdata_a, rdata_b;
  logic we = 0, flags_we = 0, stk_call_we = 0, stk_int_we = 0, h_we = 0;
  logic [2:0] wcount = 1, flags_in = 0, flags;
  logic [63:0] wdata = 0;
  logic [19:0] stk_din = 0, stk_call, stk_int;
  logic [15:0] h_wdata = 0, h_rdata;
  logic [15:0] shadow [16];
  int checks = 0, failures = 0;

  plc_regs dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) shadow[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      we = 1;
      wa = 4'($urandom);
      wcount = (t % 3 == 0) ? 3'd1 : (t % 3 == 1) ? 3'd2 : 3'd4;
      wdata = {$urandom, $urandom};
      for (int i = 0; i < int'(wcount); i++) shadow[(int'(wa) + i) % 16] = wdata[i*16 +: 16];
      @(negedge clk);
      we = 0;
      ra = 4'($urandom); rb = 4'($urandom); h_addr = 4'($urandom); #1;
      chk(rdata_a == {shadow[(ra + 1) % 16], shadow[ra]}, "port a pair");
      chk(rdata_b == {shadow[(rb + 1) % 16], shadow[rb]}, "port b pair");
      chk(h_rdata == shadow[h_addr], "host read");
    end
    @(negedge clk); h_we = 1; h_addr = 4'd7; h_wdata = 16'hBEEF;
    @(negedge clk); h_we = 0; ra = 4'd7; #1;
    chk(rdata_a[15:0] == 16'hBEEF, "host write");
    @(negedge clk); flags_we = 1; flags_in = 3'b101; stk_call_we = 1; stk_din = 20'hABCDE;
    @(negedge clk); flags_we = 0; stk_call_we = 0; stk_int_we = 1; stk_din = 20'h12345;
    @(negedge clk); stk_int_we = 0;
    chk(flags == 3'b101, "flags");
    chk(stk_call == 20'hABCDE, "call stack register");
    chk(stk_int == 20'h12345, "interrupt stack register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
