// tb_plc_pc_ir: program counter and instruction register: fetch loads both in
// one clock, PC+1, host writes of either PC half, hold when idle.
module tb_plc_pc_ir;
  logic clk = 0, rst_n = 0, fetch = 0, host_we_lo = 0, host_we_hi = 0;
  logic [19:0] fetch_addr = 0, pc, pc_plus1;
  logic [31:0] pm_data = 0, ir;
  logic [15:0] host_wdata = 0;
  int checks = 0, failures = 0;

  plc_pc_ir dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s pc=%h ir=%h", what, pc, ir); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(pc == 0 && ir == 0, "reset");
    for (int i = 0; i < 50; i++) begin
      logic [19:0] a; logic [31:0] d;
      a = 20'($urandom); d = $urandom;
      @(negedge clk); fetch = 1; fetch_addr = a; pm_data = d;
      @(negedge clk); fetch = 0; pm_data = ~d;
      chk(pc == a && ir == d, "fetch");
      chk(pc_plus1 == 20'(a + 1), "pc+1");
      @(negedge clk);
      chk(pc == a && ir == d, "hold");
    end
    @(negedge clk); host_we_lo = 1; host_wdata = 16'h1234;
    @(negedge clk); host_we_lo = 0; host_we_hi = 1; host_wdata = 16'h000A;
    @(negedge clk); host_we_hi = 0;
    chk(pc == 20'hA1234, "host PC write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
