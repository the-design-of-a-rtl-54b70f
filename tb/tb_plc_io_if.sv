// tb_plc_io_if: each of the four I/O chip selects is asserted alone for its
// address while a strobe is active, and none otherwise.
module tb_plc_io_if;
  logic sel_io = 0, rd = 0, wr = 0;
  logic [1:0] addr_hi = 0;
  logic IO1_CS_n, IO2_CS_n, EXT1_CS_n, EXT2_CS_n;
  int checks = 0, failures = 0;

  plc_io_if dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) begin
      logic [3:0] got, exp;
      {sel_io, rd, wr} = 3'(i >> 2); addr_hi = 2'(i);
      #1;
      got = ~{EXT2_CS_n, EXT1_CS_n, IO2_CS_n, IO1_CS_n};
      exp = (sel_io && (rd || wr)) ? (4'b1 << addr_hi) : 4'b0;
      chk(got == exp, $sformatf("case %0d got %b exp %b", i, got, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
