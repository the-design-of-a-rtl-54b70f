// tb_plc_cs_block: region selection with host-decoded selects (CS_SEL=0) and
// with address decoding inside the chip (CS_SEL=1).
module tb_plc_cs_block;
  logic [3:0] cs_n = 4'hF;
  logic cs_sel = 0;
  logic [20:0] ca = 0, addr;
  logic sel_pm, sel_dm, sel_reg, sel_io;
  int checks = 0, failures = 0;

  plc_cs_block dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s cs=%b ca=%h", what, cs_n, ca); end
  endtask

  initial begin
    for (int i = 0; i < 40; i++) begin
      cs_sel = 0; ca = 21'($urandom);
      cs_n = ~(4'b1 << (i % 4)); #1;
      chk({sel_io, sel_reg, sel_dm, sel_pm} == ~cs_n && addr == ca, "pin select");
      cs_n = 4'hF; #1;
      chk({sel_io, sel_reg, sel_dm, sel_pm} == 0, "no select");
      cs_sel = 1; cs_n = 4'hE; #1;
      if (!ca[20])          chk(sel_pm && !sel_dm && addr == {1'b0, ca[19:0]}, "decoded PM");
      else if (!ca[19])     chk(sel_dm && !sel_pm && addr == {2'b0, ca[18:0]}, "decoded DM");
      else if (!ca[18])     chk(sel_reg && !sel_io && addr[17:0] == ca[17:0], "decoded REG");
      else                  chk(sel_io && !sel_reg && addr[17:0] == ca[17:0], "decoded IO");
      cs_n = 4'hD; #1;
      chk({sel_io, sel_reg, sel_dm, sel_pm} == 0, "decoded mode needs CS0");
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
