// tb_plc_decoder: checks field extraction and instruction classes of the
// decoder against the published bit positions, on random and directed words.
module tb_plc_decoder;
  import plc_pkg::*;
  import tb_asm_pkg::*;

  logic [31:0] ir;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  plc_decoder dut (.ir, .ctrl);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ir=%h", what, ir); end
  endtask

  task automatic cls(input logic [31:0] w, input iclass_e c, input logic w32);
    ir = w; #1;
    chk(ctrl.iclass == c && ctrl.w32 == w32 && !ctrl.illegal, $sformatf("class %s", c.name()));
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      ir = $urandom; #1;
      chk(ctrl.is_bit == !ir[30], "is_bit");
      if (!ir[30]) begin
        chk(ctrl.bit_waddr == ir[22:4], "bit address 22~4");
        chk(ctrl.bit_pos == ir[3:0], "bit position 3~0");
        chk(ctrl.indirect == ir[29], "indirect");
        chk(ctrl.ra == ir[7:4] && ctrl.rb == ir[3:0], "indirect Rd/Rs 7~4/3~0");
      end else begin
        chk(ctrl.addr20 == ir[19:0], "address 19~0");
        chk(ctrl.ra == ir[23:20] && ctrl.rb == ir[19:16], "reg fields 23~20/19~16");
        chk(ctrl.indirect == 1'b0, "word not indirect");
      end
    end
    cls(bx(B_ANB), C_INTERNAL, 0);
    cls(bx(B_MPS), C_INTERNAL, 0);
    cls(bi(B_LD, 19'h123, 4'd5), C_BIT_RD, 0);
    cls(bi(B_XOR, 19'h1, 4'd1), C_BIT_RD, 0);
    cls(bi(B_STL, 19'h1, 4'd1), C_BIT_RD, 0);
    cls(bi(B_LDP, 19'h1, 4'd1), C_BIT_PULSE, 0);
    cls(bi(B_ORF, 19'h1, 4'd1), C_BIT_PULSE, 0);
    cls(bi(B_OUT, 19'h1, 4'd1), C_BIT_WR, 0);
    cls(bi(B_RST, 19'h1, 4'd1), C_BIT_WR, 0);
    cls(bi(B_PLS, 19'h1, 4'd1), C_BIT_PLS, 0);
    cls(bii(B_LD, 4'd3, 4'd4), C_BIT_RD, 0);
    cls(wm(W_LD, 4'd2, 20'h100), C_WORD_LD, 0);
    cls(wm(W_LDD, 4'd2, 20'h100), C_WORD_LD, 1);
    cls(wm(W_ST, 4'd2, 20'h100), C_WORD_ST, 0);
    cls(wm(W_STD, 4'd2, 20'h100), C_WORD_ST, 1);
    cls(wr(0, A_ADD, 4'd1, 4'd2), C_WORD_ALU, 0);
    cls(wr(1, A_MUL, 4'd1, 4'd2), C_WORD_ALU, 1);
    cls(wm(W_JMP, 4'd0, 20'h5), C_FLOW, 0);
    cls(wm(W_CALL, 4'd0, 20'h5), C_FLOW, 0);
    cls(wm(W_END, 4'd0, 20'h0), C_END, 0);
    ir = wr(0, A_BCD, 4'd1, 4'd2); #1;
    chk(ctrl.aop == A_BCD && ctrl.rb == 4'd1 && ctrl.ra == 4'd2, "register format Rs/Rd/sub");
    ir = {1'b0, 1'b0, 1'b0, 6'd63, 23'h0}; #1;
    chk(ctrl.illegal, "illegal bit opcode");
    ir = {1'b0, 1'b1, 6'd60, 24'h0}; #1;
    chk(ctrl.illegal, "illegal word opcode");
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
