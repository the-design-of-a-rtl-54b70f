// plc_decoder: instruction decoder of the sequence processor.
//
// Purely combinational. It splits the fixed 32-bit instruction word into the
// fields of the five published formats (bit direct, bit indirect, word
// load/store, word register, jump/call) and classifies the instruction for the
// sequencer, which uses the class to choose how many data-memory cycles it
// runs. Because every instruction has the same length and the fields sit at
// fixed positions, decoding is a single level of field extraction plus one
// table lookup, done in the decode cycle.
//
// Interface: ir (instruction register) in, ctrl (plc_pkg::ctrl_t) out.
// The field positions follow the published formats; the class assignment and
// opcode values are this design's own (see plc_pkg).
module plc_decoder
  import plc_pkg::*;
(
  input  logic [31:0] ir,
  output ctrl_t       ctrl
);

  always_comb begin
    ctrl           = '0;
    ctrl.is_bit    = ~ir[30];
    ctrl.indirect  = ~ir[30] & ir[29];
    ctrl.bop       = bop_e'(ir[28:23]);
    ctrl.wkind     = wkind_e'(ir[29:24]);
    ctrl.aop       = aop_e'(ir[4:0]);
    ctrl.bit_waddr = ir[22:4];
    ctrl.bit_pos   = ir[3:0];
    ctrl.addr20    = ir[19:0];
    ctrl.ra        = ir[30] ? ir[23:20] : ir[7:4];
    ctrl.rb        = ir[30] ? ir[19:16] : ir[3:0];
    ctrl.w32       = 1'b0;
    ctrl.iclass    = C_INTERNAL;
    if (!ir[30]) begin
      unique case (ir[28:23])
        B_NOP, B_ANB, B_ORB, B_MPS, B_MRD, B_MPP, B_INV, B_MC, B_MCR, B_RETS:
          ctrl.iclass = C_INTERNAL;
        B_LD, B_LDI, B_AND, B_ANI, B_OR, B_ORI, B_XOR, B_STL:
          ctrl.iclass = C_BIT_RD;
        B_LDP, B_LDF, B_ANDP, B_ANDF, B_ORP, B_ORF:
          ctrl.iclass = C_BIT_PULSE;
        B_OUT, B_SET, B_RST:
          ctrl.iclass = C_BIT_WR;
        B_PLS, B_PLF:
          ctrl.iclass = C_BIT_PLS;
        default: begin
          ctrl.iclass  = C_INTERNAL;
          ctrl.illegal = 1'b1;
        end
      endcase
    end else begin
      unique case (ir[29:24])
        W_NOP:          ctrl.iclass = C_INTERNAL;
        W_LD:           ctrl.iclass = C_WORD_LD;
        W_LDD: begin    ctrl.iclass = C_WORD_LD;  ctrl.w32 = 1'b1; end
        W_ST:           ctrl.iclass = C_WORD_ST;
        W_STD: begin    ctrl.iclass = C_WORD_ST;  ctrl.w32 = 1'b1; end
        W_REG16:        ctrl.iclass = C_WORD_ALU;
        W_REG32: begin  ctrl.iclass = C_WORD_ALU; ctrl.w32 = 1'b1; end
        W_JMP, W_CJ, W_CALL, W_RET, W_IRET:
                        ctrl.iclass = C_FLOW;
        W_END:          ctrl.iclass = C_END;
        default: begin
          ctrl.iclass  = C_INTERNAL;
          ctrl.illegal = 1'b1;
        end
      endcase
    end
  end

endmodule
