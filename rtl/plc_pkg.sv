// plc_pkg: types and constants shared by the bit-and-word sequence processor.
//
// Every instruction is one fixed 32-bit word. Bit 31 is the multifunction
// "p" bit (parity or step information from the compiler); the processor does
// not interpret it. Bit 30 splits the set in two:
//   IR[30] = 0  bit instruction,  kind = IR[30:23] (8 bits)
//               direct:   IR[22:4] = 19-bit data-memory word address,
//                         IR[3:0]  = bit position in the 16-bit word
//               indirect: IR[7:4] = Rd (holds word address),
//                         IR[3:0] = Rs (holds bit position in [3:0])
//   IR[30] = 1  word instruction, kind = IR[30:24] (7 bits)
//               load/store: IR[23:20] register, IR[19:0] byte address
//               register:   IR[23:20] Rs, IR[19:16] Rd, IR[15:0] sub-op
//               jump/call:  IR[23:20] register, IR[19:0] target address
// The field layouts follow the published formats; the numeric opcode values
// are this design's own, because no opcode table is published.
package plc_pkg;

  localparam int unsigned PC_W   = 20;   // program counter width
  localparam int unsigned DA_W   = 19;   // data-memory word address (16 bit x 512K)
  localparam int unsigned NREG   = 16;   // general registers R0..R15
  localparam int unsigned REG_W  = 16;   // width of one general register

  // Bit-instruction operations, IR[28:23]; IR[29] selects indirect addressing.
  typedef enum logic [5:0] {
    B_NOP  = 6'd0,
    B_LD   = 6'd1,  B_LDI  = 6'd2,  B_AND  = 6'd3,  B_ANI  = 6'd4,
    B_OR   = 6'd5,  B_ORI  = 6'd6,  B_XOR  = 6'd7,
    B_LDP  = 6'd8,  B_LDF  = 6'd9,  B_ANDP = 6'd10, B_ANDF = 6'd11,
    B_ORP  = 6'd12, B_ORF  = 6'd13,
    B_PLS  = 6'd14, B_PLF  = 6'd15,
    B_OUT  = 6'd16, B_SET  = 6'd17, B_RST  = 6'd18,
    B_ANB  = 6'd20, B_ORB  = 6'd21, B_MPS  = 6'd22, B_MRD  = 6'd23,
    B_MPP  = 6'd24, B_INV  = 6'd25, B_MC   = 6'd26, B_MCR  = 6'd27,
    B_STL  = 6'd28, B_RETS = 6'd29
  } bop_e;

  // Word-instruction kinds, IR[29:24].
  typedef enum logic [5:0] {
    W_NOP   = 6'd0,
    W_LD    = 6'd1,  W_LDD  = 6'd2,  W_ST   = 6'd3,  W_STD  = 6'd4,
    W_REG16 = 6'd5,  W_REG32 = 6'd6,
    W_JMP   = 6'd8,  W_CJ   = 6'd9,  W_CALL = 6'd10, W_RET  = 6'd11,
    W_IRET  = 6'd12, W_END  = 6'd13
  } wkind_e;

  // Word-ALU operations, the low bits of the register-format sub-op IR[15:0].
  typedef enum logic [4:0] {
    A_MOV  = 5'd0,  A_ADD  = 5'd1,  A_SUB  = 5'd2,  A_MUL  = 5'd3,
    A_DIV  = 5'd4,  A_AND  = 5'd5,  A_OR   = 5'd6,  A_XOR  = 5'd7,
    A_BCD  = 5'd8,  A_BIN  = 5'd9,  A_BADD = 5'd10, A_BSUB = 5'd11,
    A_BMUL = 5'd12, A_BDIV = 5'd13, A_ROL  = 5'd14, A_ROR  = 5'd15,
    A_RCL  = 5'd16, A_RCR  = 5'd17, A_SHL  = 5'd18, A_SHR  = 5'd19
  } aop_e;

  // What the sequencer has to do for one instruction.
  typedef enum logic [3:0] {
    C_INTERNAL,   // bit-stack / logic only, no memory access
    C_BIT_RD,     // read one bit
    C_BIT_PULSE,  // read bit and its edge-history word, update the history
    C_BIT_WR,     // read-modify-write one bit (OUT/SET/RST)
    C_BIT_PLS,    // read-modify-write one bit plus its edge history (PLS/PLF)
    C_WORD_LD,    // load register(s) from data memory
    C_WORD_ST,    // store register(s) to data memory
    C_WORD_ALU,   // register-register word operation
    C_FLOW,       // jump / call / return
    C_END         // end of scan
  } iclass_e;

  // Decoded control word.
  typedef struct packed {
    iclass_e           iclass;
    logic              is_bit;
    bop_e              bop;
    wkind_e            wkind;
    aop_e              aop;
    logic              w32;        // 32-bit word operation / register pair
    logic              indirect;   // bit operand addressed through registers
    logic [DA_W-1:0]   bit_waddr;  // direct bit: word address
    logic [3:0]        bit_pos;    // direct bit: bit position
    logic [3:0]        ra;         // first register field (IR[23:20] or IR[7:4])
    logic [3:0]        rb;         // second register field (IR[19:16] or IR[3:0])
    logic [19:0]       addr20;     // word instruction address field
    logic              illegal;
  } ctrl_t;

  // Binary (up to 27 bits used) to packed BCD, 8 digits; values above
  // 99_999_999 are reduced modulo 10^8.
  function automatic logic [31:0] bin2bcd(input logic [31:0] b);
    logic [31:0] v;
    logic [31:0] r;
    v = b % 32'd100_000_000;
    r = '0;
    for (int i = 0; i < 8; i++) begin
      r[i*4 +: 4] = 4'(v % 32'd10);
      v = v / 32'd10;
    end
    return r;
  endfunction

  // Packed BCD (8 digits) to binary. A nibble above 9 is taken as its value.
  function automatic logic [31:0] bcd2bin(input logic [31:0] d);
    logic [31:0] r;
    r = '0;
    for (int i = 7; i >= 0; i--) r = r * 32'd10 + 32'(d[i*4 +: 4]);
    return r;
  endfunction

endpackage
