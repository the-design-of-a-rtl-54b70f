// plc_walu: word ALU of the sequence processor.
//
// Combinational. Computes Rd <op> Rs on 16-bit registers or 32-bit register
// pairs. The add/subtract and shift path is 32 bits wide and the multiply and
// divide path 64 bits wide, as the published specification states:
//   MOV, ADD, SUB, AND, OR, XOR           result in Rd (or the pair Rd+1:Rd)
//   MUL  16x16 -> 32, 32x32 -> 64         result in 2 or 4 registers
//   DIV  quotient in the low half, remainder in the high half (2 or 4 regs)
//   BCD  binary Rs to packed BCD; BIN  packed BCD Rs to binary
//   BADD, BSUB, BMUL, BDIV                the same on packed-BCD operands
//   ROL, ROR  rotate by Rs[4:0]; RCL, RCR rotate through the carry flag
//   SHL, SHR  logical barrel shift by Rs[4:0]
// Operands are unsigned. Division by zero returns zero and sets carry.
// BCD arithmetic wraps at 10^4 (16 bit) or 10^8 (32 bit) and reports the wrap
// (or a borrow) in carry.
//
// Interface: op, w32, d (Rd value), s (Rs value), cin (carry flag) in;
// result (64 bits), wcount (registers to write) and flags {sign,zero,carry}
// out. The operation list follows the published instruction set; operand
// order, signedness, register placement of wide results and the BCD
// overflow rule are this design's choices.
module plc_walu
  import plc_pkg::*;
(
  input  aop_e        op,
  input  logic        w32,
  input  logic [31:0] d,
  input  logic [31:0] s,
  input  logic        cin,
  output logic [63:0] result,
  output logic [2:0]  wcount,
  output logic [2:0]  flags
);

  // Binary to 16-digit packed BCD, for the 32-bit BCD multiply.
  function automatic logic [63:0] bin2bcd64(input logic [63:0] b);
    logic [63:0] v;
    logic [63:0] r;
    v = b;
    r = '0;
    for (int i = 0; i < 16; i++) begin
      r[i*4 +: 4] = 4'(v % 64'd10);
      v = v / 64'd10;
    end
    return r;
  endfunction

  logic [31:0] dm, sm;          // operands masked to the working width
  logic [31:0] lim;             // 10^4 or 10^8
  logic [31:0] db, sb;          // BCD operands in binary
  logic [4:0]  n;
  logic        carry;
  logic [32:0] sum;
  logic [63:0] prod;
  logic [32:0] rcx;
  logic [31:0] rot;

  always_comb begin
    dm    = w32 ? d : {16'h0, d[15:0]};
    sm    = w32 ? s : {16'h0, s[15:0]};
    lim   = w32 ? 32'd100_000_000 : 32'd10_000;
    db    = bcd2bin(dm);
    sb    = bcd2bin(sm);
    n     = w32 ? s[4:0] : {1'b0, s[3:0]};
    result = '0;
    carry  = cin;
    wcount = w32 ? 3'd2 : 3'd1;
    sum    = '0;
    prod   = '0;
    rcx    = '0;
    rot    = '0;
    unique case (op)
      A_MOV: result = 64'(sm);
      A_ADD: begin
        sum    = 33'(dm) + 33'(sm);
        result = w32 ? 64'(sum[31:0]) : 64'(sum[15:0]);
        carry  = w32 ? sum[32] : sum[16];
      end
      A_SUB: begin
        sum    = 33'(dm) - 33'(sm);
        result = w32 ? 64'(sum[31:0]) : 64'(sum[15:0]);
        carry  = dm < sm;
      end
      A_MUL: begin
        result = 64'(dm) * 64'(sm);
        wcount = w32 ? 3'd4 : 3'd2;
      end
      A_DIV: begin
        wcount = w32 ? 3'd4 : 3'd2;
        carry  = (sm == '0);
        if (sm != '0) begin
          if (w32) result = {dm % sm, dm / sm};
          else     result = 64'({16'(dm % sm), 16'(dm / sm)});
        end
      end
      A_AND: result = 64'(dm & sm);
      A_OR:  result = 64'(dm | sm);
      A_XOR: result = 64'(dm ^ sm);
      A_BCD: begin
        result = 64'(bin2bcd(sm % lim));
        carry  = sm >= lim;
      end
      A_BIN: result = 64'(sb);
      A_BADD: begin
        sum    = 33'(db) + 33'(sb);
        carry  = sum >= 33'(lim);
        result = 64'(bin2bcd(32'(sum % 33'(lim))));
      end
      A_BSUB: begin
        carry  = db < sb;
        result = 64'(bin2bcd(carry ? (lim - sb + db) : (db - sb)));
      end
      A_BMUL: begin
        prod   = 64'(db) * 64'(sb);
        result = w32 ? bin2bcd64(prod) : 64'(bin2bcd(32'(prod)));
        wcount = w32 ? 3'd4 : 3'd2;
      end
      A_BDIV: begin
        wcount = w32 ? 3'd4 : 3'd2;
        carry  = (sb == '0);
        if (sb != '0) begin
          if (w32) result = {bin2bcd(db % sb), bin2bcd(db / sb)};
          else     result = 64'({bin2bcd(db % sb)[15:0], bin2bcd(db / sb)[15:0]});
        end
      end
      A_ROL: begin
        rot    = w32 ? ((dm << n) | (dm >> (6'd32 - 6'(n))))
                     : ((dm << n) | (dm >> (6'd16 - 6'(n))));
        result = w32 ? 64'(rot) : 64'(rot[15:0]);
      end
      A_ROR: begin
        rot    = w32 ? ((dm >> n) | (dm << (6'd32 - 6'(n))))
                     : ((dm >> n) | (dm << (6'd16 - 6'(n))));
        result = w32 ? 64'(rot) : 64'(rot[15:0]);
      end
      A_RCL, A_RCR: begin
        // rotate the (width+1)-bit value {carry, operand}; one step at a time
        rcx = w32 ? {cin, dm} : {16'h0, cin, dm[15:0]};
        for (int i = 0; i < 31; i++) begin
          if (i < int'(n)) begin
            if (op == A_RCL)
              rcx = w32 ? {rcx[31:0], rcx[32]} : {16'h0, rcx[15:0], rcx[16]};
            else
              rcx = w32 ? {rcx[0], rcx[32:1]} : {16'h0, rcx[0], rcx[16:1]};
          end
        end
        result = w32 ? 64'(rcx[31:0]) : 64'(rcx[15:0]);
        carry  = w32 ? rcx[32] : rcx[16];
      end
      A_SHL: begin
        rot    = dm << n;
        result = w32 ? 64'(rot) : 64'(rot[15:0]);
      end
      A_SHR: result = 64'(dm >> n);
      default: result = 64'(dm);
    endcase
    flags[0] = carry;
    flags[1] = (wcount == 3'd4) ? (result == '0)
             : (wcount == 3'd2) ? (result[31:0] == '0) : (result[15:0] == '0);
    flags[2] = (wcount == 3'd4) ? result[63]
             : (wcount == 3'd2) ? result[31] : result[15];
  end

endmodule
