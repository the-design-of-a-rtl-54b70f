// plc_regs: register block of the sequence processor.
//
// Sixteen 16-bit general registers R0..R15. Two neighbouring registers form a
// 32-bit value (Rn low half, Rn+1 high half, indices wrap modulo 16), and
// multiply/divide results of up to 64 bits are written to four consecutive
// registers in one clock. The block also holds the word flags (carry, zero,
// sign) and the two stack registers: one keeps the return address of CALL,
// the other the return address of the timer interrupt.
//
// Interface: two combinational 32-bit pair read ports (a, b), one write port
// of 1, 2 or 4 registers, written on the rising clock edge; a host port for the
// debugger to read and write single registers while the processor is stopped.
// Register count and width follow the published text; the pair ordering, the
// flag set and the use of the two stack registers are this design's choices.
module plc_regs
  import plc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // processor ports
  input  logic [3:0]       ra,
  input  logic [3:0]       rb,
  output logic [31:0]      rdata_a,   // {R[ra+1], R[ra]}
  output logic [31:0]      rdata_b,   // {R[rb+1], R[rb]}
  input  logic             we,
  input  logic [2:0]       wcount,    // 1, 2 or 4 registers
  input  logic [3:0]       wa,
  input  logic [63:0]      wdata,
  input  logic             flags_we,
  input  logic [2:0]       flags_in,  // {sign, zero, carry}
  output logic [2:0]       flags,
  input  logic             stk_call_we,
  input  logic             stk_int_we,
  input  logic [PC_W-1:0]  stk_din,
  output logic [PC_W-1:0]  stk_call,
  output logic [PC_W-1:0]  stk_int,
  // host port
  input  logic [3:0]       h_addr,
  input  logic             h_we,
  input  logic [15:0]      h_wdata,
  output logic [15:0]      h_rdata
);

  logic [REG_W-1:0] r [NREG];

  assign rdata_a = {r[4'(ra + 4'd1)], r[ra]};
  assign rdata_b = {r[4'(rb + 4'd1)], r[rb]};
  assign h_rdata = r[h_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREG); i++) r[i] <= '0;
      flags    <= '0;
      stk_call <= '0;
      stk_int  <= '0;
    end else begin
      if (we) begin
        for (int i = 0; i < 4; i++)
          if (i < int'(wcount)) r[4'(wa + 4'(i))] <= wdata[i*16 +: 16];
      end else if (h_we) begin
        r[h_addr] <= h_wdata;
      end
      if (flags_we)    flags    <= flags_in;
      if (stk_call_we) stk_call <= stk_din;
      if (stk_int_we)  stk_int  <= stk_din;
    end
  end

endmodule
