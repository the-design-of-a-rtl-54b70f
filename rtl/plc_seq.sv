// plc_seq: instruction sequencer of the bit-and-word processor.
//
// A multi-cycle state machine. The next instruction is fetched in the last
// (execute) cycle of the current one, so the program-memory access overlaps
// execution and every instruction starts directly with its decode cycle:
//
//   DEC  latch the decoded control word
//   OPR  read registers, form the data-memory word address and bit position
//        (direct from the instruction, or through registers for indirect bit
//        addressing)
//   RD1/RD2/MRG/WR1/WR2  data-memory cycles, one 16-bit access each
//   EXE  update the bit ALU, write registers, choose the next PC, take a
//        timer interrupt, fetch the next instruction
//
// Cycles per instruction (one cycle = 25 ns at 40 MHz):
//   ANB, ORB, MPS, MRD, MPP, INV, MC, MCR, word register ops, jumps  3 (75 ns)
//   LD, LDI, AND, ANI, OR, ORI, XOR, STL (read one bit)              4 (100 ns)
//   LDP, LDF, ANDP, ANDF, ORP, ORF (operand + edge history)          7 (175 ns)
//   OUT, SET, RST (read-modify-write of one word)                    5
//   PLS, PLF (target and its history, read and written)              8
//   word LD/ST 16 bit 4 (100 ns), LDD/STD 32 bit 5 (125 ns)
// Pulse instructions keep the previous-scan value of a bit in a history word
// at the bit's word address XOR HIST_XOR. A 32-bit operand is two words at
// consecutive addresses, low half first.
//
// Flow: JMP, CJ (jump if the bit accumulator is 1), CALL (return address in
// stack register 0), RET, IRET (return from the timer interrupt, stack
// register 1) and END (end of scan: PC returns to 0, the bit stacks are
// cleared and the processor stops). A pending timer interrupt is taken at the
// end of any instruction except END and CALL: the next PC goes to stack
// register 1 and execution continues at ISR_ADDR; interrupts do not nest.
//
// Interface: start comes from plc_clk_ctrl; boundary, next_pc and stop_req
// are combinational in EXE and stop (from plc_clk_ctrl) decides whether the
// next state is DEC or IDLE. The 75/100/175 ns times, the Harvard fetch
// overlap, 20-bit PC and the instruction families follow the published
// description; the state sequence, the history-word scheme, the interrupt
// rules and the 3-cycle jump are this design's own.
// Three concurrent assertions state the bus rules (one data-memory operation
// per cycle, program-memory reads only in fetch slots, stops only at a
// boundary); their `disable iff (!rst_n)` is why lint sees rst_n used both
// asynchronously and synchronously.
module plc_seq
  import plc_pkg::*;
#(
  parameter logic [PC_W-1:0] ISR_ADDR = 20'hFF000,
  parameter logic [DA_W-1:0] HIST_XOR = 19'h40000
) (
  input  logic            clk,
  input  logic            rst_n,
  // run control
  input  logic            start,
  input  logic            stop,
  input  logic            dbg_halt,
  output logic            boundary,
  output logic            stop_req,
  output logic [PC_W-1:0] next_pc,
  output logic            busy,
  // program counter / instruction
  input  ctrl_t           ctrl,       // decoder output for the current IR
  input  logic [PC_W-1:0] pc,
  input  logic [PC_W-1:0] pc_plus1,
  output logic            fetch,
  output logic [PC_W-1:0] fetch_addr,
  // data memory
  output logic            dm_rd,
  output logic            dm_wr,
  output logic [DA_W-1:0] dm_addr,
  output logic [15:0]     dm_wdata,
  input  logic [15:0]     dm_rdata,
  // register block
  output logic [3:0]      ra,
  output logic [3:0]      rb,
  input  logic [31:0]     rdata_a,
  input  logic [31:0]     rdata_b,
  output logic            reg_we,
  output logic [2:0]      reg_wcount,
  output logic [3:0]      reg_wa,
  output logic [63:0]     reg_wdata,
  output logic            flags_we,
  output logic            stk_call_we,
  output logic            stk_int_we,
  output logic [PC_W-1:0] stk_din,
  input  logic [PC_W-1:0] stk_call,
  input  logic [PC_W-1:0] stk_int,
  // word ALU
  output aop_e            aop,
  output logic            w32,
  input  logic [63:0]     alu_result,
  input  logic [2:0]      alu_wcount,
  // bit ALU
  output logic            bexec,
  output logic            scan_init,
  output bop_e            bop,
  output logic            bit_in,
  output logic            hist_in,
  input  logic            acc,
  input  logic            wr_bit,
  input  logic            hist_wr,
  // timer interrupt
  input  logic            irq,
  output logic            irq_ack,
  // status
  input  logic            status_clr,
  output logic            end_flag,
  output logic            illegal_flag,
  output logic            in_isr
);

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_DEC, S_OPR, S_RD1, S_RD2, S_MRG, S_WR1, S_WR2, S_EXE
  } state_e;

  state_e          state, nstate;
  ctrl_t           cq;
  logic [DA_W-1:0] ea;        // effective word address
  logic [3:0]      bpos;
  logic [15:0]     rd1_q, rd2_q;
  logic [PC_W-1:0] npc_pre;
  logic            take_int;

  assign ra      = cq.ra;
  assign rb      = cq.rb;
  assign aop     = cq.aop;
  assign w32     = cq.w32;
  assign bop     = cq.bop;
  assign bit_in  = rd1_q[bpos];
  assign hist_in = rd2_q[bpos];
  assign busy    = (state != S_IDLE);

  // state after the operand cycle, and after each memory cycle
  function automatic state_e after(state_e s, ctrl_t c);
    state_e n;
    n = S_EXE;
    unique case (c.iclass)
      C_BIT_RD:    n = (s == S_OPR) ? S_RD1 : S_EXE;
      C_BIT_PULSE: unique case (s)
                     S_OPR: n = S_RD1;
                     S_RD1: n = S_RD2;
                     S_RD2: n = S_MRG;
                     S_MRG: n = S_WR2;
                     default: n = S_EXE;
                   endcase
      C_BIT_WR:    unique case (s)
                     S_OPR: n = S_RD1;
                     S_RD1: n = S_WR1;
                     default: n = S_EXE;
                   endcase
      C_BIT_PLS:   unique case (s)
                     S_OPR: n = S_RD1;
                     S_RD1: n = S_RD2;
                     S_RD2: n = S_MRG;
                     S_MRG: n = S_WR1;
                     S_WR1: n = S_WR2;
                     default: n = S_EXE;
                   endcase
      C_WORD_LD:   unique case (s)
                     S_OPR: n = S_RD1;
                     S_RD1: n = c.w32 ? S_RD2 : S_EXE;
                     default: n = S_EXE;
                   endcase
      C_WORD_ST:   unique case (s)
                     S_OPR: n = S_WR1;
                     S_WR1: n = c.w32 ? S_WR2 : S_EXE;
                     default: n = S_EXE;
                   endcase
      default:     n = S_EXE;
    endcase
    return n;
  endfunction

  function automatic logic [15:0] put_bit(logic [15:0] w, logic [3:0] p, logic v);
    logic [15:0] r;
    r    = w;
    r[p] = v;
    return r;
  endfunction

  logic pulse_like;
  assign pulse_like = (cq.iclass == C_BIT_PULSE) || (cq.iclass == C_BIT_PLS);

  // data-memory cycles
  always_comb begin
    dm_rd    = 1'b0;
    dm_wr    = 1'b0;
    dm_addr  = ea;
    dm_wdata = '0;
    unique case (state)
      S_RD1: dm_rd = 1'b1;
      S_RD2: begin
        dm_rd   = 1'b1;
        dm_addr = pulse_like ? (ea ^ HIST_XOR) : (ea + 1'b1);
      end
      S_WR1: begin
        dm_wr    = 1'b1;
        dm_wdata = (cq.iclass == C_WORD_ST) ? rdata_a[15:0] : put_bit(rd1_q, bpos, wr_bit);
      end
      S_WR2: begin
        dm_wr = 1'b1;
        if (pulse_like) begin
          dm_addr  = ea ^ HIST_XOR;
          dm_wdata = put_bit(rd2_q, bpos, hist_wr);
        end else begin
          dm_addr  = ea + 1'b1;
          dm_wdata = rdata_a[31:16];
        end
      end
      default: ;
    endcase
  end

  // execute cycle: next PC, interrupt, register writes
  always_comb begin
    npc_pre = pc_plus1;
    if (cq.iclass == C_FLOW) begin
      unique case (cq.wkind)
        W_JMP:   npc_pre = cq.addr20;
        W_CJ:    npc_pre = acc ? cq.addr20 : pc_plus1;
        W_CALL:  npc_pre = cq.addr20;
        W_RET:   npc_pre = stk_call;
        W_IRET:  npc_pre = stk_int;
        default: npc_pre = pc_plus1;
      endcase
    end else if (cq.iclass == C_END) begin
      npc_pre = '0;
    end
    boundary = (state == S_EXE);
    take_int = boundary && irq && !in_isr && (cq.iclass != C_END) &&
               !(cq.iclass == C_FLOW && cq.wkind == W_CALL);
    next_pc  = take_int ? ISR_ADDR : npc_pre;
    stop_req = boundary && ((cq.iclass == C_END) || dbg_halt);
    irq_ack  = take_int;

    stk_call_we = boundary && cq.iclass == C_FLOW && cq.wkind == W_CALL;
    stk_int_we  = take_int;
    stk_din     = take_int ? npc_pre : pc_plus1;

    bexec     = boundary && cq.is_bit;
    scan_init = boundary && (cq.iclass == C_END);

    reg_we     = 1'b0;
    reg_wcount = 3'd1;
    reg_wa     = cq.ra;
    reg_wdata  = '0;
    flags_we   = 1'b0;
    if (boundary && cq.iclass == C_WORD_ALU) begin
      reg_we     = 1'b1;
      reg_wcount = alu_wcount;
      reg_wa     = cq.rb;
      reg_wdata  = alu_result;
      flags_we   = 1'b1;
    end else if (boundary && cq.iclass == C_WORD_LD) begin
      reg_we     = 1'b1;
      reg_wcount = cq.w32 ? 3'd2 : 3'd1;
      reg_wdata  = {32'h0, rd2_q, rd1_q};
    end

    fetch      = (state == S_FETCH) || boundary;
    fetch_addr = (state == S_FETCH) ? pc : next_pc;
  end

  always_comb begin
    nstate = state;
    unique case (state)
      S_IDLE:  if (start) nstate = S_FETCH;
      S_FETCH: nstate = S_DEC;
      S_DEC:   nstate = S_OPR;
      S_EXE:   nstate = stop ? S_IDLE : S_DEC;
      default: nstate = after(state, cq);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cq           <= '0;
      ea           <= '0;
      bpos         <= '0;
      rd1_q        <= '0;
      rd2_q        <= '0;
      in_isr       <= 1'b0;
      end_flag     <= 1'b0;
      illegal_flag <= 1'b0;
    end else begin
      state <= nstate;
      unique case (state)
        S_DEC: cq <= ctrl;
        S_OPR: begin
          if (cq.is_bit) begin
            ea   <= cq.indirect ? DA_W'(rdata_a[15:0]) : cq.bit_waddr;
            bpos <= cq.indirect ? rdata_b[3:0] : cq.bit_pos;
          end else begin
            ea   <= cq.addr20[19:1];
            bpos <= '0;
          end
          rd1_q <= '0;
          rd2_q <= '0;
          if (cq.illegal) illegal_flag <= 1'b1;
        end
        S_RD1: rd1_q <= dm_rdata;
        S_RD2: rd2_q <= dm_rdata;
        default: ;
      endcase
      if (take_int) in_isr <= 1'b1;
      else if (boundary && cq.iclass == C_FLOW && cq.wkind == W_IRET) in_isr <= 1'b0;
      if (status_clr) begin
        end_flag     <= 1'b0;
        illegal_flag <= 1'b0;
      end else if (scan_init) begin
        end_flag <= 1'b1;
      end
    end
  end

  // bus rules: one data-memory operation per cycle, program memory read only
  // in a fetch cycle, and the processor stops only at an instruction boundary
  a_dm_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(dm_rd && dm_wr));
  a_fetch_slot: assert property (@(posedge clk) disable iff (!rst_n)
                                 fetch |-> (state == S_FETCH || state == S_EXE));
  a_stop_at_boundary: assert property (@(posedge clk) disable iff (!rst_n)
                                       (state == S_EXE && nstate == S_IDLE) |-> stop);

endmodule
