// plc_asic: 32-bit bit-and-word processor for PLC sequence control.
//
// A Harvard machine for ladder programs. Fixed 32-bit instructions come from
// an external program memory (two 16-bit SRAMs, 1M instructions) on their own
// bus, while a separate 16-bit bus reaches the data memory (512K words) that
// holds the relay bits and word devices, so an instruction fetch never waits
// for a data access and overlaps the execution of the previous instruction.
// A bit ALU evaluates contact logic with its block, MPS and master-control
// stacks and the pulse (edge) instructions; a word ALU does binary and BCD
// arithmetic, logic and rotates on sixteen 16-bit registers.
//
// The chip works as a coprocessor of a general-purpose host MPU. The host
// loads the program and data memories through the CPU interface while the
// processor is stopped, then lowers HOLD; the processor raises GA_RUN, runs
// one scan up to END (or a debugger stop) and lowers GA_RUN again, handing the
// memories back. A 32-bit timer can interrupt the scan, and a debugger stops
// after one instruction, at a PC break or at a data-memory break.
//
// Bidirectional buses are split into _i/_o/_oe. Active-low pins end in _n.
// Block structure and pin names follow the published block diagram; opcode
// values, register map and cycle-level protocols are this design's own (see
// the block files).
module plc_asic
  import plc_pkg::*;
(
  input  logic            CLK,
  input  logic            RST_n,
  // run control
  input  logic            HOLD,
  output logic            GA_RUN,
  // program memory
  output logic [PC_W-1:0] PA,
  input  logic [31:0]     PI_i,
  output logic [31:0]     PI_o,
  output logic            PI_oe,
  output logic            PM_CSL_n,
  output logic            PM_CSH_n,
  output logic            PM_RD_n,
  output logic            PM_WRL_n,
  output logic            PM_WRH_n,
  // data memory
  input  logic            DM_16BIT,
  output logic [DA_W-1:0] DA,
  input  logic [15:0]     DD_i,
  output logic [15:0]     DD_o,
  output logic            DD_oe,
  output logic            DM_CS_n,
  output logic            DM_RD_n,
  output logic            DM_WRL_n,
  output logic            DM_WRH_n,
  output logic            LB_n,
  output logic            UB_n,
  // host CPU
  input  logic [15:0]     CD_i,
  output logic [15:0]     CD_o,
  output logic            CD_oe,
  input  logic [20:0]     CA,
  input  logic [3:0]      CS_n,
  input  logic            CS_SEL,
  input  logic            C_RD_n,
  input  logic            C_WR_n,
  output logic            C_RD_INV,
  // I/O chip selects
  output logic            IO1_CS_n,
  output logic            IO2_CS_n,
  output logic            EXT1_CS_n,
  output logic            EXT2_CS_n
);

  // ---------------- nets ----------------
  logic            start, stop, running, hold_s;
  logic            boundary, stop_req, busy, dbg_halt;
  logic [PC_W-1:0] next_pc, pc, pc_plus1, fetch_addr;
  logic            fetch;
  logic [31:0]     ir, pm_rdata;
  ctrl_t           ctrl;
  logic            p_dm_rd, p_dm_wr;
  logic [DA_W-1:0] p_dm_addr;
  logic [15:0]     p_dm_wdata, dm_rdata;
  logic [3:0]      ra, rb, reg_wa, rg_addr;
  logic [31:0]     rdata_a, rdata_b;
  logic            reg_we, flags_we, stk_call_we, stk_int_we, rg_we;
  logic [2:0]      reg_wcount, flags, alu_flags, alu_wcount;
  logic [63:0]     reg_wdata, alu_result;
  logic [PC_W-1:0] stk_din, stk_call, stk_int;
  aop_e            aop;
  logic            w32;
  logic            bexec, scan_init, bit_in, hist_in, acc, gate, wr_bit, hist_wr, pulse_seen;
  bop_e            bop;
  logic            irq, irq_ack, tmr_pending;
  logic [31:0]     tmr_count, tmr_reload;
  logic            status_clr, end_flag, illegal_flag, in_isr;
  logic            step_en, pcb_en, dmb_en, tmr_en, tmr_ie;
  logic [PC_W-1:0] pc_brk;
  logic [DA_W-1:0] dm_brk;
  logic            step_hit, pc_hit, dm_hit;
  logic            sel_pm, sel_dm, sel_reg, sel_io;
  logic [20:0]     haddr;
  logic            pm_h_rd, pm_h_wr, dm_h_rd, dm_h_wr, io_rd, io_wr;
  logic            pc_we_lo, pc_we_hi;
  logic [15:0]     pm_h_rdata, rg_rdata;
  logic [7:0]      status;

  assign GA_RUN = running;
  assign status = {illegal_flag, acc, tmr_pending, dm_hit, pc_hit, step_hit, end_flag, running};

  // ---------------- CLK block ----------------
  plc_clk_ctrl u_clk (
    .clk(CLK), .rst_n(RST_n), .HOLD, .boundary, .stop_req,
    .start, .stop, .running, .hold_s
  );

  // ---------------- PC & IR, decoder, sequencer ----------------
  plc_pc_ir u_pc_ir (
    .clk(CLK), .rst_n(RST_n), .fetch, .fetch_addr, .pm_data(pm_rdata),
    .host_we_lo(pc_we_lo), .host_we_hi(pc_we_hi), .host_wdata(CD_i),
    .pc, .pc_plus1, .ir
  );

  plc_decoder u_dec (.ir, .ctrl);

  plc_seq u_seq (
    .clk(CLK), .rst_n(RST_n), .start, .stop, .dbg_halt, .boundary, .stop_req,
    .next_pc, .busy, .ctrl, .pc, .pc_plus1, .fetch, .fetch_addr,
    .dm_rd(p_dm_rd), .dm_wr(p_dm_wr), .dm_addr(p_dm_addr), .dm_wdata(p_dm_wdata),
    .dm_rdata, .ra, .rb, .rdata_a, .rdata_b, .reg_we, .reg_wcount, .reg_wa,
    .reg_wdata, .flags_we, .stk_call_we, .stk_int_we, .stk_din, .stk_call,
    .stk_int, .aop, .w32, .alu_result, .alu_wcount, .bexec, .scan_init, .bop,
    .bit_in, .hist_in, .acc, .wr_bit, .hist_wr, .irq, .irq_ack, .status_clr,
    .end_flag, .illegal_flag, .in_isr
  );

  // ---------------- register block and ALUs ----------------
  plc_regs u_regs (
    .clk(CLK), .rst_n(RST_n), .ra, .rb, .rdata_a, .rdata_b,
    .we(reg_we), .wcount(reg_wcount), .wa(reg_wa), .wdata(reg_wdata),
    .flags_we, .flags_in(alu_flags), .flags, .stk_call_we, .stk_int_we,
    .stk_din, .stk_call, .stk_int,
    .h_addr(rg_addr), .h_we(rg_we), .h_wdata(CD_i), .h_rdata(rg_rdata)
  );

  plc_walu u_walu (
    .op(aop), .w32, .d(rdata_b), .s(rdata_a), .cin(flags[0]),
    .result(alu_result), .wcount(alu_wcount), .flags(alu_flags)
  );

  plc_balu u_balu (
    .clk(CLK), .rst_n(RST_n), .scan_init, .exec(bexec), .bop, .bit_in,
    .hist_in, .acc, .gate, .wr_bit, .hist_wr, .pulse_seen
  );

  // ---------------- timer interrupt, debugger ----------------
  plc_timer_int u_tmr (
    .clk(CLK), .rst_n(RST_n), .en(tmr_en), .ie(tmr_ie), .reload(tmr_reload),
    .ack(irq_ack), .count(tmr_count), .pending(tmr_pending), .irq
  );

  plc_debug u_dbg (
    .clk(CLK), .rst_n(RST_n), .step_en, .pcb_en, .dmb_en, .pc_brk, .dm_brk,
    .dm_access(p_dm_rd | p_dm_wr), .dm_addr(p_dm_addr), .boundary, .next_pc,
    .clear(status_clr), .halt(dbg_halt), .step_hit, .pc_hit, .dm_hit
  );

  // ---------------- memory interfaces ----------------
  plc_pm_if u_pm (
    .p_own(running), .p_rd(fetch), .p_addr(fetch_addr), .p_rdata(pm_rdata),
    .h_rd(pm_h_rd), .h_wr(pm_h_wr), .h_addr(haddr), .h_wdata(CD_i),
    .h_rdata(pm_h_rdata), .PA, .PI_i, .PI_o, .PI_oe, .PM_CSL_n, .PM_CSH_n,
    .PM_RD_n, .PM_WRL_n, .PM_WRH_n
  );

  plc_dm_if u_dm (
    .p_own(running), .p_rd(p_dm_rd), .p_wr(p_dm_wr), .p_addr(p_dm_addr),
    .p_wdata(p_dm_wdata), .rdata(dm_rdata), .h_rd(dm_h_rd), .h_wr(dm_h_wr),
    .h_be(2'b11), .h_addr(haddr[DA_W-1:0]), .h_wdata(CD_i), .DM_16BIT, .DA,
    .DD_i, .DD_o, .DD_oe, .DM_CS_n, .DM_RD_n, .DM_WRL_n, .DM_WRH_n, .LB_n, .UB_n
  );

  // ---------------- host side ----------------
  plc_cs_block u_cs (
    .cs_n(CS_n), .cs_sel(CS_SEL), .ca(CA), .sel_pm, .sel_dm, .sel_reg,
    .sel_io, .addr(haddr)
  );

  plc_cpu_if u_cpu (
    .clk(CLK), .rst_n(RST_n), .C_RD_n, .C_WR_n, .CD_i, .CD_o, .CD_oe, .C_RD_INV,
    .sel_pm, .sel_dm, .sel_reg, .sel_io, .addr(haddr),
    .pm_rd(pm_h_rd), .pm_wr(pm_h_wr), .pm_rdata(pm_h_rdata),
    .dm_rd(dm_h_rd), .dm_wr(dm_h_wr), .dm_rdata, .io_rd, .io_wr,
    .rg_addr, .rg_we, .rg_rdata, .pc_we_lo, .pc_we_hi,
    .step_en, .pcb_en, .dmb_en, .tmr_en, .tmr_ie, .pc_brk, .dm_brk, .tmr_reload,
    .status_clr, .status, .pc, .flags, .tmr_count
  );

  plc_io_if u_io (
    .sel_io, .rd(io_rd), .wr(io_wr), .addr_hi(haddr[17:16]),
    .IO1_CS_n, .IO2_CS_n, .EXT1_CS_n, .EXT2_CS_n
  );

endmodule
