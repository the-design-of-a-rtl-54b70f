// tb_plc_asic: end-to-end test of the whole chip at its default sizes
// (1M-instruction program memory, 512K-word data memory), driven the way the
// host MPU drives it. The host loads a ladder program and its data through the
// CPU interface, lowers HOLD, waits for GA_RUN to fall and reads the results.
// Scenarios:
//   1. two scans of a program using contacts, block and MPS stacks, master
//      control, the step controller, pulse contacts and PLS, word loads and
//      stores, BCD conversion and addition, rotate, 32x32 multiply, CALL/RET,
//      CJ and divide; the GA_RUN time of scan 1 is checked against the sum of
//      the per-instruction clock counts (3/4/5/7/8 clocks);
//   2. 1-step run, PC break and DM break, through the debugger registers;
//   3. a wait loop ended by the 32-bit timer interrupt;
//   4. the same scan with an 8-bit data-memory interface (DM_16BIT = 0);
//   5. host accesses with chip-select decoding inside the chip (CS_SEL = 1),
//      including the I/O chip selects.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_plc_asic;
  import plc_pkg::*;
  import tb_asm_pkg::*;

  localparam logic [19:0] ISR = 20'hFF000;   // default service routine address
  localparam logic [18:0] HX  = 19'h40000;   // default history-word offset

  logic CLK = 0, RST_n = 0, HOLD = 1, GA_RUN;
  logic [19:0] PA;
  logic [31:0] PI_i, PI_o;
  logic PI_oe, PM_CSL_n, PM_CSH_n, PM_RD_n, PM_WRL_n, PM_WRH_n;
  logic DM_16BIT = 1;
  logic [18:0] DA;
  logic [15:0] DD_i, DD_o;
  logic DD_oe, DM_CS_n, DM_RD_n, DM_WRL_n, DM_WRH_n, LB_n, UB_n;
  logic [15:0] CD_i = 0, CD_o;
  logic CD_oe, C_RD_INV;
  logic [20:0] CA = 0;
  logic [3:0] CS_n = 4'hF;
  logic CS_SEL = 0, C_RD_n = 1, C_WR_n = 1;
  logic IO1_CS_n, IO2_CS_n, EXT1_CS_n, EXT2_CS_n;

  plc_asic u_dut (.*);
  tb_pm_sram u_pm (.clk(CLK), .PA, .PI_o, .PI_i, .PM_CSL_n, .PM_CSH_n, .PM_RD_n,
                   .PM_WRL_n, .PM_WRH_n);
  tb_dm_sram u_dm (.clk(CLK), .DM_16BIT, .DA, .DD_o, .DD_i, .DM_CS_n, .DM_RD_n,
                   .DM_WRL_n, .DM_WRH_n, .LB_n, .UB_n);

  always #12.5 CLK = ~CLK;   // 40 MHz

  int checks = 0, failures = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_overlap = 0, n_pulse = 0, n_mc_gate = 0, n_step_gate = 0, n_irq = 0;
  int n_handover = 0, n_dm8 = 0, n_dm16 = 0, n_io = 0, n_call = 0, n_cj = 0;
  int n_hist = 0, n_csdec = 0, n_step = 0, n_pcbrk = 0, n_dmbrk = 0;
  logic ga_q = 0;
  int run_clocks = 0;

  always @(posedge CLK) begin
    ga_q <= GA_RUN;
    if (ga_q && !GA_RUN) n_handover++;
    if (GA_RUN) run_clocks++;
    if (u_dut.boundary && !PM_RD_n && GA_RUN) n_overlap++;
    if (u_dut.u_balu.pulse_seen) n_pulse++;
    if (u_dut.bexec && u_dut.bop == B_OUT && u_dut.acc && !u_dut.gate) begin
      if (!u_dut.u_balu.step_en) n_step_gate++; else n_mc_gate++;
    end
    if (u_dut.irq_ack) n_irq++;
    if (!DM_CS_n && !DM_16BIT && (!DM_WRH_n || !DM_WRL_n) && LB_n && UB_n) n_dm8++;
    if (!DM_CS_n && DM_16BIT && !DM_WRL_n && !LB_n && !UB_n) n_dm16++;
    if (!EXT1_CS_n || !EXT2_CS_n || !IO1_CS_n || !IO2_CS_n) n_io++;
    if (u_dut.stk_call_we) n_call++;
    if (u_dut.boundary && u_dut.u_seq.cq.wkind == W_CJ && !u_dut.u_seq.cq.is_bit &&
        u_dut.next_pc != u_dut.pc_plus1) n_cj++;
    if (GA_RUN && !DM_CS_n && !DM_WRL_n && DA[18]) n_hist++;
  end

  // ---------------- host bus ----------------
  // region: 0 PM, 1 DM, 2 registers, 3 I/O (CS_SEL = 0 pin selects)
  task automatic host_wr(input int region, input logic [20:0] a, input logic [15:0] d);
    @(negedge CLK);
    CS_n = CS_SEL ? 4'hE : ~(4'b1 << region); CA = a; CD_i = d; C_WR_n = 0;
    @(negedge CLK);
    C_WR_n = 1; CS_n = 4'hF;
  endtask

  task automatic host_rd(input int region, input logic [20:0] a, output logic [15:0] d);
    @(negedge CLK);
    CS_n = CS_SEL ? 4'hE : ~(4'b1 << region); CA = a; C_RD_n = 0;
    @(negedge CLK);
    d = CD_o;
    if (region != 3) chk(CD_oe && C_RD_INV, "chip drives CD on host read");
    C_RD_n = 1; CS_n = 4'hF;
  endtask

  task automatic pm_put(input logic [19:0] a, input logic [31:0] w);
    host_wr(0, {a, 1'b0}, w[15:0]);
    host_wr(0, {a, 1'b1}, w[31:16]);
  endtask

  task automatic dm_put(input logic [18:0] a, input logic [15:0] d);
    host_wr(1, 21'(a), d);
  endtask

  function automatic logic [15:0] dm_get(logic [18:0] a);
    return {u_dm.mh[a], u_dm.ml[a]};
  endfunction

  task automatic set_pc(input logic [19:0] a);
    host_wr(2, 21'd8, a[15:0]);
    host_wr(2, 21'd9, 16'(a[19:16]));
  endtask

  // lower HOLD, wait for the processor to hand the bus back, raise HOLD
  task automatic run_until_stop(input int limit);
    int n = 0;
    @(negedge CLK); HOLD = 0;
    while (!GA_RUN && n < 20) begin @(negedge CLK); n++; end
    chk(GA_RUN, "GA_RUN rises after HOLD falls");
    n = 0;
    while (GA_RUN && n < limit) begin @(negedge CLK); n++; end
    chk(!GA_RUN, "GA_RUN falls again");
    HOLD = 1;
    repeat (4) @(negedge CLK);
  endtask

  // ---------------- program 1 ----------------
  logic [31:0] prog [64];
  int          pcyc [64];    // clocks from the per-class table (75/100/175 ns)
  logic        pexec [64];   // executed in a scan

  task automatic put(input int a, input logic [31:0] w, input int c, input logic ex = 1);
    prog[a] = w; pcyc[a] = c; pexec[a] = ex;
  endtask

  localparam logic [18:0] X = 19'h10, Y = 19'h20, M = 19'h30;

  initial begin
    logic [15:0] d;
    int expect_clocks;

    for (int i = 0; i < 64; i++) begin prog[i] = wm(W_NOP, 0, 0); pcyc[i] = 0; pexec[i] = 0; end
    put(0,  bi(B_LD,  X, 0), 4);
    put(1,  bi(B_AND, X, 1), 4);
    put(2,  bi(B_OUT, Y, 0), 5);
    put(3,  bi(B_LDP, X, 2), 7);
    put(4,  bi(B_OUT, Y, 1), 5);
    put(5,  bi(B_LD,  X, 0), 4);
    put(6,  bx(B_MPS), 3);
    put(7,  bi(B_ANI, X, 1), 4);
    put(8,  bi(B_OUT, Y, 2), 5);
    put(9,  bx(B_MPP), 3);
    put(10, bi(B_OUT, Y, 3), 5);
    put(11, bi(B_LD,  X, 5), 4);
    put(12, bi(B_LD,  X, 0), 4);
    put(13, bx(B_ORB), 3);
    put(14, bi(B_LD,  X, 1), 4);
    put(15, bi(B_OR,  X, 5), 4);
    put(16, bx(B_ANB), 3);
    put(17, bi(B_OUT, Y, 4), 5);
    put(18, bi(B_LD,  X, 5), 4);
    put(19, bx(B_MC), 3);
    put(20, bi(B_LD,  X, 0), 4);
    put(21, bi(B_OUT, Y, 5), 5);
    put(22, bx(B_MCR), 3);
    put(23, bi(B_STL, X, 5), 4);
    put(24, bi(B_LD,  X, 0), 4);
    put(25, bi(B_OUT, Y, 6), 5);
    put(26, bx(B_RETS), 3);
    put(27, bi(B_PLS, Y, 8), 8);
    put(28, wm(W_LD, 4'd0, 20'h200), 4);          // R0 = 1234
    put(29, wm(W_LD, 4'd1, 20'h202), 4);          // R1 = 5678
    put(30, wr(0, A_BCD, 4'd2, 4'd0), 3);         // R2 = 0x1234
    put(31, wr(0, A_BCD, 4'd3, 4'd1), 3);         // R3 = 0x5678
    put(32, wr(0, A_BADD, 4'd2, 4'd3), 3);        // R2 = 0x6912
    put(33, wm(W_ST, 4'd2, 20'h300), 4);
    put(34, wm(W_LD, 4'd4, 20'h204), 4);          // R4 = 4
    put(35, wr(0, A_ROL, 4'd0, 4'd4), 3);         // R0 = 0x4D20
    put(36, wm(W_ST, 4'd0, 20'h302), 4);
    put(37, wm(W_LDD, 4'd6, 20'h206), 5);         // R7:R6 = 0x0001_0000
    put(38, wr(1, A_MUL, 4'd6, 4'd6), 3);         // R9..R6 = 2^32
    put(39, wm(W_STD, 4'd8, 20'h304), 5);
    put(40, wm(W_CALL, 4'd0, 20'd60), 3);
    put(41, wm(W_ST, 4'd10, 20'h308), 4);
    put(42, bi(B_LDI, X, 5), 4);
    put(43, wm(W_CJ, 4'd0, 20'd45), 3);
    put(44, bi(B_OUT, Y, 7), 5, 0);
    put(45, wm(W_END, 4'd0, 20'h0), 3);
    put(60, wr(0, A_MOV, 4'd10, 4'd1), 3);
    put(61, wr(0, A_DIV, 4'd10, 4'd4), 3);        // R10 = 1419, R11 = 2
    put(62, wm(W_RET, 4'd0, 20'h0), 3);

    repeat (3) @(negedge CLK);
    RST_n = 1;
    repeat (3) @(negedge CLK);

    // ---- load program and data ----
    for (int i = 0; i < 64; i++) pm_put(20'(i), prog[i]);
    // timer program: wait for the interrupt to set M0
    pm_put(20'h80, bi(B_LD, M, 0));
    pm_put(20'h81, wm(W_CJ, 4'd0, 20'h83));
    pm_put(20'h82, wm(W_JMP, 4'd0, 20'h80));
    pm_put(20'h83, wm(W_END, 4'd0, 20'h0));
    pm_put(ISR,     bi(B_LDI, X, 5));
    pm_put(ISR + 1, bi(B_OUT, M, 0));
    pm_put(ISR + 2, wm(W_IRET, 4'd0, 20'h0));
    host_rd(0, {20'd3, 1'b1}, d);
    chk(d == prog[3][31:16], "program read back");

    dm_put(X, 16'h0007);
    dm_put(19'h100, 16'd1234);
    dm_put(19'h101, 16'd5678);
    dm_put(19'h102, 16'd4);
    dm_put(19'h103, 16'h0000);
    dm_put(19'h104, 16'h0001);

    // ---- scan 1 ----
    run_clocks = 0;
    run_until_stop(5000);
    expect_clocks = 1;   // the first fetch
    for (int i = 0; i < 64; i++) if (pexec[i]) expect_clocks += pcyc[i];
    chk(run_clocks == expect_clocks,
        $sformatf("scan time %0d clocks, expected %0d", run_clocks, expect_clocks));
    host_rd(1, 21'(Y), d);
    chk(d == 16'h011B, $sformatf("scan 1 outputs %h", d));
    host_rd(1, 21'h180, d); chk(d == 16'h6912, $sformatf("BCD add %h", d));
    host_rd(1, 21'h181, d); chk(d == 16'h4D20, $sformatf("rotate %h", d));
    host_rd(1, 21'h182, d); chk(d == 16'h0001, "64-bit product word 2");
    host_rd(1, 21'h183, d); chk(d == 16'h0000, "64-bit product word 3");
    host_rd(1, 21'h184, d); chk(d == 16'd1419, $sformatf("subroutine divide %0d", d));
    host_rd(2, 21'd16 + 21'd11, d); chk(d == 16'd2, "remainder in R11");
    host_rd(2, 21'd1, d); chk(d[1] && !d[0], "status: scan ended, stopped");

    // ---- scan 2: pulses do not repeat ----
    run_until_stop(5000);
    host_rd(1, 21'(Y), d);
    chk(d == 16'h0019, $sformatf("scan 2 outputs %h", d));

    // ---- 1-step run ----
    host_wr(2, 21'd1, 16'h0);                 // clear status
    host_wr(2, 21'd0, 16'h0001);
    set_pc(20'd0);
    run_until_stop(100);
    host_rd(2, 21'd8, d); chk(d == 16'd1, "1-step stops after one instruction");
    host_rd(2, 21'd1, d); chk(d[2], "status: step stop");
    if (d[2]) n_step++;
    run_until_stop(100);
    host_rd(2, 21'd8, d); chk(d == 16'd2, "second step");

    // ---- PC break ----
    host_wr(2, 21'd1, 16'h0);
    host_wr(2, 21'd2, 16'd5);
    host_wr(2, 21'd3, 16'd0);
    host_wr(2, 21'd0, 16'h0002);
    set_pc(20'd0);
    run_until_stop(200);
    host_rd(2, 21'd8, d); chk(d == 16'd5, $sformatf("PC break at 5, PC=%0d", d));
    host_rd(2, 21'd1, d); chk(d[3], "status: PC break");
    if (d[3]) n_pcbrk++;

    // ---- DM break on the output word ----
    host_wr(2, 21'd1, 16'h0);
    host_wr(2, 21'd4, 16'(Y));
    host_wr(2, 21'd5, 16'd0);
    host_wr(2, 21'd0, 16'h0004);
    set_pc(20'd0);
    run_until_stop(200);
    host_rd(2, 21'd8, d); chk(d == 16'd3, $sformatf("DM break after OUT, PC=%0d", d));
    host_rd(2, 21'd1, d); chk(d[4], "status: DM break");
    if (d[4]) n_dmbrk++;

    // ---- timer interrupt ends a wait loop ----
    host_wr(2, 21'd1, 16'h0);
    dm_put(M, 16'h0);
    host_wr(2, 21'd6, 16'd200);
    host_wr(2, 21'd7, 16'd0);
    host_wr(2, 21'd0, 16'h0018);
    set_pc(20'h80);
    run_until_stop(5000);
    host_wr(2, 21'd0, 16'h0000);
    host_rd(1, 21'(M), d); chk(d[0], "service routine set M0");
    host_rd(2, 21'd1, d); chk(d[1], "wait loop reached END");
    chk(n_irq >= 1, "timer interrupt taken");

    // ---- 8-bit data-memory interface ----
    DM_16BIT = 0;
    dm_put(Y, 16'h0);
    dm_put(X ^ HX, 16'h0);
    dm_put(Y ^ HX, 16'h0);
    set_pc(20'd0);
    run_until_stop(5000);
    host_rd(1, 21'(Y), d);
    chk(d == 16'h011B, $sformatf("8-bit interface scan outputs %h", d));
    chk(dm_get(19'h184) == 16'd1419, "8-bit interface word store");
    DM_16BIT = 1;

    // ---- decoded chip selects ----
    CS_SEL = 1;
    host_rd(1, {2'b10, 19'h180}, d); chk(d == 16'h6912, "decoded DM read");
    if (d == 16'h6912) n_csdec++;
    host_rd(0, {1'b0, 19'd3, 1'b0}, d); chk(d == prog[3][15:0], "decoded PM read");
    host_wr(3, {3'b110, 18'd2}, 16'h0077);
    host_rd(3, {3'b110, 18'd2}, d); chk(d == 16'h0077, "decoded register access");
    host_wr(3, {3'b111, 2'd2, 16'h0}, 16'h1);
    chk(n_io == 1, "EXT1 chip select strobe");
    CS_SEL = 0;
    host_wr(3, {5'b0, 16'h0}, 16'h1);
    chk(n_io == 2, "IO1 chip select strobe");

    // ---- mechanism coverage ----
    chk(n_overlap > 0,   "fetch overlapped with execute");
    chk(n_pulse > 0,     "pulse edge detected");
    chk(n_hist > 0,      "edge-history word written");
    chk(n_mc_gate > 0,   "master control gated an output");
    chk(n_step_gate > 0, "step controller gated an output");
    chk(n_irq > 0,       "timer interrupt");
    chk(n_handover >= 7, "GA_RUN hand-over to the host");
    chk(n_dm8 > 0,       "8-bit data-memory writes");
    chk(n_dm16 > 0,      "16-bit data-memory writes");
    chk(n_call > 0,      "CALL");
    chk(n_cj > 0,        "CJ taken");
    chk(n_step > 0,      "1-step run");
    chk(n_pcbrk > 0,     "PC break");
    chk(n_dmbrk > 0,     "DM break");
    chk(n_csdec > 0,     "CS_SEL decoded access");
    $display("mechanisms: overlap=%0d pulse=%0d hist=%0d mc=%0d step=%0d irq=%0d handover=%0d dm8=%0d dm16=%0d call=%0d cj=%0d io=%0d",
             n_overlap, n_pulse, n_hist, n_mc_gate, n_step_gate, n_irq, n_handover,
             n_dm8, n_dm16, n_call, n_cj, n_io);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
