// tb_plc_table2: instruction execution times of the whole chip, group by group,
// for the instruction kinds of the published speed comparison.
//
// For each instruction the host loads a program of eight copies followed by
// END, starts it with HOLD and counts the clocks GA_RUN stays high. The same
// count for a program holding only END is subtracted and the difference
// divided by eight gives the clocks of one instruction. That is compared with
// this design's timing (3 clocks for internal operations, 4 for one data
// read, 7 for an edge contact, 8 for PLS/PLF, 4/5 for 16/32-bit word load
// and store) and printed next to the published time of the group, at
// 25 ns per clock. Only pins are observed. Chip at its default sizes, 40 MHz.
// The comparison with the published times is printed, not counted: PLS/PLF
// are one clock slower than the published pulse group by this design's own
// choice, and the published word-instruction times are board measurements.
module tb_plc_table2;
  import plc_pkg::*;
  import tb_asm_pkg::*;

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

  localparam int NCOPY = 8;
  localparam int CLK_NS = 25;

  int checks = 0, failures = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_wr(input int region, input logic [20:0] a, input logic [15:0] d);
    @(negedge CLK);
    CS_n = ~(4'b1 << region); CA = a; CD_i = d; C_WR_n = 0;
    @(negedge CLK);
    C_WR_n = 1; CS_n = 4'hF;
  endtask

  task automatic pm_put(input logic [19:0] a, input logic [31:0] w);
    host_wr(0, {a, 1'b0}, w[15:0]);
    host_wr(0, {a, 1'b1}, w[31:16]);
  endtask

  // run from PC 0 to END; returns the clocks GA_RUN was high
  task automatic run(output int clocks);
    int n = 0;
    clocks = 0;
    @(negedge CLK); HOLD = 0;
    while (!GA_RUN && n < 20) begin @(negedge CLK); n++; end
    chk(GA_RUN, "GA_RUN rises");
    while (GA_RUN && clocks < 1000) begin @(negedge CLK); clocks++; end
    chk(!GA_RUN, "GA_RUN falls at END");
    HOLD = 1;
    repeat (4) @(negedge CLK);
  endtask

  int base;

  // time one instruction kind; w(i) is the word placed at address i
  task automatic measure(input string name, input logic [31:0] w [NCOPY],
                         input int exp_clk, input string published);
    int t, per;
    for (int i = 0; i < NCOPY; i++) pm_put(20'(i), w[i]);
    pm_put(20'(NCOPY), wm(W_END, 4'd0, 20'h0));
    run(t);
    per = (t - base) / NCOPY;
    chk((t - base) == exp_clk * NCOPY, $sformatf("%s: %0d clocks, expected %0d", name, per, exp_clk));
    $display("  %-10s %2d clocks = %4d ns   published: %s", name, per, per * CLK_NS, published);
  endtask

  task automatic same(input string name, input logic [31:0] w, input int exp_clk, input string published);
    logic [31:0] ws [NCOPY];
    for (int i = 0; i < NCOPY; i++) ws[i] = w;
    measure(name, ws, exp_clk, published);
  endtask

  localparam logic [18:0] X = 19'h10, Y = 19'h20;

  initial begin
    automatic bop_e  b3 [8] = '{B_ANB, B_ORB, B_MC, B_MCR, B_MPS, B_MRD, B_MPP, B_INV};
    automatic bop_e  b4 [7] = '{B_LD, B_LDI, B_AND, B_ANI, B_OR, B_ORI, B_XOR};
    automatic bop_e  b7 [6] = '{B_LDP, B_LDF, B_ANDP, B_ANDF, B_ORP, B_ORF};
    automatic aop_e  ao [18] = '{A_MOV, A_ADD, A_SUB, A_MUL, A_DIV, A_BCD, A_BIN, A_BADD,
                       A_BSUB, A_BMUL, A_BDIV, A_AND, A_OR, A_XOR, A_ROL, A_ROR,
                       A_RCL, A_RCR};
    automatic string tw [18] = '{"225ns / 300ns", "600ns / 825ns", "600ns / 825ns",
                       "1.25us / 1.825us", "1.25us / 13.5us", "725ns / 3.0us",
                       "725ns / 1.8us", "600ns / 1.2us", "4.7us / 1.2us",
                       "3.6us / 23.0us", "3.6us / 26.0us", "600ns / 7.0us",
                       "600ns / 7.0us", "600ns / 7.0us", "1.9us / 3.9us",
                       "1.9us / 3.9us", "1.5us / 4.1us", "1.5us / 4.1us"};
    logic [31:0] jw [NCOPY];

    repeat (3) @(negedge CLK);
    RST_n = 1;
    repeat (3) @(negedge CLK);

    pm_put(20'd0, wm(W_END, 4'd0, 20'h0));
    run(base);
    $display("END-only program: GA_RUN high %0d clocks", base);

    $display("Internal bit operations (published 75 ns):");
    foreach (b3[i]) same(b3[i].name(), bx(b3[i]), 3, "75ns");
    $display("Contact reads (published 100 ns):");
    foreach (b4[i]) same(b4[i].name(), bi(b4[i], X, 4'(i)), 4, "100ns");
    $display("Edge contacts and pulse outputs (published 175 ns):");
    foreach (b7[i]) same(b7[i].name(), bi(b7[i], X, 4'(i)), 7, "175ns");
    same("B_PLS", bi(B_PLS, Y, 4'd0), 8, "175ns");
    same("B_PLF", bi(B_PLF, Y, 4'd1), 8, "175ns");
    $display("Word load/store (published 100 ns 16 bit, 125 ns 32 bit):");
    same("LD",  wm(W_LD,  4'd0, 20'h200), 4, "100ns");
    same("ST",  wm(W_ST,  4'd0, 20'h220), 4, "100ns");
    same("LDD", wm(W_LDD, 4'd0, 20'h200), 5, "125ns");
    same("STD", wm(W_STD, 4'd0, 20'h220), 5, "125ns");
    $display("Word operations, 16 bit then 32 bit (published 16 bit / 32 bit):");
    foreach (ao[i]) begin
      same({ao[i].name(), "/16"}, wr(0, ao[i], 4'd2, 4'd4), 3, tw[i]);
      same({ao[i].name(), "/32"}, wr(1, ao[i], 4'd2, 4'd4), 3, tw[i]);
    end
    for (int i = 0; i < NCOPY; i++) jw[i] = wm(W_JMP, 4'd0, 20'(i + 1));
    measure("JMP", jw, 3, "300ns");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge CLK);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
