// tb_plc_seq: the sequencer with the decoder, PC/IR, register block and both
// ALUs around it, and array models of program and data memory. Runs a small
// program and checks (1) the clocks each instruction takes against the
// published 75/100/175 ns (3/4/7 clocks at 40 MHz) and 100/125 ns for 16/32-bit
// word loads and stores, (2) memory and register results worked out by hand,
// (3) CALL/RET, CJ, END, and (4) a timer interrupt with IRET.
module tb_plc_seq;
  import plc_pkg::*;
  import tb_asm_pkg::*;

  localparam logic [19:0] ISR = 20'h40;
  localparam logic [18:0] HX  = 19'h40000;

  logic clk = 0, rst_n = 0, start = 0, irq = 0;
  logic boundary, stop_req, busy, fetch, dm_rd, dm_wr, irq_ack;
  logic [19:0] next_pc, pc, pc_plus1, fetch_addr, stk_din, stk_call, stk_int;
  logic [31:0] ir, rdata_a, rdata_b;
  ctrl_t ctrl;
  logic [18:0] dm_addr;
  logic [15:0] dm_wdata, dm_rdata, h_rdata;
  logic [3:0] ra, rb, reg_wa;
  logic reg_we, flags_we, stk_call_we, stk_int_we, bexec, scan_init, bit_in, hist_in;
  logic acc, gate, wr_bit, hist_wr, pulse_seen, end_flag, illegal_flag, in_isr;
  logic [2:0] reg_wcount, alu_wcount, alu_flags, flags;
  logic [63:0] reg_wdata, alu_result;
  aop_e aop; logic w32; bop_e bop;
  logic [3:0] h_addr = 0; logic h_we = 0; logic [15:0] h_wdata = 0;

  logic [31:0] pm [256];
  logic [15:0] dm [logic [18:0]];
  int checks = 0, failures = 0;
  int cyc [256];
  int cnt = 0, acks = 0;

  plc_seq #(.ISR_ADDR(ISR)) dut (
    .clk, .rst_n, .start, .stop(stop_req), .dbg_halt(1'b0), .boundary, .stop_req,
    .next_pc, .busy, .ctrl, .pc, .pc_plus1, .fetch, .fetch_addr, .dm_rd, .dm_wr,
    .dm_addr, .dm_wdata, .dm_rdata, .ra, .rb, .rdata_a, .rdata_b, .reg_we,
    .reg_wcount, .reg_wa, .reg_wdata, .flags_we, .stk_call_we, .stk_int_we,
    .stk_din, .stk_call, .stk_int, .aop, .w32, .alu_result, .alu_wcount, .bexec,
    .scan_init, .bop, .bit_in, .hist_in, .acc, .wr_bit, .hist_wr, .irq, .irq_ack,
    .status_clr(1'b0), .end_flag, .illegal_flag, .in_isr
  );
  plc_decoder u_dec (.ir, .ctrl);
  plc_pc_ir u_pc (.clk, .rst_n, .fetch, .fetch_addr, .pm_data(pm[fetch_addr[7:0]]),
                  .host_we_lo(1'b0), .host_we_hi(1'b0), .host_wdata(16'h0), .pc, .pc_plus1, .ir);
  plc_regs u_regs (.clk, .rst_n, .ra, .rb, .rdata_a, .rdata_b, .we(reg_we), .wcount(reg_wcount),
                   .wa(reg_wa), .wdata(reg_wdata), .flags_we, .flags_in(alu_flags), .flags,
                   .stk_call_we, .stk_int_we, .stk_din, .stk_call, .stk_int,
                   .h_addr, .h_we, .h_wdata, .h_rdata);
  plc_walu u_walu (.op(aop), .w32, .d(rdata_b), .s(rdata_a), .cin(flags[0]),
                   .result(alu_result), .wcount(alu_wcount), .flags(alu_flags));
  plc_balu u_balu (.clk, .rst_n, .scan_init, .exec(bexec), .bop, .bit_in, .hist_in,
                   .acc, .gate, .wr_bit, .hist_wr, .pulse_seen);

  always #5 clk = ~clk;

  assign dm_rdata = dm.exists(dm_addr) ? dm[dm_addr] : 16'h0;
  always @(posedge clk) if (dm_wr) dm[dm_addr] = dm_wdata;

  // clocks per instruction, indexed by its address
  always @(posedge clk) begin
    if (!rst_n || start) cnt <= 0;
    else if (boundary) begin cyc[pc[7:0]] <= cnt + 1; cnt <= 0; end
    else if (busy && !fetch) cnt <= cnt + 1;
    if (irq_ack) acks <= acks + 1;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] rd(logic [18:0] a);
    return dm.exists(a) ? dm[a] : 16'h0;
  endfunction

  task automatic run_scan();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
  endtask

  task automatic set_reg(input int r, input logic [15:0] v);
    @(negedge clk); h_addr = 4'(r); h_wdata = v; h_we = 1; @(negedge clk); h_we = 0;
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin pm[i] = wm(W_NOP, 0, 0); cyc[i] = 0; end
    pm[0]  = bi(B_LD, 19'h10, 4'd0);
    pm[1]  = bi(B_AND, 19'h10, 4'd1);
    pm[2]  = bi(B_OUT, 19'h20, 4'd0);
    pm[3]  = bi(B_LDP, 19'h10, 4'd0);
    pm[4]  = bi(B_OUT, 19'h20, 4'd1);
    pm[5]  = bx(B_INV);
    pm[6]  = wm(W_LD, 4'd0, 20'h200);
    pm[7]  = wm(W_LDD, 4'd2, 20'h202);
    pm[8]  = wr(0, A_ADD, 4'd0, 4'd2);
    pm[9]  = wm(W_ST, 4'd0, 20'h300);
    pm[10] = wm(W_STD, 4'd2, 20'h304);
    pm[11] = wm(W_CALL, 4'd0, 20'd20);
    pm[12] = bi(B_LDI, 19'h10, 4'd5);
    pm[13] = wm(W_CJ, 4'd0, 20'd15);
    pm[14] = bi(B_OUT, 19'h20, 4'd7);
    pm[15] = bi(B_PLS, 19'h20, 4'd8);
    pm[16] = bii(B_LD, 4'd4, 4'd5);
    pm[17] = bi(B_OUT, 19'h20, 4'd9);
    pm[18] = wm(W_END, 4'd0, 20'h0);
    pm[20] = wr(0, A_BCD, 4'd6, 4'd0);
    pm[21] = wm(W_RET, 4'd0, 20'h0);
    pm[22] = wm(W_JMP, 4'd0, 20'd12);
    // interrupt service routine
    pm[8'(ISR)]     = bi(B_LDI, 19'h10, 4'd5);
    pm[8'(ISR + 1)] = bi(B_OUT, 19'h30, 4'd0);
    pm[8'(ISR + 2)] = wm(W_IRET, 4'd0, 20'h0);

    dm[19'h10]  = 16'h0003;
    dm[19'h100] = 16'd1234;
    dm[19'h101] = 16'd1000;
    dm[19'h102] = 16'h0005;

    repeat (2) @(negedge clk);
    rst_n = 1;
    set_reg(4, 16'h0010);
    set_reg(5, 16'h0001);
    run_scan();

    chk(rd(19'h20) == 16'h0303, $sformatf("outputs after scan 1: %h", rd(19'h20)));
    chk(rd(19'h10 ^ HX) == 16'h0001, "LDP history word");
    chk(rd(19'h20 ^ HX) == 16'h0100, "PLS history word");
    chk(rd(19'h180) == 16'd2234, "16-bit ADD and ST");
    chk(rd(19'h182) == 16'd1000 && rd(19'h183) == 16'h0005, "32-bit LDD/STD");
    chk(end_flag && pc == 0, "END returns to PC 0 and flags the end of scan");
    // cycle counts (one clock = 25 ns)
    chk(cyc[0] == 4,  $sformatf("LD 100 ns: %0d clocks", cyc[0]));
    chk(cyc[1] == 4,  "AND 100 ns");
    chk(cyc[2] == 5,  "OUT read-modify-write 5 clocks");
    chk(cyc[3] == 7,  $sformatf("LDP 175 ns: %0d clocks", cyc[3]));
    chk(cyc[5] == 3,  "INV 75 ns");
    chk(cyc[6] == 4,  "16-bit word load 100 ns");
    chk(cyc[7] == 5,  "32-bit word load 125 ns");
    chk(cyc[8] == 3,  "register ADD 3 clocks");
    chk(cyc[9] == 4,  "16-bit store 100 ns");
    chk(cyc[10] == 5, "32-bit store 125 ns");
    chk(cyc[15] == 8, "PLS 8 clocks");
    chk(cyc[14] == 0, "CJ skipped address 14");
    chk(cyc[20] == 3 && cyc[21] == 3, "CALL target and RET executed");

    // second scan: no new edges, PLS output drops; BCD result of the first scan
    h_addr = 4'd6; #1;
    chk(h_rdata == 16'h2234, "BCD of 2234");
    run_scan();
    chk(rd(19'h20) == 16'h0201, $sformatf("outputs after scan 2: %h", rd(19'h20)));

    // third scan with a timer interrupt
    fork
      begin repeat (20) @(negedge clk); irq = 1; while (acks == 0) @(negedge clk); irq = 0; end
      run_scan();
    join
    chk(acks == 1, "one interrupt taken");
    chk(rd(19'h30) == 16'h0001, "service routine ran");
    chk(!in_isr && end_flag, "returned and finished the scan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
