// tb_plc_cpu_if: host register map (control, break addresses, timer reload,
// status clear, PC and register access only while stopped), region strobes
// and the read-direction output C_RD_INV. A random part writes random values
// to the control, break and reload registers and checks both the read-back
// value of every one of them and the control outputs after each write.
module tb_plc_cpu_if;
  logic clk = 0, rst_n = 0;
  logic C_RD_n = 1, C_WR_n = 1;
  logic [15:0] CD_i = 0, CD_o;
  logic CD_oe, C_RD_INV;
  logic sel_pm = 0, sel_dm = 0, sel_reg = 0, sel_io = 0;
  logic [20:0] addr = 0;
  logic pm_rd, pm_wr, dm_rd, dm_wr, io_rd, io_wr;
  logic [15:0] pm_rdata = 16'h1111, dm_rdata = 16'h2222, rg_rdata = 16'h3333;
  logic [3:0] rg_addr;
  logic rg_we, pc_we_lo, pc_we_hi;
  logic step_en, pcb_en, dmb_en, tmr_en, tmr_ie, status_clr;
  logic [19:0] pc_brk, pc = 20'hABCDE;
  logic [18:0] dm_brk;
  logic [31:0] tmr_reload, tmr_count = 32'h8765_4321;
  logic [7:0] status = 8'h00;
  logic [2:0] flags = 3'b101;
  int checks = 0, failures = 0;

  plc_cpu_if dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic reg_wr(input int a, input logic [15:0] d);
    @(negedge clk); sel_reg = 1; addr = 21'(a); CD_i = d; C_WR_n = 0;
    @(negedge clk); C_WR_n = 1; sel_reg = 0;
  endtask

  task automatic reg_rd(input int a, output logic [15:0] d);
    @(negedge clk); sel_reg = 1; addr = 21'(a); C_RD_n = 0; #1;
    d = CD_o;
    chk(CD_oe && C_RD_INV, "read drives bus");
    @(negedge clk); C_RD_n = 1; sel_reg = 0;
  endtask

  task automatic random_part(input int n);
    logic [15:0] m [8];
    logic [15:0] mask [8] = '{16'h001F, 16'h0000, 16'hFFFF, 16'h000F,
                              16'hFFFF, 16'h0007, 16'hFFFF, 16'hFFFF};
    logic [15:0] d;
    int a;
    for (int k = 0; k < 8; k++) begin
      if (k == 1) continue;
      reg_wr(k, 16'h0); m[k] = 16'h0;
    end
    for (int i = 0; i < n; i++) begin
      a = $urandom_range(7);
      if (a == 1) a = 0;
      d = 16'($urandom);
      reg_wr(a, d);
      m[a] = d & mask[a];
      for (int k = 0; k < 8; k++) begin
        if (k == 1) continue;
        reg_rd(k, d);
        chk(d == m[k], $sformatf("rand %0d reg %0d read %h exp %h", i, k, d, m[k]));
      end
      chk({tmr_ie, tmr_en, dmb_en, pcb_en, step_en} == m[0][4:0], $sformatf("rand %0d ctrl", i));
      chk(pc_brk == {m[3][3:0], m[2]} && dm_brk == {m[5][2:0], m[4]} &&
          tmr_reload == {m[7], m[6]}, $sformatf("rand %0d addresses", i));
    end
  endtask

  initial begin
    logic [15:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    reg_wr(0, 16'h001F);
    chk(step_en && pcb_en && dmb_en && tmr_en && tmr_ie, "CTRL write");
    reg_wr(2, 16'h4321); reg_wr(3, 16'h0009);
    chk(pc_brk == 20'h94321, "PC break address");
    reg_wr(4, 16'h5555); reg_wr(5, 16'h0006);
    chk(dm_brk == 19'h65555, "DM break address");
    reg_wr(6, 16'hBEEF); reg_wr(7, 16'hDEAD);
    chk(tmr_reload == 32'hDEADBEEF, "timer reload");
    reg_rd(0, d);  chk(d == 16'h001F, "CTRL read");
    reg_rd(8, d);  chk(d == 16'hBCDE, "PC low read");
    reg_rd(9, d);  chk(d == 16'hA, "PC high read");
    reg_rd(10, d); chk(d == 16'h5, "flags read");
    reg_rd(12, d); chk(d == 16'h8765, "timer count high");
    reg_rd(20, d); chk(d == 16'h3333 && rg_addr == 4'd4, "general register read");
    // PC and register writes only while stopped
    @(negedge clk); sel_reg = 1; addr = 21'd8; C_WR_n = 0; #1;
    chk(pc_we_lo, "PC write when stopped");
    status = 8'h01; #1;
    chk(!pc_we_lo, "no PC write while running");
    addr = 21'd17; #1;
    chk(!rg_we, "no register write while running");
    status = 8'h00; #1;
    chk(rg_we && rg_addr == 4'd1, "register write when stopped");
    addr = 21'd1; #1;
    chk(status_clr, "status write clears");
    @(negedge clk); C_WR_n = 1; sel_reg = 0;
    // memory regions
    @(negedge clk); sel_pm = 1; C_RD_n = 0; #1;
    chk(pm_rd && CD_o == 16'h1111 && C_RD_INV, "PM read");
    sel_pm = 0; sel_dm = 1; #1;
    chk(dm_rd && CD_o == 16'h2222, "DM read");
    sel_dm = 0; sel_io = 1; #1;
    chk(io_rd && !CD_oe && !C_RD_INV, "I/O read leaves bus to the card");
    C_RD_n = 1; C_WR_n = 0; #1;
    chk(io_wr && !io_rd, "I/O write");
    sel_io = 0; sel_dm = 1; #1;
    chk(dm_wr && !CD_oe, "DM write");
    C_WR_n = 1; sel_dm = 0;
    random_part(400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
