// tb_plc_debug: 1-step, PC break and DM break stop decisions and their hit
// flags, presented with a sequence of instruction boundaries. A random part
// then runs instructions of one to four clocks with random data accesses,
// modes and break addresses drawn from a small range (so that hits are
// frequent) and checks halt and the sticky hit flags for every instruction.
module tb_plc_debug;
  logic clk = 0, rst_n = 0;
  logic step_en = 0, pcb_en = 0, dmb_en = 0, dm_access = 0, boundary = 0, clear = 0;
  logic [19:0] pc_brk = 0, next_pc = 0;
  logic [18:0] dm_brk = 0, dm_addr = 0;
  logic halt, step_hit, pc_hit, dm_hit;
  int checks = 0, failures = 0;

  plc_debug dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one instruction: optional data access, then a boundary with next_pc
  task automatic instr(input logic acc_dm, input logic [18:0] a, input logic [19:0] npc,
                       output logic h);
    @(negedge clk); dm_access = acc_dm; dm_addr = a;
    @(negedge clk); dm_access = 0; boundary = 1; next_pc = npc; #1; h = halt;
    @(negedge clk); boundary = 0;
  endtask

  task automatic random_part(input int n);
    logic m_step = 0, m_pc = 0, m_dm = 0, hit, eh;
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(9) == 0) begin
        step_en = ($urandom_range(3) == 0); pcb_en = 1'($urandom); dmb_en = 1'($urandom);
        pc_brk = 20'($urandom_range(7)); dm_brk = 19'($urandom_range(7));
      end
      if ($urandom_range(19) == 0) begin
        clear = 1; @(negedge clk); clear = 0;
        m_step = 0; m_pc = 0; m_dm = 0;
      end
      hit = 0;
      for (int c = $urandom_range(3); c > 0; c--) begin
        @(negedge clk);
        dm_access = 1'($urandom); dm_addr = 19'($urandom_range(7));
        if (dmb_en && dm_access && dm_addr == dm_brk) hit = 1;
      end
      @(negedge clk);
      dm_access = 1'($urandom); dm_addr = 19'($urandom_range(7));
      if (dmb_en && dm_access && dm_addr == dm_brk) hit = 1;
      boundary = 1; next_pc = 20'($urandom_range(7)); #1;
      eh = step_en || (pcb_en && next_pc == pc_brk) || hit;
      chk(halt == eh, $sformatf("rand %0d halt %b exp %b", i, halt, eh));
      m_step |= step_en; m_pc |= pcb_en && next_pc == pc_brk; m_dm |= hit;
      @(negedge clk); boundary = 0; dm_access = 0;
      chk(step_hit == m_step && pc_hit == m_pc && dm_hit == m_dm,
          $sformatf("rand %0d hit flags %b%b%b exp %b%b%b", i, step_hit, pc_hit, dm_hit,
                    m_step, m_pc, m_dm));
    end
  endtask

  initial begin
    logic h;
    repeat (2) @(negedge clk);
    rst_n = 1;
    instr(1, 19'h10, 20'h1, h);       chk(!h, "no stop when disabled");
    step_en = 1;
    instr(0, 0, 20'h2, h);            chk(h && step_hit, "1-step stops every instruction");
    instr(0, 0, 20'h3, h);            chk(h, "1-step again");
    step_en = 0; clear = 1; @(negedge clk); clear = 0;
    chk(!step_hit, "clear");
    pcb_en = 1; pc_brk = 20'h40;
    instr(0, 0, 20'h3F, h);           chk(!h, "no PC break before address");
    instr(0, 0, 20'h40, h);           chk(h && pc_hit, "PC break at address");
    pcb_en = 0; dmb_en = 1; dm_brk = 19'h1234;
    instr(1, 19'h1233, 20'h41, h);    chk(!h && !dm_hit, "other DM address");
    instr(1, 19'h1234, 20'h42, h);    chk(h && dm_hit, "DM break on access");
    instr(0, 0, 20'h43, h);           chk(!h, "DM hit not carried over");
    random_part(3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
