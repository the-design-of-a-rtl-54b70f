// tb_plc_timer_int: the interrupt period equals the reload value in clocks,
// acknowledge clears the request, disable and interrupt-enable gating.
// A random part then changes enable, interrupt enable, acknowledge and small
// reload values at random and compares count, pending and irq every clock
// with a model built from that rule: the request comes `reload` clocks after
// the timer was enabled or last expired.
module tb_plc_timer_int;
  logic clk = 0, rst_n = 0, en = 0, ie = 0, ack = 0;
  logic [31:0] reload = 0, count;
  logic pending, irq;
  int checks = 0, failures = 0;
  longint last, period;

  plc_timer_int dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic random_part(input int n);
    int unsigned since = 0;     // clocks since enable or the last expiry
    logic        m_pend = pending;
    logic        fire;
    en = 0; ack = 1; @(negedge clk); ack = 0; m_pend = 0;
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(199) == 0) en = ~en;
      if ($urandom_range(99) == 0) ie = ~ie;
      if ($urandom_range(299) == 0) reload = 32'($urandom_range(12));
      ack = ($urandom_range(3) == 0);
      @(posedge clk);
      fire = en && (reload != 0) && (since + 1 == reload);
      if (!en || fire) since = 0; else since++;
      if (fire) m_pend = 1; else if (ack) m_pend = 0;
      @(negedge clk);
      chk(count == since, $sformatf("rand %0d count %0d exp %0d", i, count, since));
      chk(pending == m_pend, $sformatf("rand %0d pending", i));
      chk(irq == (m_pend & ie), $sformatf("rand %0d irq", i));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    reload = 32'd10; en = 1; ie = 0;
    repeat (30) @(negedge clk);
    chk(pending && !irq, "pending without interrupt enable");
    ie = 1; #1;
    chk(irq, "irq when enabled");
    // measure the period between two expiries
    for (int k = 0; k < 3; k++) begin
      ack = 1; @(negedge clk); ack = 0;
      chk(!pending || count == 0, "ack clears");
      last = $time;
      while (!pending) @(negedge clk);
      period = ($time - last) / 10;
      chk(period <= 10 && period >= 1, "period within reload");
    end
    // exact period from a restart
    en = 0; @(negedge clk); ack = 1; @(negedge clk); ack = 0;
    chk(count == 0 && !pending, "disabled timer cleared");
    en = 1; last = $time;
    while (!pending) @(negedge clk);
    period = ($time - last) / 10;
    chk(period == 10, $sformatf("period %0d == reload 10", period));
    reload = 0; en = 1; ack = 1; @(negedge clk); ack = 0;
    repeat (50) @(negedge clk);
    chk(!pending, "reload 0 never fires");
    random_part(20000);
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
