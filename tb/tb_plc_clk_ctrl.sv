// tb_plc_clk_ctrl: HOLD/GA_RUN handshake. A falling HOLD starts the
// processor after the two-flop synchroniser; a stop request or a high HOLD
// at an instruction boundary ends the run; a new run needs HOLD to fall again.
// A random part toggles HOLD, boundary and stop requests and checks start,
// stop and GA_RUN every clock against a model: HOLD is seen two clocks late,
// a run starts on a seen falling edge while stopped, and ends at a boundary
// with a stop request or with HOLD seen high.
module tb_plc_clk_ctrl;
  logic clk = 0, rst_n = 0, HOLD = 1, boundary = 0, stop_req = 0;
  logic start, stop, running, hold_s;
  int checks = 0, failures = 0, n;

  plc_clk_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic random_part(input int n);
    logic h1, h2, h3, run, e_start, e_stop;
    h1 = HOLD; h2 = HOLD; h3 = HOLD; run = running;
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(15) == 0) HOLD = ~HOLD;
      boundary = ($urandom_range(2) == 0);
      stop_req = ($urandom_range(7) == 0);
      #1;
      e_start = !run && h3 && !h2;
      e_stop  = run && boundary && (stop_req || h2);
      chk(start == e_start && stop == e_stop && hold_s == h2,
          $sformatf("rand %0d start %b/%b stop %b/%b", i, start, e_start, stop, e_stop));
      @(posedge clk);
      if (e_start) run = 1; else if (e_stop) run = 0;
      h3 = h2; h2 = h1; h1 = HOLD;
      @(negedge clk);
      chk(running == run, $sformatf("rand %0d GA_RUN %b exp %b", i, running, run));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    chk(!running, "idle while HOLD high");
    HOLD = 0; n = 0;
    while (!running && n < 10) begin @(negedge clk); n++; end
    chk(running && n == 3, $sformatf("GA_RUN rises 3 clocks after HOLD falls (%0d)", n));
    repeat (5) @(negedge clk);
    chk(running, "keeps running");
    boundary = 1; stop_req = 1; #1;
    chk(stop, "stop at boundary with request");
    @(negedge clk); boundary = 0; stop_req = 0;
    chk(!running, "GA_RUN low after stop");
    repeat (5) @(negedge clk);
    chk(!running, "no restart while HOLD stays low");
    HOLD = 1; repeat (4) @(negedge clk); HOLD = 0; repeat (4) @(negedge clk);
    chk(running, "restart on new HOLD falling edge");
    HOLD = 1; repeat (3) @(negedge clk);
    chk(running, "HOLD high waits for boundary");
    boundary = 1; @(negedge clk); boundary = 0;
    chk(!running, "HOLD high stops at boundary");
    random_part(20000);
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
