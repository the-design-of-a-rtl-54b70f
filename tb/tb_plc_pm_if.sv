// tb_plc_pm_if: program-memory pins. A two-chip SRAM model (low and high
// 16-bit halves with their own selects and write strobes) is loaded by host
// half-word writes and read back by processor fetches and host reads.
module tb_plc_pm_if;
  logic p_own = 0, p_rd = 0, h_rd = 0, h_wr = 0;
  logic [19:0] p_addr = 0, PA;
  logic [20:0] h_addr = 0;
  logic [15:0] h_wdata = 0, h_rdata;
  logic [31:0] p_rdata, PI_i, PI_o;
  logic PI_oe, PM_CSL_n, PM_CSH_n, PM_RD_n, PM_WRL_n, PM_WRH_n;
  logic [15:0] lo [256], hi [256];
  int checks = 0, failures = 0;

  plc_pm_if dut (.*);

  // asynchronous SRAM pair, 256 words each
  always_comb begin
    PI_i[15:0]  = (!PM_CSL_n && !PM_RD_n) ? lo[PA[7:0]] : 16'h0;
    PI_i[31:16] = (!PM_CSH_n && !PM_RD_n) ? hi[PA[7:0]] : 16'h0;
  end
  always @(PM_WRL_n or PM_WRH_n or PA or PI_o) begin
    if (!PM_CSL_n && !PM_WRL_n && PI_oe) lo[PA[7:0]] = PI_o[15:0];
    if (!PM_CSH_n && !PM_WRH_n && PI_oe) hi[PA[7:0]] = PI_o[31:16];
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] img [64];

  initial begin
    for (int i = 0; i < 256; i++) begin lo[i] = 0; hi[i] = 0; end
    for (int i = 0; i < 64; i++) img[i] = $urandom;
    // host loads 64 instructions, low half then high half
    for (int i = 0; i < 64; i++) begin
      for (int h = 0; h < 2; h++) begin
        h_addr = 21'(i * 2 + h); h_wdata = h ? img[i][31:16] : img[i][15:0]; h_wr = 1; #1;
        chk(PI_oe && (h ? (!PM_WRH_n && PM_WRL_n && !PM_CSH_n && PM_CSL_n)
                        : (!PM_WRL_n && PM_WRH_n && !PM_CSL_n && PM_CSH_n)), "host write strobes");
        h_wr = 0; #1;
      end
    end
    // host reads back the high half of a few
    for (int i = 0; i < 8; i++) begin
      h_addr = 21'(i * 2 + 1); h_rd = 1; #1;
      chk(h_rdata == img[i][31:16], "host read high half");
      chk(PM_WRL_n && PM_WRH_n && !PI_oe, "no write during read");
      h_rd = 0; #1;
    end
    // processor owns the bus: host requests ignored, 32-bit fetch
    p_own = 1;
    for (int i = 0; i < 64; i++) begin
      p_addr = 20'(i); p_rd = 1; h_wr = 1; h_addr = 21'h3; #1;
      chk(p_rdata == img[i], "processor fetch 32 bits");
      chk(!PM_CSL_n && !PM_CSH_n && !PM_RD_n && PM_WRL_n && PM_WRH_n && !PI_oe, "fetch strobes");
      p_rd = 0; h_wr = 0; #1;
      chk(PM_CSL_n && PM_CSH_n && PM_RD_n, "idle strobes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
