// tb_plc_dm_if: data-memory pins in both interface modes. In 8-bit mode two
// byte-wide chips are written by DM_WRH-/DM_WRL-; in 16-bit mode one chip is
// written with LB-/UB- byte selects. Data written by the processor and the
// host is read back through the model.
module tb_plc_dm_if;
  logic p_own = 0, p_rd = 0, p_wr = 0, h_rd = 0, h_wr = 0, DM_16BIT = 0;
  logic [1:0] h_be = 2'b11;
  logic [18:0] p_addr = 0, h_addr = 0, DA;
  logic [15:0] p_wdata = 0, h_wdata = 0, rdata, DD_i, DD_o;
  logic DD_oe, DM_CS_n, DM_RD_n, DM_WRL_n, DM_WRH_n, LB_n, UB_n;
  logic [7:0] mh [256], ml [256];
  int checks = 0, failures = 0;

  plc_dm_if dut (.*);

  // memory model: high/low byte lanes; a lane is written when its strobe
  // (8-bit mode) or the common strobe plus its byte select (16-bit mode) is low
  logic wr_l, wr_h;
  always_comb begin
    wr_l = !DM_CS_n && (DM_16BIT ? (!DM_WRL_n && !LB_n) : !DM_WRL_n);
    wr_h = !DM_CS_n && (DM_16BIT ? (!DM_WRL_n && !UB_n) : !DM_WRH_n);
    DD_i = (!DM_CS_n && !DM_RD_n) ? {mh[DA[7:0]], ml[DA[7:0]]} : 16'h0;
  end
  always @(wr_l or wr_h or DA or DD_o) begin
    if (wr_l && DD_oe) ml[DA[7:0]] = DD_o[7:0];
    if (wr_h && DD_oe) mh[DA[7:0]] = DD_o[15:8];
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [15:0] ref_mem [256];

  initial begin
    for (int i = 0; i < 256; i++) begin mh[i] = 0; ml[i] = 0; ref_mem[i] = 0; end
    for (int mode = 0; mode < 2; mode++) begin
      DM_16BIT = mode[0];
      // processor writes
      p_own = 1;
      for (int i = 0; i < 32; i++) begin
        p_addr = 19'(i + mode * 64); p_wdata = 16'($urandom); p_wr = 1; #1;
        ref_mem[p_addr[7:0]] = p_wdata;
        if (mode == 0) chk(!DM_WRL_n && !DM_WRH_n && LB_n && UB_n, "8-bit mode strobes");
        else           chk(!DM_WRL_n && !LB_n && !UB_n, "16-bit mode strobes");
        chk(DD_oe && !DM_CS_n && DM_RD_n, "write cycle");
        p_wr = 0; #1;
      end
      // host byte write in this mode (processor stopped)
      p_own = 0;
      h_addr = 19'(mode * 64); h_be = 2'b10; h_wdata = 16'hA55A; h_wr = 1; #1;
      if (mode == 0) chk(DM_WRL_n && !DM_WRH_n, "8-bit high byte strobe only");
      else           chk(LB_n && !UB_n, "16-bit UB only");
      h_wr = 0; h_be = 2'b11; #1;
      ref_mem[mode * 64][15:8] = 8'hA5;
      // host reads back, processor request ignored
      for (int i = 0; i < 32; i++) begin
        h_addr = 19'(i + mode * 64); h_rd = 1; p_wr = 1; #1;
        chk(rdata == ref_mem[h_addr[7:0]], "host read back");
        chk(!DD_oe, "no drive while host reads");
        h_rd = 0; p_wr = 0; #1;
      end
      // processor reads
      p_own = 1;
      p_addr = 19'(5 + mode * 64); p_rd = 1; #1;
      chk(rdata == ref_mem[p_addr[7:0]] && !DM_RD_n, "processor read");
      p_rd = 0; #1;
      chk(DM_CS_n && DM_RD_n && DM_WRL_n && DM_WRH_n, "idle");
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
