// tb_dm_sram: behavioural model of the data memory, 512K x 16, built either
// from two byte-wide chips (DM_16BIT = 0: DM_WRH- writes DD[15:8], DM_WRL-
// writes DD[7:0]) or one 16-bit chip (DM_16BIT = 1: DM_WRL- is the write
// strobe, LB-/UB- select the bytes). Reads are asynchronous; writes take
// effect at the rising clock edge ending the strobe cycle. Contents start at 0.
module tb_dm_sram #(parameter int unsigned AW = 19) (
  input  logic          clk,
  input  logic          DM_16BIT,
  input  logic [AW-1:0] DA,
  input  logic [15:0]   DD_o,
  output logic [15:0]   DD_i,
  input  logic          DM_CS_n,
  input  logic          DM_RD_n,
  input  logic          DM_WRL_n,
  input  logic          DM_WRH_n,
  input  logic          LB_n,
  input  logic          UB_n
);
  logic [7:0] mh [2**AW];
  logic [7:0] ml [2**AW];
  logic wl, wh;

  initial for (int i = 0; i < 2**AW; i++) begin mh[i] = 0; ml[i] = 0; end

  assign wl   = !DM_CS_n && (DM_16BIT ? (!DM_WRL_n && !LB_n) : !DM_WRL_n);
  assign wh   = !DM_CS_n && (DM_16BIT ? (!DM_WRL_n && !UB_n) : !DM_WRH_n);
  assign DD_i = (!DM_CS_n && !DM_RD_n) ? {mh[DA], ml[DA]} : 16'h0;

  always @(posedge clk) begin
    if (wl) ml[DA] <= DD_o[7:0];
    if (wh) mh[DA] <= DD_o[15:8];
  end
endmodule
