// tb_pm_sram: behavioural model of the program memory, two 16-bit SRAMs of
// 1M words (low half: PM_CSL-/PM_WRL-, high half: PM_CSH-/PM_WRH-, shared
// PA and PM_RD-). Reads are asynchronous; a write takes effect at the rising
// clock edge that ends a cycle with the write strobe low. Contents start at 0.
module tb_pm_sram #(parameter int unsigned AW = 20) (
  input  logic          clk,
  input  logic [AW-1:0] PA,
  input  logic [31:0]   PI_o,
  output logic [31:0]   PI_i,
  input  logic          PM_CSL_n,
  input  logic          PM_CSH_n,
  input  logic          PM_RD_n,
  input  logic          PM_WRL_n,
  input  logic          PM_WRH_n
);
  logic [15:0] lo [2**AW];
  logic [15:0] hi [2**AW];

  initial for (int i = 0; i < 2**AW; i++) begin lo[i] = 0; hi[i] = 0; end

  assign PI_i[15:0]  = (!PM_CSL_n && !PM_RD_n) ? lo[PA] : 16'h0;
  assign PI_i[31:16] = (!PM_CSH_n && !PM_RD_n) ? hi[PA] : 16'h0;

  always @(posedge clk) begin
    if (!PM_CSL_n && !PM_WRL_n) lo[PA] <= PI_o[15:0];
    if (!PM_CSH_n && !PM_WRH_n) hi[PA] <= PI_o[31:16];
  end
endmodule
