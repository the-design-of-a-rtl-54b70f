// plc_pm_if: program-memory interface.
//
// The 32-bit program memory is built from two 16-bit memories: the low one
// holds instruction bits 15:0 (select PM_CSL-), the high one bits 31:16
// (select PM_CSH-). They share the 20-bit address PA and the read strobe
// PM_RD-; each has its own write strobe (PM_WRL-, PM_WRH-), so that the host,
// whose data bus is 16 bits wide, can load a program one half-word at a time.
// While the processor runs it owns the bus and reads both halves at once;
// while it is stopped the host owns it. Host half-word address bit 0 selects
// the half (0 = low, 1 = high), bits 20:1 the instruction address.
//
// All outputs are combinational; the memory is expected to be an asynchronous
// SRAM whose read data is sampled at the end of the fetch cycle. The PI bus is
// split into PI_i / PI_o / PI_oe; PI_oe is high only during host writes.
// Pin names and the two-memory split follow the published block diagram;
// the strobe timing (one clock) and host address layout are this design's own.
module plc_pm_if
  import plc_pkg::*;
(
  // processor side
  input  logic            p_own,     // processor owns the bus (running)
  input  logic            p_rd,      // instruction fetch
  input  logic [PC_W-1:0] p_addr,
  output logic [31:0]     p_rdata,
  // host side
  input  logic            h_rd,
  input  logic            h_wr,
  input  logic [PC_W:0]   h_addr,    // half-word address
  input  logic [15:0]     h_wdata,
  output logic [15:0]     h_rdata,
  // pins
  output logic [PC_W-1:0] PA,
  input  logic [31:0]     PI_i,
  output logic [31:0]     PI_o,
  output logic            PI_oe,
  output logic            PM_CSL_n,
  output logic            PM_CSH_n,
  output logic            PM_RD_n,
  output logic            PM_WRL_n,
  output logic            PM_WRH_n
);

  logic hi, h_act;

  assign hi      = h_addr[0];
  assign h_act   = ~p_own & (h_rd | h_wr);
  assign p_rdata = PI_i;
  assign h_rdata = hi ? PI_i[31:16] : PI_i[15:0];

  always_comb begin
    PA       = p_own ? p_addr : h_addr[PC_W:1];
    PI_o     = {h_wdata, h_wdata};
    PI_oe    = ~p_own & h_wr;
    PM_CSL_n = ~(p_own ? p_rd : (h_act & ~hi));
    PM_CSH_n = ~(p_own ? p_rd : (h_act &  hi));
    PM_RD_n  = ~(p_own ? p_rd : (~p_own & h_rd));
    PM_WRL_n = ~(~p_own & h_wr & ~hi);
    PM_WRH_n = ~(~p_own & h_wr &  hi);
  end

endmodule
