// plc_dm_if: data-memory interface.
//
// Connects the processor and the host to the external 16-bit data memory
// (512K words, 19-bit word address DA). The pin DM_16BIT chooses how the
// memory is built:
//   DM_16BIT = 0  two 8-bit memories; DD[15:8] and DD[7:0] go to separate
//                 chips, written by their own strobes DM_WRH- and DM_WRL-;
//                 LB- and UB- stay inactive.
//   DM_16BIT = 1  one 16-bit memory; both write strobes pulse together and
//                 LB- / UB- select the low and high byte.
// Either way one access moves 16 bits in one clock. While the processor runs
// it owns the bus; otherwise the host does. Byte enables (be) let a 16-bit
// memory be written one byte at a time.
//
// All outputs are combinational from the request; data read is sampled by the
// requester at the end of the same clock. DD is split into DD_i/DD_o/DD_oe.
// Pin names and the meaning of DM_16BIT, DM_WRH/DM_WRL and LB/UB follow the
// published text; the single-clock access and the ownership rule are this
// design's own.
module plc_dm_if
  import plc_pkg::*;
(
  input  logic            p_own,
  input  logic            p_rd,
  input  logic            p_wr,
  input  logic [DA_W-1:0] p_addr,
  input  logic [15:0]     p_wdata,
  output logic [15:0]     rdata,      // shared read data (DD_i)
  input  logic            h_rd,
  input  logic            h_wr,
  input  logic [1:0]      h_be,
  input  logic [DA_W-1:0] h_addr,
  input  logic [15:0]     h_wdata,
  // pins
  input  logic            DM_16BIT,
  output logic [DA_W-1:0] DA,
  input  logic [15:0]     DD_i,
  output logic [15:0]     DD_o,
  output logic            DD_oe,
  output logic            DM_CS_n,
  output logic            DM_RD_n,
  output logic            DM_WRL_n,
  output logic            DM_WRH_n,
  output logic            LB_n,
  output logic            UB_n
);

  logic       rd, wr, act;
  logic [1:0] be;

  always_comb begin
    rd    = p_own ? p_rd : h_rd;
    wr    = p_own ? p_wr : h_wr;
    be    = p_own ? 2'b11 : h_be;
    act   = rd | wr;
    DA    = p_own ? p_addr : h_addr;
    DD_o  = p_own ? p_wdata : h_wdata;
    DD_oe = wr;
    rdata = DD_i;
    DM_CS_n = ~act;
    DM_RD_n = ~rd;
    if (DM_16BIT) begin
      DM_WRL_n = ~wr;
      DM_WRH_n = ~wr;
      LB_n     = ~(act & be[0]);
      UB_n     = ~(act & be[1]);
    end else begin
      DM_WRL_n = ~(wr & be[0]);
      DM_WRH_n = ~(wr & be[1]);
      LB_n     = 1'b1;
      UB_n     = 1'b1;
    end
  end

endmodule
