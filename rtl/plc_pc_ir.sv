// plc_pc_ir: program counter and instruction register.
//
// PC is 20 bits wide (1M instruction words of 32 bits) and always holds the
// address of the instruction that sits in IR. A fetch loads IR from the
// program-memory data bus and PC with the address that was fetched, in the
// same clock; the sequencer fetches the next instruction during the execute
// cycle of the current one, so fetch and execution overlap. The host debugger
// may overwrite either half of PC while the processor is stopped.
//
// Interface: fetch + fetch_addr + pm_data load IR/PC on the rising edge;
// host_we_lo/host_we_hi write PC[15:0]/PC[19:16]; pc_plus1 is PC+1 for
// sequential flow. Width of PC and IR follow the published description; the
// host write port is this design's addition for the debugger.
module plc_pc_ir
  import plc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            fetch,
  input  logic [PC_W-1:0] fetch_addr,
  input  logic [31:0]     pm_data,
  input  logic            host_we_lo,
  input  logic            host_we_hi,
  input  logic [15:0]     host_wdata,
  output logic [PC_W-1:0] pc,
  output logic [PC_W-1:0] pc_plus1,
  output logic [31:0]     ir
);

  assign pc_plus1 = pc + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0;
      ir <= '0;
    end else if (fetch) begin
      pc <= fetch_addr;
      ir <= pm_data;
    end else begin
      if (host_we_lo) pc[15:0]      <= host_wdata;
      if (host_we_hi) pc[PC_W-1:16] <= host_wdata[PC_W-17:0];
    end
  end

endmodule
