// plc_debug: real-time debugger.
//
// Three ways to stop a running program without disturbing how it runs:
//   * 1-step run: stop after every instruction;
//   * PC break: stop before the instruction at address pc_brk is executed;
//   * DM break: stop after an instruction that read or wrote data-memory word
//     dm_brk.
// A data-memory hit is remembered until the end of the instruction. At each
// instruction boundary the sequencer presents the address of the next
// instruction; `halt` then says whether to stop, and the cause is latched in
// the hit flags until the host clears them (clear).
//
// Interface: boundary is a one-clock pulse in the last cycle of an
// instruction; halt is combinational in that cycle. The three modes follow the
// published debugger list; the exact stop points are this design's choice.
module plc_debug
  import plc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            step_en,
  input  logic            pcb_en,
  input  logic            dmb_en,
  input  logic [PC_W-1:0] pc_brk,
  input  logic [DA_W-1:0] dm_brk,
  input  logic            dm_access,
  input  logic [DA_W-1:0] dm_addr,
  input  logic            boundary,
  input  logic [PC_W-1:0] next_pc,
  input  logic            clear,
  output logic            halt,
  output logic            step_hit,
  output logic            pc_hit,
  output logic            dm_hit
);

  logic dm_seen;    // DM break matched during the current instruction
  logic dm_now, pc_now;

  assign dm_now = dmb_en && dm_access && (dm_addr == dm_brk);
  assign pc_now = pcb_en && (next_pc == pc_brk);
  assign halt   = boundary && (step_en || pc_now || dm_seen || dm_now);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dm_seen <= 1'b0;
      step_hit <= 1'b0; pc_hit <= 1'b0; dm_hit <= 1'b0;
    end else begin
      if (boundary)    dm_seen <= 1'b0;
      else if (dm_now) dm_seen <= 1'b1;
      if (clear) begin
        step_hit <= 1'b0; pc_hit <= 1'b0; dm_hit <= 1'b0;
      end else if (boundary) begin
        if (step_en)           step_hit <= 1'b1;
        if (pc_now)            pc_hit   <= 1'b1;
        if (dm_seen || dm_now) dm_hit   <= 1'b1;
      end
    end
  end

endmodule
