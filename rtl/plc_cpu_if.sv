// plc_cpu_if: interface to the host MPU.
//
// The host (a general-purpose 32-bit MPU with a 16-bit data bus CD and a
// 21-bit half-word address CA) loads the program, reads and writes data
// memory, starts the processor through HOLD and debugs it through a small
// register file. The region of an access comes from plc_cs_block. Host
// strobes C_RD- and C_WR- are taken as synchronous to the processor clock;
// a register write happens on every clock edge while C_WR- is low (repeated
// writes of the same value are harmless). Program and data memory can only be
// reached while the processor is stopped (the memory interfaces enforce it).
// C_RD_INV is high while the host reads from this chip and sets the
// direction of the external bus buffer.
//
// Internal register map (word offsets in the register region):
//   0  CTRL    [0] 1-step run, [1] PC break, [2] DM break,
//              [3] timer enable, [4] timer interrupt enable
//   1  STATUS  read: [0] running, [1] scan ended, [2] step stop, [3] PC break
//              hit, [4] DM break hit, [5] timer pending, [6] bit accumulator,
//              [7] illegal instruction; write: clear [1]..[4] and [7]
//   2,3  PC break address (low 16, high 4)   4,5  DM break word address
//   6,7  timer reload (low, high)            8,9  PC (write only when stopped)
//   10 word flags {sign, zero, carry}        11,12 timer count
//   16..31 general registers R0..R15
// The pin set follows the block diagram; the register map is this design's.
module plc_cpu_if
  import plc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // host bus
  input  logic            C_RD_n,
  input  logic            C_WR_n,
  input  logic [15:0]     CD_i,
  output logic [15:0]     CD_o,
  output logic            CD_oe,
  output logic            C_RD_INV,
  // decoded region
  input  logic            sel_pm,
  input  logic            sel_dm,
  input  logic            sel_reg,
  input  logic            sel_io,
  input  logic [20:0]     addr,
  // program / data memory host ports
  output logic            pm_rd,
  output logic            pm_wr,
  input  logic [15:0]     pm_rdata,
  output logic            dm_rd,
  output logic            dm_wr,
  input  logic [15:0]     dm_rdata,
  output logic            io_rd,
  output logic            io_wr,
  // register block host port
  output logic [3:0]      rg_addr,
  output logic            rg_we,
  input  logic [15:0]     rg_rdata,
  // PC write
  output logic            pc_we_lo,
  output logic            pc_we_hi,
  // control and status
  output logic            step_en,
  output logic            pcb_en,
  output logic            dmb_en,
  output logic            tmr_en,
  output logic            tmr_ie,
  output logic [PC_W-1:0] pc_brk,
  output logic [DA_W-1:0] dm_brk,
  output logic [31:0]     tmr_reload,
  output logic            status_clr,
  input  logic [7:0]      status,
  input  logic [PC_W-1:0] pc,
  input  logic [2:0]      flags,
  input  logic [31:0]     tmr_count
);

  logic       rd, wr, rwr;
  logic [4:0] ra;

  assign rd  = ~C_RD_n;
  assign wr  = ~C_WR_n;
  assign ra  = addr[4:0];
  assign rwr = sel_reg & wr;

  assign pm_rd = sel_pm & rd;
  assign pm_wr = sel_pm & wr;
  assign dm_rd = sel_dm & rd;
  assign dm_wr = sel_dm & wr;
  assign io_rd = sel_io & rd;
  assign io_wr = sel_io & wr;

  assign rg_addr    = ra[3:0];
  assign rg_we      = rwr & ra[4] & ~status[0];
  assign pc_we_lo   = rwr & (ra == 5'd8) & ~status[0];
  assign pc_we_hi   = rwr & (ra == 5'd9) & ~status[0];
  assign status_clr = rwr & (ra == 5'd1);

  assign C_RD_INV = rd & (sel_pm | sel_dm | sel_reg);
  assign CD_oe    = C_RD_INV;

  always_comb begin
    CD_o = '0;
    if (sel_pm)      CD_o = pm_rdata;
    else if (sel_dm) CD_o = dm_rdata;
    else if (sel_reg) begin
      if (ra[4]) CD_o = rg_rdata;
      else begin
        unique case (ra[3:0])
          4'd0:  CD_o = {11'h0, tmr_ie, tmr_en, dmb_en, pcb_en, step_en};
          4'd1:  CD_o = {8'h0, status};
          4'd2:  CD_o = pc_brk[15:0];
          4'd3:  CD_o = 16'(pc_brk[PC_W-1:16]);
          4'd4:  CD_o = dm_brk[15:0];
          4'd5:  CD_o = 16'(dm_brk[DA_W-1:16]);
          4'd6:  CD_o = tmr_reload[15:0];
          4'd7:  CD_o = tmr_reload[31:16];
          4'd8:  CD_o = pc[15:0];
          4'd9:  CD_o = 16'(pc[PC_W-1:16]);
          4'd10: CD_o = {13'h0, flags};
          4'd11: CD_o = tmr_count[15:0];
          4'd12: CD_o = tmr_count[31:16];
          default: CD_o = '0;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {tmr_ie, tmr_en, dmb_en, pcb_en, step_en} <= '0;
      pc_brk     <= '0;
      dm_brk     <= '0;
      tmr_reload <= '0;
    end else if (rwr && !ra[4]) begin
      unique case (ra[3:0])
        4'd0: {tmr_ie, tmr_en, dmb_en, pcb_en, step_en} <= CD_i[4:0];
        4'd2: pc_brk[15:0]        <= CD_i;
        4'd3: pc_brk[PC_W-1:16]   <= CD_i[PC_W-17:0];
        4'd4: dm_brk[15:0]        <= CD_i;
        4'd5: dm_brk[DA_W-1:16]   <= CD_i[DA_W-17:0];
        4'd6: tmr_reload[15:0]    <= CD_i;
        4'd7: tmr_reload[31:16]   <= CD_i;
        default: ;
      endcase
    end
  end

endmodule
