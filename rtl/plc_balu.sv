// plc_balu: bit ALU of the sequence processor.
//
// Holds the one-bit logic accumulator (ACC) and the three bit stacks a ladder
// program needs:
//   * block stack: every LD-type instruction pushes the old ACC, ANB/ORB pop
//     it and combine it with the current ACC (series / parallel blocks);
//   * MPS stack: MPS pushes ACC, MRD reads the top, MPP reads and pops;
//   * MCS (master control) stack: MC pushes ACC AND the current master-control
//     enable, MCR pops. Outputs are gated by the top of this stack.
// A step-controller enable (STL loads it from the step relay, RETS sets it)
// gates outputs the same way. Pulse contacts (LDP/LDF/ANDP/ANDF/ORP/ORF) see
// the operand bit together with its value from the previous scan (hist_in);
// PLS/PLF compare ACC with its previous-scan value kept at the target bit's
// history location.
//
// Interface: the sequencer presents bop, bit_in and hist_in and pulses `exec`
// for one clock in the execute cycle; state updates on that edge. wr_bit and
// hist_wr are combinational results for the read-modify-write cycles that come
// before exec. scan_init clears the stacks and enables at the start of a scan.
// Instruction names follow the published instruction list; the stack depths,
// circular overflow and gating rules are this design's own choice.
module plc_balu
  import plc_pkg::*;
#(
  parameter int unsigned BSTK_DEPTH = 8,   // block stack (ANB/ORB)
  parameter int unsigned MSTK_DEPTH = 16,  // MPS/MRD/MPP stack
  parameter int unsigned MCS_DEPTH  = 8    // master-control nesting
) (
  input  logic clk,
  input  logic rst_n,
  input  logic scan_init,
  input  logic exec,
  input  bop_e bop,
  input  logic bit_in,     // operand bit (or old value of the target bit)
  input  logic hist_in,    // previous-scan value for pulse instructions
  output logic acc,
  output logic gate,       // master-control AND step enable
  output logic wr_bit,     // new value of the target bit (OUT/SET/RST/PLS/PLF)
  output logic hist_wr,    // new history bit for pulse instructions
  output logic pulse_seen  // a pulse instruction detected an edge this cycle
);

  localparam int unsigned BW = $clog2(BSTK_DEPTH);
  localparam int unsigned MW = $clog2(MSTK_DEPTH);
  localparam int unsigned CW = $clog2(MCS_DEPTH) + 1;

  logic [BSTK_DEPTH-1:0] bstk;
  logic [BW-1:0]         bsp;     // next free slot (circular)
  logic [MSTK_DEPTH-1:0] mstk;
  logic [MW-1:0]         msp;
  logic [MCS_DEPTH-1:0]  mcs;
  logic [CW-1:0]         mlev;    // number of open MC levels
  logic                  step_en;
  logic                  mc_en;

  logic rise, fall, edge_b;
  logic btop, mtop;

  assign mc_en  = (mlev == '0) ? 1'b1 : mcs[(CW-1)'(mlev - 1'b1)];
  assign gate   = mc_en & step_en;
  assign rise   = bit_in & ~hist_in;
  assign fall   = ~bit_in & hist_in;
  assign btop   = bstk[bsp - 1'b1];
  assign mtop   = mstk[msp - 1'b1];
  assign edge_b = (bop == B_LDF || bop == B_ANDF || bop == B_ORF) ? fall : rise;

  always_comb begin
    wr_bit  = bit_in;
    hist_wr = bit_in;
    unique case (bop)
      B_OUT:   wr_bit = acc & gate;
      B_SET:   wr_bit = (acc & gate) ? 1'b1 : bit_in;
      B_RST:   wr_bit = (acc & gate) ? 1'b0 : bit_in;
      B_PLS: begin wr_bit = acc & ~hist_in & gate; hist_wr = acc; end
      B_PLF: begin wr_bit = ~acc & hist_in & gate; hist_wr = acc; end
      default: ;
    endcase
  end

  always_comb begin
    pulse_seen = 1'b0;
    if (exec) begin
      unique case (bop)
        B_LDP, B_LDF, B_ANDP, B_ANDF, B_ORP, B_ORF: pulse_seen = edge_b;
        B_PLS, B_PLF:                                pulse_seen = wr_bit;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= 1'b0; bstk <= '0; bsp <= '0; mstk <= '0; msp <= '0;
      mcs <= '0; mlev <= '0; step_en <= 1'b1;
    end else if (scan_init) begin
      acc <= 1'b0; bsp <= '0; msp <= '0; mlev <= '0; step_en <= 1'b1;
    end else if (exec) begin
      unique case (bop)
        B_LD, B_LDI, B_LDP, B_LDF: begin
          bstk[bsp] <= acc;
          bsp       <= bsp + 1'b1;
          unique case (bop)
            B_LD:    acc <= bit_in;
            B_LDI:   acc <= ~bit_in;
            default: acc <= edge_b;
          endcase
        end
        B_AND:          acc <= acc & bit_in;
        B_ANI:          acc <= acc & ~bit_in;
        B_OR:           acc <= acc | bit_in;
        B_ORI:          acc <= acc | ~bit_in;
        B_XOR:          acc <= acc ^ bit_in;
        B_ANDP, B_ANDF: acc <= acc & edge_b;
        B_ORP, B_ORF:   acc <= acc | edge_b;
        B_ANB: begin acc <= btop & acc; bsp <= bsp - 1'b1; end
        B_ORB: begin acc <= btop | acc; bsp <= bsp - 1'b1; end
        B_MPS: begin mstk[msp] <= acc; msp <= msp + 1'b1; end
        B_MRD:          acc <= mtop;
        B_MPP: begin acc <= mtop; msp <= msp - 1'b1; end
        B_INV:          acc <= ~acc;
        B_MC: begin
          if (mlev < CW'(MCS_DEPTH)) begin
            mcs[(CW-1)'(mlev)] <= acc & mc_en;
            mlev      <= mlev + 1'b1;
          end
        end
        B_MCR:   if (mlev != '0) mlev <= mlev - 1'b1;
        B_STL: begin step_en <= bit_in; acc <= bit_in; end
        B_RETS:         step_en <= 1'b1;
        default: ;
      endcase
    end
  end

endmodule
