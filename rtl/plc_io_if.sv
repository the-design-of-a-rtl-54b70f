// plc_io_if: I/O chip selects.
//
// Decodes host accesses to the I/O region into the four chip-select outputs
// for the input and output cards: IO1_CS-, IO2_CS-, EXT1_CS-, EXT2_CS-,
// chosen by region address bits [17:16] (0, 1, 2, 3). A select is asserted
// only while the host read or write strobe is active, so a card sees a clean
// strobe. Combinational. The four output names follow the block diagram;
// the decode and the active-low polarity are this design's own.
module plc_io_if (
  input  logic        sel_io,
  input  logic        rd,
  input  logic        wr,
  input  logic [1:0]  addr_hi,   // region address [17:16]
  output logic        IO1_CS_n,
  output logic        IO2_CS_n,
  output logic        EXT1_CS_n,
  output logic        EXT2_CS_n
);

  logic act;

  always_comb begin
    act       = sel_io & (rd | wr);
    IO1_CS_n  = ~(act && addr_hi == 2'd0);
    IO2_CS_n  = ~(act && addr_hi == 2'd1);
    EXT1_CS_n = ~(act && addr_hi == 2'd2);
    EXT2_CS_n = ~(act && addr_hi == 2'd3);
  end

endmodule
