// plc_cs_block: chip-select decoding for host accesses.
//
// The host reaches four regions of the chip: program memory, data memory,
// the internal registers (control, status, general registers) and the I/O
// chip selects. Pin CS_SEL picks how a region is chosen:
//   CS_SEL = 0  the host's own decoded selects: CS0- program memory,
//               CS1- data memory, CS2- internal registers, CS3- I/O;
//               the region address is CA as it is.
//   CS_SEL = 1  only CS0- selects the chip and CA is decoded here:
//               CA[20:19] = 0x program memory (CA[19:0], the lower half of
//               program memory only), 10 data memory (CA[18:0]),
//               11 internal registers (CA[18] = 0) or I/O (CA[18] = 1).
// Purely combinational. The two modes follow the published description of
// CS_SEL; the region order and the address split are this design's own.
module plc_cs_block (
  input  logic [3:0]  cs_n,    // CS0-..CS3-
  input  logic        cs_sel,
  input  logic [20:0] ca,
  output logic        sel_pm,
  output logic        sel_dm,
  output logic        sel_reg,
  output logic        sel_io,
  output logic [20:0] addr     // address inside the region
);

  always_comb begin
    sel_pm = 1'b0; sel_dm = 1'b0; sel_reg = 1'b0; sel_io = 1'b0;
    addr   = ca;
    if (!cs_sel) begin
      sel_pm  = ~cs_n[0];
      sel_dm  = ~cs_n[1];
      sel_reg = ~cs_n[2];
      sel_io  = ~cs_n[3];
    end else if (!cs_n[0]) begin
      unique casez (ca[20:18])
        3'b0??: begin sel_pm  = 1'b1; addr = {1'b0, ca[19:0]}; end
        3'b10?: begin sel_dm  = 1'b1; addr = {2'b0, ca[18:0]}; end
        3'b110: begin sel_reg = 1'b1; addr = {3'b0, ca[17:0]}; end
        default: begin sel_io = 1'b1; addr = {3'b0, ca[17:0]}; end
      endcase
    end
  end

endmodule
