// plc_clk_ctrl: run control between the sequence processor and the host MPU.
//
// The host owns the program and data memories while the processor is
// stopped. Driving HOLD low hands control to the processor: on the falling
// edge of HOLD the processor starts and drives GA_RUN high. It runs until an
// instruction boundary at which the scan has ended (END instruction), the
// debugger asks for a stop, or HOLD has gone high again; it then drives GA_RUN
// low and control returns to the host. To start again the host raises HOLD
// and lowers it.
//
// HOLD is taken through two flip-flops (the host may run from another clock).
// start is a one-clock pulse; running (= GA_RUN) changes on the rising edge
// after the boundary clock in which stop_req is seen. The HOLD/GA_RUN
// handshake follows the published text; the edge-triggered start and the
// boundary-only stop are this design's choices.
module plc_clk_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic HOLD,
  input  logic boundary,     // last clock of an instruction
  input  logic stop_req,     // END or debugger halt, valid with boundary
  output logic start,
  output logic stop,         // the processor stops at this boundary
  output logic running,
  output logic hold_s
);

  logic hold_m, hold_q;

  assign start = ~running & hold_q & ~hold_s;
  assign stop  = running & boundary & (stop_req | hold_s);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_m  <= 1'b1;
      hold_s  <= 1'b1;
      hold_q  <= 1'b1;
      running <= 1'b0;
    end else begin
      hold_m <= HOLD;
      hold_s <= hold_m;
      hold_q <= hold_s;
      if (start)     running <= 1'b1;
      else if (stop) running <= 1'b0;
    end
  end

endmodule
