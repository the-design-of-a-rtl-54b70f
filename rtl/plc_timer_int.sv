// plc_timer_int: 32-bit timer for the time-driven interrupt.
//
// While enabled, a 32-bit counter advances once per clock. When it reaches
// the reload value it restarts from zero and sets the pending flag; the
// interrupt request is the pending flag gated by the interrupt enable. The
// sequencer acknowledges the request when it jumps to the service routine,
// which clears the flag. A reload value of zero stops the interrupts.
//
// Interface: en, ie and reload come from host-written control registers;
// irq is registered; ack clears it on the next rising edge (a new expiry in
// the same clock wins). The 32-bit width and the jump to a service routine
// follow the published text; counting clock cycles without a prescaler and
// the reload rule are this design's own.
module plc_timer_int (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        ie,
  input  logic [31:0] reload,
  input  logic        ack,
  output logic [31:0] count,
  output logic        pending,
  output logic        irq
);

  logic expire;

  assign expire = en && (reload != '0) && (count == reload - 1'b1);
  assign irq    = pending & ie;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      pending <= 1'b0;
    end else begin
      if (!en)         count <= '0;
      else if (expire) count <= '0;
      else             count <= count + 1'b1;
      if (expire)      pending <= 1'b1;
      else if (ack)    pending <= 1'b0;
    end
  end

endmodule
