// id_shift_reg: 9-bit ID shift register of the remote decoder.
//
// On every slow-clock tick (once per bit time) while enable is high, the
// register shifts left and the receive line enters at bit 0, so the oldest
// sample sits in bit 8. It runs freely: it is not aligned to the frame by
// the UART control, and the compare window decides when its contents count.
// After the tick that samples a stop bit it holds the eight data bits in
// the order they were sent (first bit in q[8]) followed by the stop bit in
// q[0]. Width, shift direction and the enable follow the published decoder;
// using a clock enable on the fast clock instead of the divided clock is
// this design's choice.
//
// Interface: clk, rst_n (asynchronous, clears the register), shift_tick
// (from slow_clk_gen), enable, rin; output q. q changes on the edge that
// ends a shift_tick cycle.
module id_shift_reg
  import remote_pkg::*;
#(
  parameter int unsigned WIDTH = ID_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_tick,
  input  logic             enable,
  input  logic             rin,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   q <= '0;
    else if (shift_tick && enable) q <= {q[WIDTH-2:0], rin};
  end

endmodule
