// start_bit_latch: start-bit detection for the remote decoder.
//
// start_bit_n is an active-low flag that drops on the first fast clock edge
// that sees the receive line low, and stays low for the whole frame. The
// UART control sets it again with a one-cycle active-low clr_n pulse when
// it rejects a false start or finishes a frame. A low receive line wins
// over clr_n, so a frame that ends with the line still low (a framing
// error or a break) re-arms the start-bit check at once. This is the
// published behaviour; only the optional second reset input of the
// original, which its authors had already removed, is left out.
//
// Interface: clk, rst_n (active low, asynchronous, sets the flag high),
// rin (receive data), clr_n; output start_bit_n. One cycle latency.
module start_bit_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic rin,
  input  logic clr_n,
  output logic start_bit_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      start_bit_n <= 1'b1;
    else if (!rin)   start_bit_n <= 1'b0;
    else if (!clr_n) start_bit_n <= 1'b1;
  end

endmodule
