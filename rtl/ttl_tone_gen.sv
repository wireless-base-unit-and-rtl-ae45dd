// ttl_tone_gen: TTL output generation of the remote decoder.
//
// While the alert latch is set, a 2-bit counter advances on every fast
// clock edge; its bits are square waves at 1/2 and 1/4 of the fast clock,
// which drive the speaker. When the latch clears, the counter stops where
// it is, as in the published decoder (it is not returned to zero, so one
// output bit may stay high; the speaker is AC-coupled by its driver).
//
// Interface: clk, rst_n (asynchronous, clears the counter), alert; output
// ttl_out. ttl_out[WIDTH-1] has period 2**WIDTH fast cycles.
module ttl_tone_gen #(
  parameter int unsigned WIDTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             alert,
  output logic [WIDTH-1:0] ttl_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ttl_out <= '0;
    else if (alert) ttl_out <= ttl_out + 1'b1;
  end

endmodule
