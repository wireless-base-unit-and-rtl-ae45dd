// id_compare_latch: ID compare and alert latch of the remote decoder.
//
// On each slow-clock tick while check_compare is high, the latch is set if
// the shift register holds this unit's ID code and cleared if it holds the
// off code; otherwise it keeps its value, so the alert sounds until the base
// unit sends the off code or the unit is reset. The compare sees the shift
// register as it was before the shift of the same tick, so a frame is
// recognised on the first tick after its stop bit was shifted in.
//
// The ID code 000000001 (a 0x00 byte followed by its stop bit) and the
// set-before-clear priority follow the published decoder. The off-code
// value 100000001 (a 0x01 byte and its stop bit) is this design's choice.
// Both are parameters.
//
// Interface: clk, rst_n (asynchronous, clears the latch), tick (slow-clock
// enable), check_compare, iq (shift register); output alert.
module id_compare_latch
  import remote_pkg::*;
#(
  parameter id_t ON_CODE  = ID_ON_CODE,
  parameter id_t OFF_CODE = ID_OFF_CODE
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic check_compare,
  input  id_t  iq,
  output logic alert
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) alert <= 1'b0;
    else if (tick && check_compare) begin
      if (iq == ON_CODE)       alert <= 1'b1;
      else if (iq == OFF_CODE) alert <= 1'b0;
    end
  end

endmodule
