// remote_decoder: the remote alert unit's serial ID decoder (top level).
//
// The base unit sends the ID of the remote it wants to find as an
// asynchronous serial byte (8 data bits, no parity, one stop bit), repeated
// many times, over a 433 MHz link. The receiver's data output drives rin.
// The decoder recognises its own ID, then sounds the speaker through
// ttl_out until the off code arrives.
//
//   slow_clk_gen     divides clk by 16: one slow tick per bit time
//   start_bit_latch  drops when rin goes low, released by uart_ctrl
//   uart_ctrl        checks the start bit at mid-bit, times nine bit
//                    periods to the stop bit, opens the compare window
//   id_shift_reg     9-bit register shifting rin in on every slow tick
//   id_compare_latch sets/clears the alert latch on ID / off code
//   ttl_tone_gen     2-bit counter running while the alert is on
//
// The structure follows the published decoder. This design's own choices:
// one clock domain (the divided clock is a clock enable), the off code
// value, and the status outputs: start_reject, frame_good and frame_error
// are one-cycle pulses, sampling is high while a frame is being timed.
// They are for observation only.
//
// Interface: clk must run at 16 times the serial bit rate (28.8 kHz for the
// base unit's 1800 bit/s). rst_n is active low and asynchronous. enable
// gates the shift register. q is the shift register, alert the latch,
// ttl_out the speaker drive (ttl_out[1] is a clk/4 square wave). rin has no
// synchroniser, as in the published decoder: drive it from a signal
// already synchronous to clk or add two flip-flops in front.
module remote_decoder
  import remote_pkg::*;
#(
  parameter id_t ON_CODE  = ID_ON_CODE,
  parameter id_t OFF_CODE = ID_OFF_CODE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rin,
  input  logic       enable,
  output logic [1:0] ttl_out,
  output id_t        q,
  output logic       alert,
  output logic       start_reject,
  output logic       frame_good,
  output logic       frame_error,
  output logic       sampling
);

  logic slow_tick;
  logic start_bit_n;
  logic clr_n;
  logic check_compare;

  slow_clk_gen u_clk (
    .clk       (clk),
    .rst_n     (rst_n),
    .slow_clk  (),
    .slow_tick (slow_tick)
  );

  start_bit_latch u_start (
    .clk         (clk),
    .rst_n       (rst_n),
    .rin         (rin),
    .clr_n       (clr_n),
    .start_bit_n (start_bit_n)
  );

  uart_ctrl u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .rin           (rin),
    .start_bit_n   (start_bit_n),
    .clr_n         (clr_n),
    .check_compare (check_compare),
    .sampling      (sampling),
    .start_reject  (start_reject),
    .frame_good    (frame_good),
    .frame_error   (frame_error)
  );

  id_shift_reg #(.WIDTH(ID_W)) u_shift (
    .clk        (clk),
    .rst_n      (rst_n),
    .shift_tick (slow_tick),
    .enable     (enable),
    .rin        (rin),
    .q          (q)
  );

  id_compare_latch #(.ON_CODE(ON_CODE), .OFF_CODE(OFF_CODE)) u_cmp (
    .clk           (clk),
    .rst_n         (rst_n),
    .tick          (slow_tick),
    .check_compare (check_compare),
    .iq            (q),
    .alert         (alert)
  );

  ttl_tone_gen #(.WIDTH(2)) u_tone (
    .clk     (clk),
    .rst_n   (rst_n),
    .alert   (alert),
    .ttl_out (ttl_out)
  );

endmodule
