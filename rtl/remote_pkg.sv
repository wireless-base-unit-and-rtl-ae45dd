// remote_pkg: constants shared by the remote alert unit decoder.
//
// The decoder oversamples the receive line 16 times per bit. Every counter
// in it is 4 bits wide and wraps at 16, so the oversampling ratio is built
// into the structure rather than being a free parameter. The preset values
// of the counters (8 for the start-bit check, 6 for the bit counter, 1 for
// the sampler, 4 for the end of the compare window) and the 9-bit ID code
// 000000001 follow the published decoder. The off code 100000001 is this
// design's choice (see id_compare_latch).
package remote_pkg;

  // Fast clock cycles per serial bit (divide ratio of the slow clock).
  localparam int unsigned OVERSAMPLE = 16;
  // Width of every counter in the decoder.
  localparam int unsigned CNT_W      = 4;
  // Width of the ID shift register: 8 data bits plus the stop bit.
  localparam int unsigned ID_W       = 9;

  typedef logic [CNT_W-1:0] cnt_t;
  typedef logic [ID_W-1:0]  id_t;

  // Shift register contents that switch the alert on and off.
  localparam id_t ID_ON_CODE  = 9'b0_0000_0001;
  localparam id_t ID_OFF_CODE = 9'b1_0000_0001;

  // Counter presets and decode points.
  localparam cnt_t CNT_LAST        = 4'hF;  // terminal count of every counter
  localparam cnt_t TEST_START_LOAD = 4'd8;  // start-bit check: 8 counts = half a bit
  localparam cnt_t SAMPLER_INIT    = 4'd1;  // sampler value after reset
  localparam cnt_t BIT_COUNT_INIT  = 4'd6;  // 6 -> 15 = nine bit times after the start bit
  localparam cnt_t CHECK_CLEAR_AT  = 4'd4;  // sampler value that ends the compare window
  localparam cnt_t SLOW_TICK_AT    = cnt_t'(OVERSAMPLE/2 - 1);  // divider value before the slow clock rises

endpackage
