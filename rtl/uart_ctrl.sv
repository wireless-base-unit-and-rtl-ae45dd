// uart_ctrl: frame timing control ("UART circuitry") of the remote decoder.
//
// Works on the fast clock, which runs at 16 times the bit rate. Nothing
// happens while the start-bit latch is high (line idle). Once it drops:
//
//  1. Start-bit check. test_start counts from 8 to 15, i.e. about half a
//     bit time. It is preset to 8 whenever load is set: in the first
//     cycle after reset that sees a start bit, and otherwise in the one
//     cycle after each frame or rejection in which the start-bit latch
//     is being released, so that later start bits find it already at 8. If the line is still low
//     at 15 the start bit is accepted and sampling begins; if it is high
//     again the start is rejected: clr_n pulses low to set the start-bit
//     latch and test_start is reloaded.
//  2. Bit timing. The sampler counts fast cycles from 1 while sampling is
//     on; every time it reads 15 the bit counter advances. Preset to 6, the
//     bit counter reaches 15 nine bit times after the middle of the start
//     bit, which is the middle of the stop bit of an 8-data-bit frame.
//  3. Stop bit. At bit count 15 the line is read: if it is high the frame
//     is good and check_compare rises; in either case clr_n pulses, sampling
//     stops and the bit counter is preset again.
//
// check_compare stays high after a good frame and is cleared only when the
// sampler of the next frame reads 4, on the fourth edge after that frame's
// start bit is accepted;
// it gates the ID compare. All of this, including the counter presets and
// the fact that the data bits themselves are not sampled here (the shift
// register runs freely on the slow clock), follows the published decoder.
// The three status pulses (start_reject, frame_good, frame_error) are this
// design's additions for observation; they are high for one cycle together
// with the clr_n pulse that ends the event.
//
// Interface: clk, rst_n (asynchronous), rin, start_bit_n (from
// start_bit_latch); outputs clr_n, check_compare, sampling and the status
// pulses. Timing for a frame whose start edge is first seen on edge S:
// start bit accepted on edge S+8 (S+9 for the first frame after reset),
// stop bit read 144 edges later, start-bit latch released one edge after
// that.
module uart_ctrl
  import remote_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic rin,
  input  logic start_bit_n,
  output logic clr_n,
  output logic check_compare,
  output logic sampling,
  output logic start_reject,
  output logic frame_good,
  output logic frame_error
);

  cnt_t test_start;
  cnt_t sampler;
  cnt_t bit_counter;
  logic load;
  logic retest_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      test_start    <= '0;
      sampler       <= SAMPLER_INIT;
      sampling      <= 1'b0;
      load          <= 1'b1;
      bit_counter   <= BIT_COUNT_INIT;
      check_compare <= 1'b0;
      clr_n         <= 1'b1;
      retest_start  <= 1'b1;
      start_reject  <= 1'b0;
      frame_good    <= 1'b0;
      frame_error   <= 1'b0;
    end else begin
      clr_n        <= 1'b1;
      start_reject <= 1'b0;
      frame_good   <= 1'b0;
      frame_error  <= 1'b0;
      if (!start_bit_n) begin
        // Start-bit check, half a bit time after the falling edge.
        if (retest_start) begin
          if (load) begin
            test_start <= TEST_START_LOAD;
            load       <= 1'b0;
          end else if (test_start == CNT_LAST) begin
            if (!rin) begin
              sampling     <= 1'b1;
              retest_start <= 1'b0;
            end else begin
              clr_n        <= 1'b0;
              load         <= 1'b1;
              start_reject <= 1'b1;
            end
          end else begin
            test_start <= test_start + 1'b1;
          end
        end
        // Bit-time counting.
        if (sampling) sampler <= sampler + 1'b1;
        if (sampler == CHECK_CLEAR_AT) check_compare <= 1'b0;
        if (sampler == CNT_LAST) bit_counter <= bit_counter + 1'b1;
        // Stop bit: end of frame, good or not.
        if (bit_counter == CNT_LAST) begin
          if (rin) begin
            check_compare <= 1'b1;
            frame_good    <= 1'b1;
          end else begin
            frame_error   <= 1'b1;
          end
          clr_n        <= 1'b0;
          load         <= 1'b1;
          sampling     <= 1'b0;
          retest_start <= 1'b1;
          bit_counter  <= BIT_COUNT_INIT;
        end
      end
    end
  end

  // Sampling and the start-bit check are never active together.
  a_phase_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(sampling && retest_start));
  // A frame ends as good or as an error, never both.
  a_one_outcome: assert property (@(posedge clk) disable iff (!rst_n)
    !(frame_good && frame_error));
  // Every end of a frame or rejected start releases the start-bit latch.
  a_clr_with_event: assert property (@(posedge clk) disable iff (!rst_n)
    (frame_good || frame_error || start_reject) |-> !clr_n);

endmodule
