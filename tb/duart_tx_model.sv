// duart_tx_model: behavioural model of the base unit's alert transmitter.
// Not synthesizable logic of the design; used by the testbenches only.
//
// It stands for one channel of the base unit's dual UART, set up for
// 8 data bits, no parity and one stop bit, together with the base unit's
// alert routine, which writes the selected remote's ID into the transmit
// holding register a fixed number of times as fast as the transmitter
// accepts it, so the frames follow each other with no idle time.
//
// send (one clk pulse) starts a burst of `repeats` frames of `data`, with
// gap_bits idle bit times between frames (0 for the base unit's routine).
// Each bit lasts CLKS_PER_BIT clk cycles; line changes are made on the
// falling clock edge. txd idles high; busy is high during the burst.
module duart_tx_model #(
  parameter int CLKS_PER_BIT = 16
) (
  input  logic       clk,
  input  logic       send,
  input  logic [7:0] data,
  input  int         repeats,
  input  int         gap_bits,
  output logic       txd,
  output logic       busy
);
  initial begin
    txd  = 1'b1;
    busy = 1'b0;
    forever begin
      @(posedge clk);
      if (send) begin
        logic [9:0] frame;
        int n, gap;
        frame = {1'b1, data, 1'b0};
        n = repeats;
        gap = gap_bits;
        busy = 1'b1;
        @(negedge clk);
        for (int r = 0; r < n; r++) begin
          for (int b = 0; b < 10; b++) begin
            txd = frame[b];
            repeat (CLKS_PER_BIT) @(negedge clk);
          end
          txd = 1'b1;
          if (r != n - 1) repeat (gap * CLKS_PER_BIT) @(negedge clk);
        end
        busy = 1'b0;
      end
    end
  end
endmodule
