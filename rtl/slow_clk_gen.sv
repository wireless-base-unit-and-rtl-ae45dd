// slow_clk_gen: divide-by-16 clock generation for the remote decoder.
//
// A 4-bit counter advances on every fast clock edge. Its most significant
// bit is the divided "slow clock" (one period per serial bit time), as in
// the published decoder. This design does not clock flip-flops from that
// bit: it also produces slow_tick, a one-cycle enable that is high in the
// fast cycle whose closing edge makes the slow clock rise (counter 7 -> 8).
// Logic that the published decoder clocks from the slow clock uses
// slow_tick as a clock enable on the fast clock instead, which keeps the
// whole decoder in one clock domain.
//
// Interface: clk, active-low asynchronous reset rst_n; outputs slow_clk
// (level, 50% duty, period 16 clk) and slow_tick (pulse, every 16 clk,
// first one on the 8th edge after reset).
module slow_clk_gen
  import remote_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  output logic slow_clk,
  output logic slow_tick
);

  cnt_t div_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div_cnt <= '0;
    else        div_cnt <= div_cnt + 1'b1;
  end

  assign slow_clk  = div_cnt[CNT_W-1];
  assign slow_tick = (div_cnt == SLOW_TICK_AT);

endmodule
