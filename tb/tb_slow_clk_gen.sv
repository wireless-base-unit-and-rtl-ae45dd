// tb_slow_clk_gen: checks the divide-by-16 clock generator.
// A reference count of clock edges since reset predicts the slow clock
// level (bit 3 of the count) and the tick (count mod 16 == 7) every cycle.
module tb_slow_clk_gen;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic slow_clk, slow_tick;
  int checks = 0, failures = 0;
  int edges = 0, ticks = 0;

  slow_clk_gen dut (.clk(clk), .rst_n(rst_n), .slow_clk(slow_clk), .slow_tick(slow_tick));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at edge %0d: got %b expected %b", what, edges, got, exp);
    end
  endtask

  initial begin
    #2 rst_n = 1'b0;
    #20;
    check(slow_clk, 1'b0, "slow_clk in reset");
    check(slow_tick, 1'b0, "slow_tick in reset");
    @(negedge clk) rst_n = 1'b1;
    repeat (100) begin
      @(posedge clk); #1;
      edges++;
      check(slow_clk, ((edges % 16) >= 8), "slow_clk");
      check(slow_tick, ((edges % 16) == 7), "slow_tick");
      if (slow_tick) ticks++;
    end
    // 100 edges: ticks after edges 7, 23, 39, 55, 71, 87.
    checks++;
    if (ticks != 6) begin failures++; $display("FAIL tick count %0d", ticks); end
    // Asynchronous reset mid-count returns the divider to zero.
    @(negedge clk) rst_n = 1'b0; #1;
    check(slow_clk, 1'b0, "slow_clk after async reset");
    check(slow_tick, 1'b0, "slow_tick after async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
