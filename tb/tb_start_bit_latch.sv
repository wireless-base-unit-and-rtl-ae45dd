// tb_start_bit_latch: checks the start-bit latch against its rule:
// low line -> flag low, else clr_n low -> flag high, else hold. Random
// rin / clr_n patterns are applied and the expected flag is computed
// cycle by cycle, plus directed checks of the priority and the reset.
module tb_start_bit_latch;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic rin = 1'b1, clr_n = 1'b1;
  logic start_bit_n;
  logic exp_flag;
  int checks = 0, failures = 0;

  start_bit_latch dut (.clk(clk), .rst_n(rst_n), .rin(rin), .clr_n(clr_n),
                       .start_bit_n(start_bit_n));

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (start_bit_n !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, start_bit_n, exp, $time);
    end
  endtask

  task automatic step(input logic r, input logic c);
    @(negedge clk);
    rin = r; clr_n = c;
    @(posedge clk); #1;
    if (!r) exp_flag = 1'b0;
    else if (!c) exp_flag = 1'b1;
  endtask

  initial begin
    #12; check(1'b1, "reset value");
    @(negedge clk) rst_n = 1'b1;
    exp_flag = 1'b1;
    // Directed: line drops -> flag low, holds while line returns high.
    step(1'b0, 1'b1); check(1'b0, "start edge");
    step(1'b1, 1'b1); check(1'b0, "hold during frame");
    // Low line wins over clr_n.
    step(1'b0, 1'b0); check(1'b0, "low line beats clr");
    // clr_n releases when line is high.
    step(1'b1, 1'b0); check(1'b1, "clr releases");
    step(1'b1, 1'b1); check(1'b1, "idle holds high");
    // Random traffic.
    repeat (400) begin
      step(($urandom % 4) != 0, ($urandom % 6) != 0);
      check(exp_flag, "random");
    end
    // Asynchronous reset.
    step(1'b0, 1'b1); check(1'b0, "before reset");
    #2 rst_n = 1'b0; #1; check(1'b1, "async reset");
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
