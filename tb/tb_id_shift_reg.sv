// tb_id_shift_reg: checks the 9-bit ID shift register. A reference value
// is updated only when both the tick and enable are high, shifting the
// line in at bit 0; random ticks, enables and data are applied.
module tb_id_shift_reg;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic shift_tick = 1'b0, enable = 1'b0, rin = 1'b1;
  logic [8:0] q, exp_q;
  int checks = 0, failures = 0, shifts = 0, holds = 0;

  id_shift_reg dut (.clk(clk), .rst_n(rst_n), .shift_tick(shift_tick),
                    .enable(enable), .rin(rin), .q(q));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, q, exp_q);
    end
  endtask

  initial begin
    #12; exp_q = '0; check("reset");
    @(negedge clk) rst_n = 1'b1;
    // Shift in a known byte pattern: after nine shifts the first bit is in q[8].
    for (int i = 0; i < 9; i++) begin
      @(negedge clk); shift_tick = 1'b1; enable = 1'b1; rin = (9'b1_0110_0101 >> (8 - i)) & 1'b1;
      @(negedge clk); shift_tick = 1'b0;
    end
    #1; exp_q = 9'b1_0110_0101; check("nine shifts");
    repeat (500) begin
      @(negedge clk);
      shift_tick = ($urandom % 3) == 0;
      enable     = ($urandom % 4) != 0;
      rin        = $urandom % 2;
      @(posedge clk); #1;
      if (shift_tick && enable) begin exp_q = {exp_q[7:0], rin}; shifts++; end
      else holds++;
      check("random");
    end
    checks++;
    if (shifts < 50 || holds < 50) begin failures++; $display("FAIL coverage"); end
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
