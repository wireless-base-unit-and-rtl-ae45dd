// tb_ttl_tone_gen: checks the speaker drive. While alert is high the
// output counts up by one per clock (bit 1 toggles every two clocks); while
// it is low the output holds.
module tb_ttl_tone_gen;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic alert = 1'b0;
  logic [1:0] ttl_out;
  logic [1:0] exp_out;
  int checks = 0, failures = 0, toggles = 0;
  logic prev_msb;

  ttl_tone_gen dut (.clk(clk), .rst_n(rst_n), .alert(alert), .ttl_out(ttl_out));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (ttl_out !== exp_out) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, ttl_out, exp_out);
    end
  endtask

  initial begin
    #12; exp_out = '0; check("reset");
    @(negedge clk) rst_n = 1'b1;
    repeat (5) begin @(posedge clk); #1; check("idle"); end
    @(negedge clk) alert = 1'b1;
    prev_msb = ttl_out[1];
    // 40 clocks of tone: bit 1 must toggle every 2 clocks, i.e. 20 times.
    repeat (40) begin
      @(posedge clk); #1;
      exp_out = exp_out + 2'd1;
      check("tone");
      if (ttl_out[1] != prev_msb) toggles++;
      prev_msb = ttl_out[1];
    end
    checks++;
    if (toggles != 20) begin failures++; $display("FAIL toggles %0d", toggles); end
    @(negedge clk) alert = 1'b0;
    repeat (3) begin @(posedge clk); #1; end
    @(negedge clk) alert = 1'b1;
    @(posedge clk); #1; exp_out = exp_out + 2'd1; check("restart");
    @(negedge clk) alert = 1'b0;
    repeat (5) begin @(posedge clk); #1; check("hold when off"); end
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
