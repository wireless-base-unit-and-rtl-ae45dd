// tb_id_compare_latch: checks the alert latch. The ID code sets it and the
// off code clears it, only on a tick with check_compare high; any other
// value, or a missing tick or window, leaves it unchanged.
module tb_id_compare_latch;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick = 1'b0, check_compare = 1'b0;
  logic [8:0] iq = '0;
  logic alert, exp_alert;
  int checks = 0, failures = 0, sets = 0, clears = 0;

  id_compare_latch dut (.clk(clk), .rst_n(rst_n), .tick(tick),
                        .check_compare(check_compare), .iq(iq), .alert(alert));

  always #5 clk = ~clk;

  task automatic apply(input logic t, input logic cc, input logic [8:0] v, input string what);
    @(negedge clk); tick = t; check_compare = cc; iq = v;
    @(posedge clk); #1;
    if (t && cc && v == 9'b0_0000_0001) begin
      if (!exp_alert) sets++;
      exp_alert = 1'b1;
    end else if (t && cc && v == 9'b1_0000_0001) begin
      if (exp_alert) clears++;
      exp_alert = 1'b0;
    end
    checks++;
    if (alert !== exp_alert) begin
      failures++;
      $display("FAIL %s: t=%b cc=%b iq=%b alert=%b expected %b", what, t, cc, v, alert, exp_alert);
    end
  endtask

  initial begin
    #12;
    checks++; if (alert !== 1'b0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1'b1;
    exp_alert = 1'b0;
    apply(1'b1, 1'b0, 9'b0_0000_0001, "ID without window");
    apply(1'b0, 1'b1, 9'b0_0000_0001, "ID without tick");
    apply(1'b1, 1'b1, 9'b0_0000_0011, "other value");
    apply(1'b1, 1'b1, 9'b0_0000_0001, "ID sets");
    apply(1'b1, 1'b1, 9'b0_0000_0011, "holds set");
    apply(1'b1, 1'b0, 9'b1_0000_0001, "off without window");
    apply(1'b1, 1'b1, 9'b1_0000_0001, "off clears");
    apply(1'b1, 1'b1, 9'b0_1000_0001, "near miss");
    repeat (600) begin
      logic [8:0] v;
      case ($urandom % 4)
        0: v = 9'b0_0000_0001;
        1: v = 9'b1_0000_0001;
        default: v = 9'($urandom);
      endcase
      apply(($urandom % 2) == 0, ($urandom % 2) == 0, v, "random");
    end
    checks++;
    if (sets < 10 || clears < 10) begin failures++; $display("FAIL coverage %0d %0d", sets, clears); end
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
