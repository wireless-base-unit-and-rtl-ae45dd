// tb_uart_ctrl: checks the frame timing control of the remote decoder.
// The start-bit latch is modelled here by its three-line rule. Serial
// frames (16 clocks per bit) are driven into rin and the cycle of every
// event is compared with the timing worked out from the counter presets:
// with the start edge first seen on edge S, the start bit is accepted on
// edge S+9 for the first frame after reset and on S+8 otherwise; the stop bit is read 144 edges after acceptance. Also
// checked: rejection of a short low glitch, a framing error (low stop
// bit), and the compare window closing four edges after the next frame's
// start bit is accepted.
module tb_uart_ctrl;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic rin = 1'b1;
  logic start_bit_n;
  logic clr_n, check_compare, sampling, start_reject, frame_good, frame_error;
  int checks = 0, failures = 0;
  int cyc = 0;
  int t_accept, t_good, t_error, t_reject, t_ccfall;
  logic sampling_q, cc_q;

  uart_ctrl dut (.clk(clk), .rst_n(rst_n), .rin(rin), .start_bit_n(start_bit_n),
                 .clr_n(clr_n), .check_compare(check_compare), .sampling(sampling),
                 .start_reject(start_reject), .frame_good(frame_good),
                 .frame_error(frame_error));

  // Start-bit latch: low line drops the flag, clr_n raises it, else hold.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      start_bit_n <= 1'b1;
    else if (!rin)   start_bit_n <= 1'b0;
    else if (!clr_n) start_bit_n <= 1'b1;

  always #5 clk = ~clk;

  // Event monitor: edge number of each event, sampled just after the edge.
  always @(posedge clk) begin
    #1;
    cyc++;
    if (sampling && !sampling_q) t_accept = cyc;
    if (frame_good)   t_good = cyc;
    if (frame_error)  t_error = cyc;
    if (start_reject) t_reject = cyc;
    if (!check_compare && cc_q) t_ccfall = cyc;
    if ((frame_good || frame_error || start_reject)) begin
      checks++;
      if (clr_n !== 1'b0) begin failures++; $display("FAIL clr_n not low with event at %0d", cyc); end
    end
    sampling_q = sampling;
    cc_q = check_compare;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: edge %0d expected %0d", what, got, exp);
    end
  endtask

  // Drive one frame: start bit, 8 data bits LSB first, stop bit. Returns S,
  // the edge that first sees the start bit.
  task automatic send_frame(input logic [7:0] data, input logic stop, output int s);
    logic [9:0] bits;
    bits = {stop, data, 1'b0};
    @(negedge clk);
    s = cyc + 1;
    for (int i = 0; i < 10; i++) begin
      rin = bits[i];
      repeat (16) @(negedge clk);
    end
    rin = 1'b1;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
    rin = 1'b1;
  endtask

  int s;

  initial begin
    t_accept = -1; t_good = -1; t_error = -1; t_reject = -1; t_ccfall = -1;
    sampling_q = 1'b0; cc_q = 1'b0;
    #12;
    checks++;
    if (clr_n !== 1'b1 || check_compare !== 1'b0 || sampling !== 1'b0) begin
      failures++; $display("FAIL reset outputs");
    end
    @(negedge clk) rst_n = 1'b1;
    idle(5);

    // 1. First frame after reset: accepted at S+9, good stop at S+153.
    send_frame(8'h00, 1'b1, s);
    idle(2);
    expect_eq(t_accept, s + 9, "first frame accept");
    expect_eq(t_good, s + 9 + 144, "first frame stop");
    checks++;
    if (check_compare !== 1'b1) begin failures++; $display("FAIL window not open"); end
    idle(40);
    checks++;
    if (check_compare !== 1'b1) begin failures++; $display("FAIL window closed while idle"); end

    // 2. Second frame: test_start already preset, accepted at S+8. The
    //    window of frame 1 closes 4 edges after the acceptance.
    send_frame(8'h5A, 1'b1, s);
    idle(2);
    expect_eq(t_accept, s + 8, "second frame accept");
    expect_eq(t_ccfall, s + 8 + 4, "window close");
    expect_eq(t_good, s + 8 + 144, "second frame stop");

    // 3. Back-to-back frames (no idle time).
    send_frame(8'hA5, 1'b1, s);
    expect_eq(t_accept, s + 8, "back-to-back accept 1");
    send_frame(8'hFF, 1'b1, s);
    idle(2);
    expect_eq(t_accept, s + 8, "back-to-back accept 2");
    expect_eq(t_good, s + 152, "back-to-back stop 2");

    // 4. A 4-cycle glitch is rejected half a bit after it starts.
    idle(20);
    @(negedge clk); s = cyc + 1; rin = 1'b0;
    repeat (4) @(negedge clk);
    rin = 1'b1;
    idle(30);
    expect_eq(t_reject, s + 8, "glitch rejected");
    checks++;
    if (sampling !== 1'b0) begin failures++; $display("FAIL sampling after glitch"); end

    // 5. The reload after a rejection happens in the cycle that releases
    //    the latch, so the next frame is accepted at S+8 again.
    send_frame(8'h00, 1'b1, s);
    idle(2);
    expect_eq(t_accept, s + 8, "accept after rejection");
    expect_eq(t_good, s + 152, "stop after rejection");

    // 6. Framing error: stop bit low. No new window, error pulse instead.
    idle(20);
    send_frame(8'h00, 1'b0, s);
    idle(2);
    expect_eq(t_error, s + 152, "framing error");
    checks++;
    if (t_good > s) begin failures++; $display("FAIL good pulse on framing error"); end

    idle(200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
