// tb_remote_decoder: end-to-end test of the remote alert unit decoder at
// its default parameters (ID code 000000001 = byte 0x00 followed by its
// stop bit, off code 100000001 = byte 0x01).
//
// Frames are driven at 16 clocks per bit, either directly or through the
// behavioural model of the base unit's transmitter (bursts of 20 frames,
// as the base unit's alert routine sends them). The expected alert state
// is predicted from the decoder's timing, worked out by hand:
//   - the slow tick shifts on edges k = 8 (mod 16) after reset release;
//   - the stop bit of a frame whose start is first seen on edge S is
//     shifted in on the tick T in [S+144, S+159];
//   - the ID compare sees {data bits, stop bit} on the following tick,
//     T+16, provided the compare window is still open: it opens at S+153
//     at the latest and is closed by the next frame, whose start S' is
//     accepted at S'+8 and closes the window on edge S'+12.
// So a matching frame switches the alert on (or off) on edge T+16 unless
// another frame follows so closely that T+16 > S'+12. Every such
// mechanism is counted and must occur: good frames, rejected starts,
// framing errors, alert set and clear, a compare window lost to a
// following frame, the tone output, the shift enable held low, and a
// 20-frame alert burst.
module tb_remote_decoder;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tb_rin = 1'b1;
  logic use_model = 1'b0;
  logic enable = 1'b1;
  logic rin;
  logic [1:0] ttl_out;
  logic [8:0] q;
  logic alert, start_reject, frame_good, frame_error, sampling;

  // Base unit transmitter model.
  logic       m_send = 1'b0;
  logic [7:0] m_data = 8'h00;
  int         m_repeats = 20;
  int         m_gap = 0;
  logic       m_txd, m_busy;

  int checks = 0, failures = 0;
  int cyc = 0, r0 = 0;
  logic exp_alert = 1'b0;
  logic alert_q = 1'b0;
  logic [1:0] ttl_q = '0;

  // Mechanism counters.
  int n_good = 0, n_reject = 0, n_error = 0, n_set = 0, n_clear = 0;
  int n_window_lost = 0, n_tone = 0, n_enable_hold = 0, n_burst = 0;

  // Pending alert checks: edge number and expected value.
  int   chk_edge[$];
  logic chk_val[$];

  assign rin = use_model ? m_txd : tb_rin;

  remote_decoder dut (
    .clk(clk), .rst_n(rst_n), .rin(rin), .enable(enable),
    .ttl_out(ttl_out), .q(q), .alert(alert),
    .start_reject(start_reject), .frame_good(frame_good),
    .frame_error(frame_error), .sampling(sampling)
  );

  duart_tx_model #(.CLKS_PER_BIT(16)) u_base (
    .clk(clk), .send(m_send), .data(m_data), .repeats(m_repeats),
    .gap_bits(m_gap), .txd(m_txd), .busy(m_busy)
  );

  always #5 clk = ~clk;

  // Monitor, just after every rising edge.
  always @(posedge clk) begin
    #1;
    cyc++;
    if (rst_n) begin
      if (frame_good)   n_good++;
      if (start_reject) n_reject++;
      if (frame_error)  n_error++;
      if (alert && !alert_q) n_set++;
      if (!alert && alert_q) n_clear++;
      // Speaker drive: counts while the alert was on before the edge.
      checks++;
      if (ttl_out !== 2'(ttl_q + {1'b0, alert_q})) begin
        failures++;
        $display("FAIL tone at edge %0d: %0d after %0d, alert %b", cyc, ttl_out, ttl_q, alert_q);
      end
      if (alert_q) n_tone++;
      while (chk_edge.size() > 0 && chk_edge[0] <= cyc) begin
        checks++;
        if (chk_edge[0] != cyc || alert !== chk_val[0]) begin
          failures++;
          $display("FAIL alert at edge %0d: got %b expected %b (due %0d)",
                   cyc, alert, chk_val[0], chk_edge[0]);
        end
        void'(chk_edge.pop_front());
        void'(chk_val.pop_front());
      end
    end
    alert_q = alert;
    ttl_q   = ttl_out;
  end

  // Drive one frame directly, then idle for gap cycles (the next frame, if
  // any, starts right after). Predicts and schedules the alert check.
  task automatic send_frame(input logic [7:0] data, input logic stop, input int gap,
                            input logic next_follows);
    logic [9:0] bits;
    logic [8:0] seen;
    int s, t;
    logic window_open;
    bits = {stop, data, 1'b0};
    // Called on a falling edge: the start bit is seen on the next edge.
    s = cyc + 1;
    for (int i = 0; i < 10; i++) begin
      tb_rin = bits[i];
      repeat (16) @(negedge clk);
    end
    tb_rin = 1'b1;
    // Stop-bit tick and the compare on the tick after it.
    t = s + 144;
    while (((t - r0) % 16) != 8) t++;
    window_open = !next_follows || (t + 16 <= s + 160 + gap + 12);
    seen = {data[0], data[1], data[2], data[3], data[4], data[5], data[6], data[7], stop};
    if (stop && enable) begin
      if (seen == 9'b0_0000_0001 || seen == 9'b1_0000_0001) begin
        if (window_open) exp_alert = (seen == 9'b0_0000_0001);
        else if (exp_alert != (seen == 9'b0_0000_0001)) n_window_lost++;
      end
      chk_edge.push_back(t + 16);
      chk_val.push_back(exp_alert);
    end
    repeat (gap) @(negedge clk);
  endtask

  task automatic wait_checks();
    while (chk_edge.size() > 0) @(negedge clk);
  endtask

  logic [8:0] q_hold;
  logic [7:0] rnd;

  initial begin
    #22;
    @(negedge clk) rst_n = 1'b1;
    r0 = cyc;
    repeat (10) @(negedge clk);

    // 1. Isolated ID frame switches the alert on; the speaker runs.
    send_frame(8'h00, 1'b1, 40, 1'b0);
    wait_checks();
    repeat (50) @(negedge clk);
    checks++;
    if (alert !== 1'b1) begin failures++; $display("FAIL alert not on"); end

    // 2. Isolated off-code frame switches it off.
    send_frame(8'h01, 1'b1, 40, 1'b0);
    wait_checks();

    // 3. A short glitch is rejected; nothing changes.
    @(negedge clk) tb_rin = 1'b0;
    repeat (5) @(negedge clk);
    tb_rin = 1'b1;
    repeat (40) @(negedge clk);

    // 4. ID byte with a low stop bit: framing error, no alert.
    send_frame(8'h00, 1'b0, 60, 1'b0);
    checks++;
    if (alert !== 1'b0) begin failures++; $display("FAIL alert on framing error"); end

    // 5. Phase sweep: ID frame followed at once by a 0xFF frame, for all
    //    16 alignments of the frame to the slow tick.
    for (int p = 0; p < 16; p++) begin
      repeat (p) @(negedge clk);
      send_frame(8'h00, 1'b1, 0, 1'b1);
      send_frame(8'hFF, 1'b1, 40, 1'b0);
      wait_checks();
      send_frame(8'h01, 1'b1, 40, 1'b0);
      wait_checks();
    end

    // 6. Shift enable low: the register holds and the ID is not seen.
    repeat (20) @(negedge clk);
    enable = 1'b0;
    q_hold = q;
    send_frame(8'h00, 1'b1, 40, 1'b0);
    repeat (40) @(negedge clk);
    checks++;
    if (q !== q_hold || alert !== 1'b0) begin
      failures++; $display("FAIL enable low: q %b->%b alert %b", q_hold, q, alert);
    end else n_enable_hold++;
    enable = 1'b1;
    repeat (40) @(negedge clk);

    // 7. Random traffic: ID, off code and other bytes with random gaps.
    repeat (150) begin
      case ($urandom % 4)
        0: rnd = 8'h00;
        1: rnd = 8'h01;
        default: begin
          rnd = 8'($urandom);
          if (rnd == 8'h80) rnd = 8'h81;
        end
      endcase
      begin
        int gap;
        gap = ($urandom % 3 == 0) ? 0 : int'($urandom % 40);
        send_frame(rnd, 1'b1, gap, 1'b1);
      end
    end
    send_frame(8'h01, 1'b1, 40, 1'b0);
    wait_checks();

    // 8. The base unit's alert: 20 back-to-back ID frames, then 20 off.
    use_model = 1'b1;
    repeat (3) @(negedge clk);
    m_data = 8'h00; m_repeats = 20; m_gap = 0;
    @(negedge clk) m_send = 1'b1;
    @(negedge clk) m_send = 1'b0;
    @(negedge clk); while (m_busy) @(negedge clk);
    repeat (40) @(negedge clk);
    checks++;
    if (alert !== 1'b1) begin failures++; $display("FAIL burst did not raise alert"); end
    else n_burst++;
    m_data = 8'h01;
    @(negedge clk) m_send = 1'b1;
    @(negedge clk) m_send = 1'b0;
    @(negedge clk); while (m_busy) @(negedge clk);
    repeat (40) @(negedge clk);
    checks++;
    if (alert !== 1'b0) begin failures++; $display("FAIL off burst did not clear alert"); end
    use_model = 1'b0;

    // Every mechanism must have happened.
    checks++;
    if (n_good == 0 || n_reject == 0 || n_error == 0 || n_set == 0 || n_clear == 0 ||
        n_window_lost == 0 || n_tone == 0 || n_enable_hold == 0 || n_burst == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("good frames %0d, rejected starts %0d, framing errors %0d", n_good, n_reject, n_error);
    $display("alert set %0d, cleared %0d, windows lost %0d, tone cycles %0d, enable holds %0d, bursts %0d",
             n_set, n_clear, n_window_lost, n_tone, n_enable_hold, n_burst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
