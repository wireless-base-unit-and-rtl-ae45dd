// tb_eight_remotes: eight remote decoders on one radio link, the number of
// remote units the system is specified for. Each decoder is built with its
// own ID code; all share the off code 100000001 (byte 0x01). The IDs are
// odd bytes below 0x80 (least significant bit 1, most significant bit 0),
// which cannot alias with another unit's frame at any tick alignment.
//
// The base-unit transmitter model sends 20-frame bursts, back to back, as
// the base unit does. Each burst must raise exactly the addressed unit's
// alert and leave the others as they were; an off burst clears all. The
// bursts start at varying clock offsets so the frames meet the units' slow
// ticks at different alignments.
module tb_eight_remotes;
  localparam int UNITS = 8;
  localparam logic [7:0] IDS [UNITS] = '{8'h03, 8'h05, 8'h07, 8'h09, 8'h0B, 8'h0D, 8'h0F, 8'h11};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [UNITS-1:0] alert;
  logic [UNITS-1:0] exp_alert = '0;
  logic [UNITS-1:0] tone_seen = '0;

  logic       m_send = 1'b0;
  logic [7:0] m_data = 8'h00;
  int         m_repeats = 20;
  int         m_gap = 0;
  logic       link, m_busy;

  int checks = 0, failures = 0;

  // Byte b as seen in the register after its stop bit: first-sent bit in
  // bit 8, stop bit in bit 0.
  function automatic logic [8:0] code_of(input logic [7:0] b);
    logic [8:0] c;
    for (int i = 0; i < 8; i++) c[8 - i] = b[i];
    c[0] = 1'b1;
    return c;
  endfunction

  duart_tx_model #(.CLKS_PER_BIT(16)) u_base (
    .clk(clk), .send(m_send), .data(m_data), .repeats(m_repeats),
    .gap_bits(m_gap), .txd(link), .busy(m_busy)
  );

  for (genvar u = 0; u < UNITS; u++) begin : g_unit
    logic [1:0] ttl_out;
    logic [8:0] q;
    logic start_reject, frame_good, frame_error, sampling;
    remote_decoder #(.ON_CODE(code_of(IDS[u])), .OFF_CODE(9'b1_0000_0001)) dut (
      .clk(clk), .rst_n(rst_n), .rin(link), .enable(1'b1),
      .ttl_out(ttl_out), .q(q), .alert(alert[u]),
      .start_reject(start_reject), .frame_good(frame_good),
      .frame_error(frame_error), .sampling(sampling)
    );
    always @(posedge clk) if (ttl_out[1]) tone_seen[u] <= 1'b1;
  end

  always #5 clk = ~clk;

  task automatic burst(input logic [7:0] data);
    m_data = data;
    @(negedge clk) m_send = 1'b1;
    @(negedge clk) m_send = 1'b0;
    @(negedge clk);
    while (m_busy) @(negedge clk);
    repeat (40) @(negedge clk);
  endtask

  task automatic check_alerts(input string what);
    checks++;
    if (alert !== exp_alert) begin
      failures++;
      $display("FAIL %s: alerts %b expected %b", what, alert, exp_alert);
    end
  endtask

  initial begin
    #22;
    @(negedge clk) rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check_alerts("after reset");
    // Call each unit in turn; alerts accumulate.
    for (int u = 0; u < UNITS; u++) begin
      repeat (u * 3) @(negedge clk);
      burst(IDS[u]);
      exp_alert[u] = 1'b1;
      check_alerts($sformatf("call unit %0d", u));
    end
    checks++;
    if (tone_seen != '1) begin failures++; $display("FAIL tone not seen on all units: %b", tone_seen); end
    // The off code silences every unit.
    burst(8'h01);
    exp_alert = '0;
    check_alerts("off");
    // A byte that is nobody's ID changes nothing.
    burst(8'h55);
    check_alerts("foreign byte");
    // Random calls in random order, with off bursts in between.
    repeat (12) begin
      int u;
      u = int'($urandom % UNITS);
      repeat ($urandom % 16) @(negedge clk);
      if ($urandom % 4 == 0) begin
        burst(8'h01);
        exp_alert = '0;
        check_alerts("random off");
      end else begin
        burst(IDS[u]);
        exp_alert[u] = 1'b1;
        check_alerts($sformatf("random call unit %0d", u));
      end
    end
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
