// tb_wm8731_config: an I2C slave model acknowledges and records every byte
// written between START and STOP. Checks the 11 transfers (device address
// 0x34 and the codec register words of the intended settings, in order),
// the SCL period (4 quarter periods of 4 clocks here), that `done` rises
// after exactly 11 x 116 quarter periods, and, after a second reset with the
// slave silent, that a missing acknowledge sets ack_error.
module tb_wm8731_config;
  localparam int Q = 4;   // clocks per quarter SCL period at these settings

  logic clk = 0, reset = 1, i2c_sclk, sda_drive_low, done, ack_error;
  logic slave_low = 0, ack_on = 1;
  logic sda_in;
  int checks = 0, failures = 0;

  assign sda_in = !(sda_drive_low || slave_low);

  wm8731_config #(.CLK_HZ(1_600_000), .I2C_HZ(100_000)) dut (
    .clk, .reset, .i2c_sclk, .sda_drive_low, .sda_in, .done, .ack_error);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Slave model.
  logic        scl_q = 1, sda_q = 1, in_xfer = 0;
  int          nbit = 0;
  logic [7:0]  cur;
  logic [7:0]  bytes [$];
  logic [23:0] xfers [$];
  int          last_rise = -1, period_bad = 0, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    scl_q <= i2c_sclk;
    sda_q <= sda_in;
    if (scl_q && i2c_sclk && sda_q && !sda_in) begin          // START
      in_xfer <= 1; nbit = 0; bytes.delete();
    end else if (scl_q && i2c_sclk && !sda_q && sda_in) begin // STOP
      in_xfer <= 0;
      if (bytes.size() == 3) xfers.push_back({bytes[0], bytes[1], bytes[2]});
      else xfers.push_back(24'hFFFFFF);
    end else if (in_xfer && !scl_q && i2c_sclk) begin         // SCL rises
      if (last_rise >= 0 && cyc - last_rise != 4 * Q) period_bad++;
      last_rise = cyc;
      if (nbit < 8) cur[7 - nbit] = sda_in;
      nbit = nbit + 1;
      if (nbit == 8) bytes.push_back(cur);
    end else if (in_xfer && scl_q && !i2c_sclk) begin         // SCL falls
      if (nbit == 8) slave_low <= ack_on;                      // acknowledge
      if (nbit == 9) begin slave_low <= 0; nbit = 0; end
    end
    if (!in_xfer) last_rise = -1;
  end

  localparam logic [15:0] EXP [11] = '{16'h1E00, 16'h0017, 16'h0217, 16'h0479,
    16'h0679, 16'h081C, 16'h0A00, 16'h0C00, 16'h0E41, 16'h1000, 16'h1201};

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int t0, bad;
    repeat (3) @(posedge clk);
    reset = 0;
    t0 = cyc;
    wait (done);
    expect_true($sformatf("done after %0d clocks", cyc - t0),
                (cyc - t0) >= 11 * 116 * Q - 2 && (cyc - t0) <= 11 * 116 * Q + 2);
    repeat (20) @(posedge clk);
    expect_true($sformatf("11 transfers (%0d)", xfers.size()), xfers.size() == 11);
    bad = 0;
    for (int i = 0; i < 11 && i < xfers.size(); i++)
      if (xfers[i] !== {8'h34, EXP[i]}) begin
        bad++;
        $display("transfer %0d: %h expected %h", i, xfers[i], {8'h34, EXP[i]});
      end
    expect_true("transfer contents", bad == 0);
    expect_true($sformatf("SCL period (%0d bad)", period_bad), period_bad == 0);
    expect_true("acknowledged", !ack_error);

    // Silent slave.
    ack_on = 0;
    reset = 1;
    repeat (3) @(posedge clk);
    reset = 0;
    wait (done);
    expect_true("ack_error without acknowledge", ack_error);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
