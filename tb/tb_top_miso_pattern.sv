// tb_top_miso_pattern: end-to-end run of the RGB controller, at its default
// parameters, with the sensor replaced by a fixed MISO bit pattern.
//
// MISO plays the 32-bit pattern 0x1A2B3C4D over and over, MSB first,
// advancing one bit on every falling SCLK edge while chip select is low, so
// every register read returns a distinct, non-zero byte. An independent SPI
// observer decodes each transaction from the pins (command and address from
// MOSI, data from MISO on rising SCLK edges) and keeps the last byte read
// from each of the registers 0x0E..0x15. Since one read round is 8 x 24 =
// 192 bits, six whole patterns, every round returns the same bytes. Once two
// rounds have been read, the X, Y and temperature holding registers must
// equal the observed words, and for two switch settings the high clocks
// per PWM period of each LED must equal the duty computed from those words.
module tb_top_miso_pattern;
  localparam int PERIOD = 65535;
  localparam logic [31:0] PATTERN = 32'h1A2B3C4D;

  logic        clk = 1'b0;
  logic        resetn;
  logic [8:0]  sw;
  logic        acl_csn, acl_mosi, acl_miso, acl_sclk;
  logic        led16_r, led16_g, led16_b;
  int checks = 0, failures = 0;

  top_rgb_ctrl dut (
    .clk, .resetn, .sw, .acl_csn, .acl_mosi, .acl_miso, .acl_sclk,
    .led16_r, .led16_g, .led16_b
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // MISO pattern source
  int pbit = 0;
  assign acl_miso = PATTERN[31 - (pbit % 32)];
  always @(negedge acl_sclk) if (!acl_csn) pbit++;

  // SPI observer
  int         obs_bits;
  logic [7:0] obs_cmd, obs_addr, obs_data;
  logic [7:0] seen [8];
  int         n_rd = 0;
  always @(negedge acl_csn) obs_bits = 0;
  always @(posedge acl_sclk) if (!acl_csn) begin
    if (obs_bits < 8)       obs_cmd  = {obs_cmd[6:0], acl_mosi};
    else if (obs_bits < 16) obs_addr = {obs_addr[6:0], acl_mosi};
    else                    obs_data = {obs_data[6:0], acl_miso};
    obs_bits++;
  end
  always @(posedge acl_csn) begin
    if (obs_cmd == 8'h0B && obs_bits == 24 && obs_addr >= 8'h0E && obs_addr <= 8'h15) begin
      seen[obs_addr - 8'h0E] = obs_data;
      n_rd++;
    end
  end

  function automatic int ref_duty(input int word, input int base, input int s);
    int m, fl;
    if (s == 0) return 0;
    m = word - base;
    if (m < 0) m = -m;
    m = m * 64;
    if (m > 65535) m = 65535;
    fl = (s >= 4) ? 36864 : (s >= 2) ? 16384 : 4096;
    return (m > fl) ? m : fl;
  endfunction

  initial begin
    logic signed [15:0] xw, yw, tw;
    logic [8:0] settings [2];
    int hr, hg, hb;
    settings = '{9'b001_010_100, 9'b000_111_011};
    resetn = 1'b0; sw = '0;
    foreach (seen[k]) seen[k] = '0;
    repeat (10) @(posedge clk);   // 100 ns of reset
    resetn = 1'b1;
    wait (n_rd >= 16);
    repeat (30) @(posedge clk);
    xw = {seen[1], seen[0]};
    yw = {seen[3], seen[2]};
    tw = {seen[7], seen[6]};
    $display("observed words: X=%h Y=%h T=%h", xw, yw, tw);
    checks += 4;
    if (xw == 0 || yw == 0 || tw == 0) begin failures++; $display("pattern gave a zero word"); end
    if (dut.reg_x !== xw) begin failures++; $display("reg_x=%h expected %h", dut.reg_x, xw); end
    if (dut.reg_y !== yw) begin failures++; $display("reg_y=%h expected %h", dut.reg_y, yw); end
    if (dut.reg_t !== tw) begin failures++; $display("reg_t=%h expected %h", dut.reg_t, tw); end
    foreach (settings[k]) begin
      sw = settings[k];
      repeat (PERIOD + 2) @(posedge clk);
      hr = 0; hg = 0; hb = 0;
      for (int c = 0; c < PERIOD; c++) begin
        @(posedge clk); #1;
        hr += int'(led16_r); hg += int'(led16_g); hb += int'(led16_b);
      end
      checks += 3;
      if (hr != ref_duty(int'(xw), 0, int'(sw[2:0]))) begin
        failures++; $display("red %0d expected %0d", hr, ref_duty(int'(xw), 0, int'(sw[2:0])));
      end
      if (hg != ref_duty(int'(yw), 0, int'(sw[5:3]))) begin
        failures++; $display("green %0d expected %0d", hg, ref_duty(int'(yw), 0, int'(sw[5:3])));
      end
      if (hb != ref_duty(int'(tw), 150, int'(sw[8:6]))) begin
        failures++; $display("blue %0d expected %0d", hb, ref_duty(int'(tw), 150, int'(sw[8:6])));
      end
      $display("sw=%b: duty r=%0d g=%0d b=%0d", sw, hr, hg, hb);
      checks++;
      if (dut.reg_x !== xw || dut.reg_y !== yw || dut.reg_t !== tw) begin
        failures++; $display("holding registers changed between identical rounds");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
