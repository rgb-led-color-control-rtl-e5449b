// tb_top_rgb_ctrl: end-to-end test of the RGB colour controller at its
// default parameters (1 MHz SPI clock, 65535-clock PWM period, 100 MHz clk).
//
// An ADXL362 model supplies X, Y and temperature words. For each scenario
// the testbench sets the words and the nine switches, waits until the
// holding registers show the new words, lets one PWM period pass and then
// counts the high clocks of each LED output over one full period. That
// count must equal the duty worked out here from the words and switches
// (off for switch group 000, else the larger of the floor and
// min(|word - baseline| * 64, 0xFFFF), baseline 150 for blue).
// It also counts how often each mechanism of the design was exercised and
// fails if one never was: the sensor power-up write, the three controller
// states with their selects (11 for temperature), a channel switched off,
// each of the three floors winning, the scaled sensor value winning,
// saturation, a negative tilt, the temperature baseline, and the PWM period.
module tb_top_rgb_ctrl;
  import rgb_pkg::*;
  localparam int PERIOD = 65535;

  logic        clk = 1'b0;
  logic        resetn;
  logic [8:0]  sw;
  logic        acl_csn, acl_mosi, acl_miso, acl_sclk;
  logic        led16_r, led16_g, led16_b;
  logic [15:0] xv, yv, zv, tv;
  int n_writes, n_reads, n_errors;
  int checks = 0, failures = 0;

  // mechanism counters
  int m_s1, m_s2, m_s3, m_off, m_floor_low, m_floor_mid, m_floor_high,
      m_sensor_wins, m_saturate, m_negative, m_baseline, m_period;

  top_rgb_ctrl dut (
    .clk, .resetn, .sw, .acl_csn, .acl_mosi, .acl_miso, .acl_sclk,
    .led16_r, .led16_g, .led16_b
  );

  adxl362_model u_adxl (
    .cs_n(acl_csn), .sclk(acl_sclk), .mosi(acl_mosi), .miso(acl_miso),
    .x_val(xv), .y_val(yv), .z_val(zv), .t_val(tv),
    .n_writes, .n_reads, .n_errors
  );

  always #5 clk = ~clk;   // 100 MHz

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Controller observation: state order, selects and enables every clock.
  rgb_state_e prev_state;
  logic       seen_state = 1'b0;
  always @(posedge clk) if (resetn) begin
    #1;
    unique case (dut.state)
      ST_S1: begin
        m_s1++;
        if (dut.mux_sel != 2'b00 || !dut.en_x || dut.en_y || dut.en_t) begin
          failures++; $display("S1 outputs wrong");
        end
      end
      ST_S2: begin
        m_s2++;
        if (dut.mux_sel != 2'b01 || !dut.en_y || dut.en_x || dut.en_t) begin
          failures++; $display("S2 outputs wrong");
        end
      end
      ST_S3: begin
        m_s3++;
        if (dut.mux_sel != 2'b11 || !dut.en_t || dut.en_x || dut.en_y) begin
          failures++; $display("S3 outputs wrong");
        end
      end
      default: begin failures++; $display("illegal state"); end
    endcase
    if (seen_state) begin
      if (!((prev_state == ST_S1 && dut.state == ST_S2) ||
            (prev_state == ST_S2 && dut.state == ST_S3) ||
            (prev_state == ST_S3 && dut.state == ST_S1))) begin
        failures++; $display("bad transition %s -> %s", prev_state.name(), dut.state.name());
      end
    end
    prev_state = dut.state;
    seen_state = 1'b1;
  end

  function automatic int floor_of(input int s);
    return (s >= 4) ? 36864 : (s >= 2) ? 16384 : (s >= 1) ? 4096 : 0;
  endfunction

  function automatic int scaled_of(input int word, input int base);
    int m;
    m = word - base;
    if (m < 0) m = -m;
    m = m * 64;
    return (m > 65535) ? 65535 : m;
  endfunction

  function automatic int ref_duty(input int word, input int base, input int s);
    int m;
    if (s == 0) return 0;
    m = scaled_of(word, base);
    return (m > floor_of(s)) ? m : floor_of(s);
  endfunction

  task automatic note_mechanisms(input int word, input int base, input int s);
    int m;
    m = scaled_of(word, base);
    if (s == 0) m_off++;
    else if (m > floor_of(s)) m_sensor_wins++;
    else if (s >= 4) m_floor_high++;
    else if (s >= 2) m_floor_mid++;
    else m_floor_low++;
    if (m == 65535) m_saturate++;
    if (word < 0) m_negative++;
    if (base != 0 && word < base && word > 0) m_baseline++;
  endtask

  task automatic run_scenario(input int x, input int y, input int t, input logic [8:0] s);
    int hr, hg, hb, er, eg, eb, wait_cycles;
    int rise0, rise1;
    logic prev_r;
    xv = 16'(x); yv = 16'(y); tv = 16'(t); zv = 16'h7FFF; sw = s;
    wait_cycles = 0;
    while (!(dut.reg_x == xv && dut.reg_y == yv && dut.reg_t == tv)) begin
      @(posedge clk);
      wait_cycles++;
      if (wait_cycles > 200_000) break;
    end
    checks++;
    if (wait_cycles > 200_000) begin
      failures++;
      $display("holding registers x=%h y=%h t=%h never reached %h %h %h",
               dut.reg_x, dut.reg_y, dut.reg_t, xv, yv, tv);
    end
    repeat (PERIOD + 2) @(posedge clk);
    hr = 0; hg = 0; hb = 0; rise0 = -1; rise1 = -1; prev_r = led16_r;
    for (int c = 0; c < PERIOD; c++) begin
      @(posedge clk); #1;
      hr += int'(led16_r); hg += int'(led16_g); hb += int'(led16_b);
      if (led16_r && !prev_r) begin
        if (rise0 < 0) rise0 = c; else rise1 = c;
      end
      prev_r = led16_r;
    end
    er = ref_duty(x, 0, int'(s[2:0]));
    eg = ref_duty(y, 0, int'(s[5:3]));
    eb = ref_duty(t, 150, int'(s[8:6]));
    checks += 3;
    if (hr != er) begin failures++; $display("red: %0d high clocks, expected %0d", hr, er); end
    if (hg != eg) begin failures++; $display("green: %0d high clocks, expected %0d", hg, eg); end
    if (hb != eb) begin failures++; $display("blue: %0d high clocks, expected %0d", hb, eb); end
    note_mechanisms(x, 0, int'(s[2:0]));
    note_mechanisms(y, 0, int'(s[5:3]));
    note_mechanisms(t, 150, int'(s[8:6]));
    // PWM period: a second rising edge of red needs one more period
    if (er > 0 && er < PERIOD) begin
      for (int c = PERIOD; c < 2 * PERIOD + 2 && rise1 < 0; c++) begin
        @(posedge clk); #1;
        if (led16_r && !prev_r) begin
          if (rise0 < 0) rise0 = c; else rise1 = c;
        end
        prev_r = led16_r;
      end
      checks++;
      if (rise1 - rise0 != PERIOD) begin
        failures++; $display("red PWM period %0d, expected %0d", rise1 - rise0, PERIOD);
      end else m_period++;
    end
    $display("scenario x=%0d y=%0d t=%0d sw=%b: duty r=%0d g=%0d b=%0d",
             x, y, t, s, hr, hg, hb);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
  endtask

  initial begin
    resetn = 1'b0; sw = '0; xv = '0; yv = '0; zv = '0; tv = '0;
    repeat (10) @(posedge clk);   // 100 ns of reset
    #1 checks++;
    if (led16_r || led16_g || led16_b || !acl_csn) begin
      failures++; $display("outputs active during reset");
    end
    resetn = 1'b1;
    //            x      y     t     sw = {blue, green, red}
    run_scenario( 100,  -300, 160, {3'b100, 3'b000, 3'b001});
    run_scenario(-2000,    5, 100, {3'b001, 3'b010, 3'b111});
    run_scenario(    0,  700, 400, {3'b001, 3'b101, 3'b011});
    run_scenario(   -7,  -64, 150, {3'b111, 3'b111, 3'b111});
    run_scenario( 1500,    0, 1500, {3'b000, 3'b001, 3'b000});
    checks++;
    if (n_writes != 1 || u_adxl.regs[6'h2D] !== 8'h02) begin
      failures++; $display("sensor power-up write missing (%0d writes)", n_writes);
    end
    checks++;
    if (n_errors != 0) begin failures++; $display("%0d SPI protocol errors", n_errors); end
    need("state S1 / en_x", m_s1);
    need("state S2 / en_y", m_s2);
    need("state S3 / en_t, select 11", m_s3);
    need("channel off (switch 000)", m_off);
    need("floor 0x1000 wins", m_floor_low);
    need("floor 0x4000 wins", m_floor_mid);
    need("floor 0x9000 wins", m_floor_high);
    need("scaled sensor wins", m_sensor_wins);
    need("saturation at 0xFFFF", m_saturate);
    need("negative tilt (absolute value)", m_negative);
    need("temperature below baseline 150", m_baseline);
    need("PWM period of 65535 clocks", m_period);
    $display("mechanisms: S1=%0d S2=%0d S3=%0d off=%0d floorL=%0d floorM=%0d floorH=%0d sensor=%0d sat=%0d neg=%0d base=%0d period=%0d",
             m_s1, m_s2, m_s3, m_off, m_floor_low, m_floor_mid, m_floor_high,
             m_sensor_wins, m_saturate, m_negative, m_baseline, m_period);
    $display("SPI: %0d reads, %0d writes", n_reads, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
