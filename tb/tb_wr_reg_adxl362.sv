// tb_wr_reg_adxl362: checks the SPI byte engine against the ADXL362 model.
// Writes POWER_CTL, writes and reads back scratch registers, then reads the
// data registers and compares the bytes with the words fed to the model.
// Also checks the start-to-done latency (49 half periods), the SCLK period
// (2 half periods) and the model's protocol-error counter.
module tb_wr_reg_adxl362;
  localparam int H = 4;
  logic       clk = 1'b0;
  logic       resetn, start, rw, done, busy, cs_n, mosi, miso, sclk;
  logic [7:0] addr, wdata, odata;
  logic [15:0] xv = 16'h1A2B, yv = 16'hFC18, zv = 16'h0400, tv = 16'h00D3;
  int n_writes, n_reads, n_errors;
  int checks = 0, failures = 0;
  int t_sclk_prev = -1, cyc = 0, sclk_period_bad = 0, sclk_periods = 0;
  logic sclk_d = 1'b0;

  wr_reg_adxl362 #(.HALF_PERIOD(H)) dut (
    .clk, .resetn, .start, .rw, .addr, .wdata, .odata, .done, .busy,
    .cs_n, .mosi, .miso, .sclk
  );

  adxl362_model u_adxl (
    .cs_n, .sclk, .mosi, .miso, .x_val(xv), .y_val(yv), .z_val(zv), .t_val(tv),
    .n_writes, .n_reads, .n_errors
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (sclk && !sclk_d) begin
      if (t_sclk_prev >= 0 && !cs_n && cyc - t_sclk_prev < 4 * H) begin
        sclk_periods++;
        if (cyc - t_sclk_prev != 2 * H) sclk_period_bad++;
      end
      t_sclk_prev = cyc;
    end
    sclk_d <= sclk;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic w, input logic [7:0] a, input logic [7:0] wd,
                      output logic [7:0] rd);
    int lat;
    @(negedge clk);
    start = 1'b1; rw = w; addr = a; wdata = wd;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0; rw = 1'b0; addr = 'x; wdata = 'x;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    rd = odata;
    checks++;
    if (lat != 49 * H) begin
      failures++;
      $display("latency %0d, expected %0d", lat, 49 * H);
    end
    while (busy) @(negedge clk);
  endtask

  task automatic expect_read(input logic [7:0] a, input logic [7:0] exp);
    logic [7:0] r;
    xfer(1'b0, a, 8'h00, r);
    checks++;
    if (r !== exp) begin
      failures++;
      $display("read %h: got %h expected %h", a, r, exp);
    end
  endtask

  initial begin
    logic [7:0] r;
    resetn = 1'b0; start = 1'b0; rw = 1'b0; addr = '0; wdata = '0;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (!cs_n || sclk || busy) begin failures++; $display("idle outputs wrong after reset"); end
    resetn = 1'b1;
    expect_read(8'h0E, 8'h00);             // standby: data reads zero
    xfer(1'b1, 8'h2D, 8'h02, r);           // measurement mode
    checks++;
    if (u_adxl.regs[6'h2D] !== 8'h02) begin failures++; $display("POWER_CTL not written"); end
    xfer(1'b1, 8'h20, 8'hA5, r);
    xfer(1'b1, 8'h21, 8'h5A, r);
    expect_read(8'h20, 8'hA5);
    expect_read(8'h21, 8'h5A);
    expect_read(8'h0E, xv[7:0]);  expect_read(8'h0F, xv[15:8]);
    expect_read(8'h10, yv[7:0]);  expect_read(8'h11, yv[15:8]);
    expect_read(8'h12, zv[7:0]);  expect_read(8'h13, zv[15:8]);
    expect_read(8'h14, tv[7:0]);  expect_read(8'h15, tv[15:8]);
    for (int n = 0; n < 8; n++) begin
      logic [7:0] v;
      v = 8'($urandom);
      xfer(1'b1, 8'h22, v, r);
      expect_read(8'h22, v);
    end
    checks++;
    if (n_errors != 0) begin failures++; $display("%0d SPI protocol errors", n_errors); end
    checks++;
    if (n_writes != 11) begin failures++; $display("%0d writes seen, expected 11", n_writes); end
    checks++;
    if (sclk_periods == 0 || sclk_period_bad != 0) begin
      failures++; $display("SCLK periods: %0d bad of %0d", sclk_period_bad, sclk_periods);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
