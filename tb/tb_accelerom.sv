// tb_accelerom: checks the accelerometer interface against the ADXL362 model.
// Sets X, Y, Z and temperature words, waits for the interface to have read
// all eight bytes, and checks each word through the 4-to-1 multiplexer.
// Then changes the words and checks again. Also checks the SPI protocol and
// that the interface first put the sensor in measurement mode.
module tb_accelerom;
  localparam int H = 2;
  logic        clk = 1'b0;
  logic        resetn, cs_n, mosi, miso, sclk;
  logic [1:0]  mux_sel;
  logic [15:0] odata;
  logic [15:0] w [4];
  int n_writes, n_reads, n_errors;
  int checks = 0, failures = 0;

  accelerom #(.HALF_PERIOD(H)) dut (
    .clk, .resetn, .mux_sel, .odata, .cs_n, .mosi, .miso, .sclk
  );

  adxl362_model u_adxl (
    .cs_n, .sclk, .mosi, .miso, .x_val(w[0]), .y_val(w[1]), .z_val(w[2]), .t_val(w[3]),
    .n_writes, .n_reads, .n_errors
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_words();
    int r0;
    r0 = n_reads;
    wait (n_reads >= r0 + 17);        // two full rounds of eight bytes
    for (int s = 0; s < 4; s++) begin
      mux_sel = 2'(s);
      #1;
      checks++;
      if (odata !== w[s]) begin
        failures++;
        $display("word %0d: %h expected %h", s, odata, w[s]);
      end
    end
  endtask

  initial begin
    resetn = 1'b0; mux_sel = 2'b00;
    w = '{16'h1A2B, 16'h3C4D, 16'hFF9C, 16'h00E6};
    repeat (3) @(posedge clk);
    resetn = 1'b1;
    check_words();
    checks++;
    if (n_writes != 1 || u_adxl.regs[6'h2D] !== 8'h02) begin
      failures++; $display("measurement mode not set (%0d writes)", n_writes);
    end
    for (int n = 0; n < 4; n++) begin
      foreach (w[k]) w[k] = 16'($urandom);
      check_words();
    end
    checks++;
    if (n_errors != 0) begin failures++; $display("%0d SPI protocol errors", n_errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
