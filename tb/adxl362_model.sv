// adxl362_model: behavioural model of the ADXL362 accelerometer's SPI port
// (simulation only, not synthesizable).
//
// SPI mode 0, MSB first. A transaction starts when cs_n falls: the first
// byte is the command (0x0A write, 0x0B read), the second the register
// address, and each further byte is written to, or read from, the addressed
// register, the address incrementing after every data byte. MISO changes
// after falling SCLK edges and is 0 outside read data.
// The data registers XDATA_L..TEMP_H (0x0E..0x15) return the x/y/z/t input
// words, low byte first, but only once POWER_CTL (0x2D) holds measurement
// mode (bits 1:0 = 10); before that they read as zero, as the part does in
// standby. Other registers are plain storage. Counters of completed writes
// and reads and a protocol-error counter are exposed for testbenches.
module adxl362_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        mosi,
  output logic        miso,
  input  logic [15:0] x_val,
  input  logic [15:0] y_val,
  input  logic [15:0] z_val,
  input  logic [15:0] t_val,
  output int          n_writes,
  output int          n_reads,
  output int          n_errors
);

  logic [7:0] regs [64];
  logic [7:0] sr_in, sr_out, cmd, addr;
  int         bitcnt;

  function automatic logic [7:0] rd(input logic [7:0] a);
    logic [15:0] w;
    if (a >= 8'h0E && a <= 8'h15) begin
      if (regs[8'h2D][1:0] != 2'b10) return 8'h00;
      unique case ((a - 8'h0E) >> 1)
        0: w = x_val;
        1: w = y_val;
        2: w = z_val;
        default: w = t_val;
      endcase
      return a[0] ? w[15:8] : w[7:0];  // even address: low byte
    end
    return regs[a[5:0]];
  endfunction

  initial begin
    foreach (regs[k]) regs[k] = 8'h00;
    miso = 1'b0; bitcnt = 0; n_writes = 0; n_reads = 0; n_errors = 0;
    sr_in = '0; sr_out = '0; cmd = '0; addr = '0;
  end

  always @(negedge cs_n) begin
    bitcnt = 0;
    if (sclk) n_errors++;     // mode 0: SCLK must idle low
  end

  always @(posedge cs_n) begin
    miso = 1'b0;
    if (bitcnt % 8 != 0 || bitcnt < 24) n_errors++;  // incomplete transaction
  end

  always @(posedge sclk) if (!cs_n) begin
    sr_in = {sr_in[6:0], mosi};
    bitcnt++;
    if (bitcnt % 8 == 0) begin
      if (bitcnt == 8) begin
        cmd = sr_in;
        if (cmd != 8'h0A && cmd != 8'h0B) n_errors++;
      end else if (bitcnt == 16) begin
        addr = sr_in;
      end else begin
        if (cmd == 8'h0A) begin
          regs[addr[5:0]] = sr_in;
          n_writes++;
        end else begin
          n_reads++;
        end
        addr = addr + 1'b1;
      end
    end
  end

  always @(negedge sclk) if (!cs_n) begin
    if (cmd == 8'h0B && bitcnt >= 16) begin
      if (bitcnt % 8 == 0) sr_out = rd(addr);
      else                 sr_out = {sr_out[6:0], 1'b0};
      miso = sr_out[7];
    end else begin
      miso = 1'b0;
    end
  end

endmodule
