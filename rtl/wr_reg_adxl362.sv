// wr_reg_adxl362: SPI byte-level engine for the ADXL362 accelerometer.
//
// One start pulse runs one three-byte SPI transaction with chip select held
// low: a command byte (0x0A write, 0x0B read), the register address, then a
// data byte. For a write the data byte is wdata; for a read the byte shifted
// in on MISO during the third byte is returned on odata. done pulses for one
// clock when the transaction has ended and odata is valid; odata then holds
// until the next read finishes. busy is high from start to the end of the
// gap that follows chip-select release.
//
// SPI mode 0, MSB first: SCLK idles low, MOSI changes after a falling edge
// and MISO is sampled on the rising edge. Each SCLK half period lasts
// HALF_PERIOD clocks (50 -> 1 MHz SCLK from a 100 MHz clock); chip select
// is asserted one half period before the first edge, released one half
// period after the last one, and stays high for one more half period before
// the next transaction may start. The design description gives only the
// engine's role (drive CS, MOSI, SCLK, read MISO, output an 8-bit byte); the
// command bytes and mode follow the ADXL362 protocol, and the timing values
// are this implementation's choice.
//
// Ports: clk, resetn (sync, active low), start, rw (1 = write), addr[7:0],
// wdata[7:0], odata[7:0], done, busy, cs_n, mosi, miso, sclk.
// Timing: done rises 49 * HALF_PERIOD clocks after the edge that samples
// start; busy falls HALF_PERIOD clocks later. SCLK period is 2 * HALF_PERIOD.
module wr_reg_adxl362
  import rgb_pkg::*;
#(
  parameter int unsigned HALF_PERIOD = 50
) (
  input  logic       clk,
  input  logic       resetn,
  input  logic       start,
  input  logic       rw,
  input  logic [7:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] odata,
  output logic       done,
  output logic       busy,
  output logic       cs_n,
  output logic       mosi,
  input  logic       miso,
  output logic       sclk
);

  typedef enum logic [2:0] {
    SPI_IDLE, SPI_LOW, SPI_HIGH, SPI_HOLD, SPI_GAP
  } spi_state_e;

  localparam int unsigned CW = $clog2(HALF_PERIOD + 1);

  spi_state_e      state;
  logic [CW-1:0]   cnt;
  logic [4:0]      bitcnt;
  logic [23:0]     tx;
  logic [7:0]      rx;
  logic            half_done;

  assign half_done = (cnt == CW'(HALF_PERIOD - 1));
  assign busy      = (state != SPI_IDLE);
  assign mosi      = tx[23];

  always_ff @(posedge clk) begin
    if (!resetn) begin
      state  <= SPI_IDLE;
      cnt    <= '0;
      bitcnt <= '0;
      tx     <= '0;
      rx     <= '0;
      odata  <= '0;
      done   <= 1'b0;
      cs_n   <= 1'b1;
      sclk   <= 1'b0;
    end else begin
      done <= 1'b0;
      cnt  <= half_done ? '0 : cnt + 1'b1;
      unique case (state)
        SPI_IDLE: begin
          cnt <= '0;
          if (start) begin
            tx     <= {(rw ? ADXL_CMD_WRITE : ADXL_CMD_READ), addr, (rw ? wdata : 8'h00)};
            bitcnt <= '0;
            cs_n   <= 1'b0;
            state  <= SPI_LOW;
          end
        end
        SPI_LOW: if (half_done) begin
          sclk  <= 1'b1;
          rx    <= {rx[6:0], miso};
          state <= SPI_HIGH;
        end
        SPI_HIGH: if (half_done) begin
          sclk <= 1'b0;
          if (bitcnt == 5'd23) begin
            state <= SPI_HOLD;
          end else begin
            bitcnt <= bitcnt + 1'b1;
            tx     <= {tx[22:0], 1'b0};
            state  <= SPI_LOW;
          end
        end
        SPI_HOLD: if (half_done) begin
          cs_n  <= 1'b1;
          odata <= rx;
          done  <= 1'b1;
          state <= SPI_GAP;
        end
        SPI_GAP: if (half_done) state <= SPI_IDLE;
        default: state <= SPI_IDLE;
      endcase
    end
  end

  // SCLK only toggles while the device is selected.
  a_sclk_cs: assert property (@(posedge clk) disable iff (!resetn) sclk |-> !cs_n);

endmodule
