// accelerom: ADXL362 accelerometer interface.
//
// The sequencer (fsm_emb) and the SPI byte engine (wr_reg_adxl362) put the
// sensor in measurement mode and then read its eight data bytes in a loop.
// Each byte read is stored by a 3-to-8 decoder into one of eight 8-bit
// holding registers: X_L, X_H, Y_L, Y_H, Z_L, Z_H, T_L, T_H (decoder outputs
// 0..7). The four 16-bit words {H, L} feed a 4-to-1 multiplexer whose select
// comes from outside (the colour-latch controller): 0 = X, 1 = Y, 2 = Z,
// 3 = temperature. This structure follows the block diagram of the design.
//
// Ports: clk, resetn (sync, active low), mux_sel[1:0], odata[15:0] (the
// selected word, combinational from mux_sel), and the SPI pins cs_n, mosi,
// miso, sclk. Timing: a word changes one byte at a time, each byte one SPI
// transaction (about 50 * HALF_PERIOD clocks) after the previous one.
module accelerom #(
  parameter int unsigned HALF_PERIOD = 50
) (
  input  logic        clk,
  input  logic        resetn,
  input  logic [1:0]  mux_sel,
  output logic [15:0] odata,
  output logic        cs_n,
  output logic        mosi,
  input  logic        miso,
  output logic        sclk
);

  logic       start, rw, done, busy, e_i;
  logic [7:0] addr, wdata, spi_data;
  logic [2:0] idx;
  logic [7:0] y_i;
  logic [7:0] bytes [8];

  fsm_emb u_fsm_emb (
    .clk, .resetn, .done, .busy, .start, .rw, .addr, .wdata, .e_i, .idx
  );

  wr_reg_adxl362 #(.HALF_PERIOD(HALF_PERIOD)) u_spi (
    .clk, .resetn, .start, .rw, .addr, .wdata,
    .odata(spi_data), .done, .busy, .cs_n, .mosi, .miso, .sclk
  );

  decoder_3to8 u_dec (.i(idx), .en(e_i), .y(y_i));

  for (genvar k = 0; k < 8; k++) begin : g_byte
    hold_reg #(.WIDTH(8)) u_byte (
      .clk, .resetn, .en(y_i[k]), .d(spi_data), .q(bytes[k])
    );
  end

  mux4 #(.WIDTH(16)) u_mux (
    .sel(mux_sel),
    .d0({bytes[1], bytes[0]}),
    .d1({bytes[3], bytes[2]}),
    .d2({bytes[5], bytes[4]}),
    .d3({bytes[7], bytes[6]}),
    .y(odata)
  );

endmodule
