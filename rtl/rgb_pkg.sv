// rgb_pkg: constants and types shared by the RGB LED colour controller.
//
// Holds the ADXL362 SPI command bytes and register addresses used by the
// accelerometer interface, the word indices of its 4-to-1 word multiplexer,
// the state type of the colour-latch controller and the switch-selected
// brightness floors of the Map To Max stage. The floors (0x1000, 0x4000,
// 0x9000), the fixed x64 scale and the blue baseline of 150 are the design's
// published numbers; the ADXL362 command bytes and addresses come from the
// sensor's register map.
package rgb_pkg;

  // ADXL362 SPI commands
  localparam logic [7:0] ADXL_CMD_WRITE = 8'h0A;
  localparam logic [7:0] ADXL_CMD_READ  = 8'h0B;

  // ADXL362 registers
  localparam logic [7:0] ADXL_REG_XDATA_L  = 8'h0E;  // first of 8 data bytes X_L..T_H
  localparam logic [7:0] ADXL_REG_POWER_CTL = 8'h2D;
  localparam logic [7:0] ADXL_POWER_MEASURE = 8'h02; // measurement mode

  // Word indices of the 4-to-1 multiplexer inside the accelerometer interface
  typedef enum logic [1:0] {
    WORD_X = 2'b00,
    WORD_Y = 2'b01,
    WORD_Z = 2'b10,
    WORD_T = 2'b11
  } word_sel_e;

  // Colour-latch controller states
  typedef enum logic [1:0] {
    ST_S1 = 2'd0,   // latch X (red)
    ST_S2 = 2'd1,   // latch Y (green)
    ST_S3 = 2'd2    // latch temperature (blue)
  } rgb_state_e;

  // Brightness floors selected by a 3-bit switch group
  localparam logic [15:0] FLOOR_LOW  = 16'h1000;  // "001"
  localparam logic [15:0] FLOOR_MID  = 16'h4000;  // "010", "011"
  localparam logic [15:0] FLOOR_HIGH = 16'h9000;  // "1xx"

  localparam int unsigned MAP_SHIFT     = 6;      // x64 scaling
  localparam int          TEMP_BASELINE = 150;    // blue channel offset

endpackage
