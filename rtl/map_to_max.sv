// map_to_max: sensor word to PWM duty cycle for one colour channel.
//
// Combinational. The signed 16-bit sensor word has BASELINE subtracted and
// its absolute value taken, so tilt in either direction brightens the LED.
// The magnitude is multiplied by 2**SHIFT (64) and saturates at 0xFFFF
// instead of wrapping. A 3-bit switch group selects a brightness floor:
//   000 -> channel off (duty forced to 0, whatever the sensor says)
//   001 -> FLOOR_LOW  (0x1000)
//   01x -> FLOOR_MID  (0x4000)
//   1xx -> FLOOR_HIGH (0x9000)
// For any non-zero setting the duty is the larger of the floor and the
// scaled sensor value. Red and green use BASELINE = 0, blue (temperature)
// uses 150. All these numbers follow the design description. The
// subtraction and absolute value are done on 18 bits so that -32768 and
// word - 150 cannot overflow; that width is this implementation's choice.
//
// Ports: data[15:0] (two's complement), sw[2:0], duty[15:0].
module map_to_max
  import rgb_pkg::*;
#(
  parameter int          BASELINE   = 0,
  parameter int unsigned SHIFT      = MAP_SHIFT,
  parameter logic [15:0] FLOOR1     = FLOOR_LOW,
  parameter logic [15:0] FLOOR2     = FLOOR_MID,
  parameter logic [15:0] FLOOR4     = FLOOR_HIGH
) (
  input  logic [15:0] data,
  input  logic [2:0]  sw,
  output logic [15:0] duty
);

  localparam logic signed [17:0] BASE = 18'(BASELINE);

  logic signed [17:0] diff;
  logic        [17:0] mag;
  logic        [33:0] scaled;
  logic        [15:0] sat;
  logic        [15:0] floor_val;

  always_comb begin
    diff   = 18'(signed'(data)) - BASE;
    mag    = diff[17] ? 18'(-diff) : 18'(diff);
    scaled = 34'(mag) << SHIFT;
    sat    = (|scaled[33:16]) ? 16'hFFFF : scaled[15:0];

    if (sw[2])      floor_val = FLOOR4;
    else if (sw[1]) floor_val = FLOOR2;
    else if (sw[0]) floor_val = FLOOR1;
    else            floor_val = 16'h0000;

    if (sw == 3'b000)          duty = 16'h0000;
    else if (sat > floor_val)  duty = sat;
    else                       duty = floor_val;
  end

endmodule
