// decoder_3to8: 3-to-8 one-hot decoder with enable.
//
// Inside the accelerometer interface it picks which of the eight byte
// registers (X_L, X_H, Y_L, Y_H, Z_L, Z_H, T_L, T_H) stores the byte that the
// SPI engine has just read: output y[i] is high when en is high and the index
// equals i; all outputs are low when en is low. Purely combinational.
module decoder_3to8 (
  input  logic [2:0] i,
  input  logic       en,
  output logic [7:0] y
);

  always_comb begin
    y = '0;
    if (en) y[i] = 1'b1;
  end

endmodule
