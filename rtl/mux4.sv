// mux4: 4-to-1 word multiplexer.
//
// Selects one of the four 16-bit sensor words (0 = X, 1 = Y, 2 = Z,
// 3 = temperature) for the holding registers. The select comes from the
// colour-latch controller. Purely combinational.
module mux4 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [1:0]       sel,
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic [WIDTH-1:0] d2,
  input  logic [WIDTH-1:0] d3,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (sel)
      2'd0:    y = d0;
      2'd1:    y = d1;
      2'd2:    y = d2;
      default: y = d3;
    endcase
  end

endmodule
