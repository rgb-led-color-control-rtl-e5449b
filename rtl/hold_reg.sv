// hold_reg: enabled D flip-flop bank (holding register).
//
// On a rising clock edge q takes d when en is high and keeps its value
// otherwise, so a word read once stays stable until the next enabled write.
// The 16-bit instances are the X, Y and temperature holding registers that
// keep the PWM duty constant between sensor reads; 8-bit instances are the
// byte registers inside the accelerometer interface. The reset is synchronous
// and active low, as the control logic of the design uses; clearing to zero on
// reset is this implementation's choice.
//
// Ports: clk, resetn (sync, active low), en, d[WIDTH], q[WIDTH].
// Timing: one cycle from en/d to q.
module hold_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             resetn,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!resetn)  q <= '0;
    else if (en)  q <= d;
  end

endmodule
