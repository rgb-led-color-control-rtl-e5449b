// mypwm: fixed-period pulse-width modulator.
//
// A counter runs from 0 to PERIOD-1 and wraps, so the period is PERIOD
// clocks (65535 by default, as in the design description). The output is
// high while the count is below the duty input, giving duty high clocks per
// period: duty 0 keeps the LED off and 0xFFFF keeps it on all the time.
// The duty input is compared every clock, not sampled once per period, and
// the output is registered (one clock after the counter); both are this
// implementation's choices. Reset is synchronous and active low and clears
// the counter and the output.
//
// Ports: clk, resetn, duty[WIDTH], pwm_out.
module mypwm #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned PERIOD = 65535
) (
  input  logic             clk,
  input  logic             resetn,
  input  logic [WIDTH-1:0] duty,
  output logic             pwm_out
);

  logic [WIDTH-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!resetn) begin
      cnt     <= '0;
      pwm_out <= 1'b0;
    end else begin
      if (cnt == WIDTH'(PERIOD - 1)) cnt <= '0;
      else                           cnt <= cnt + 1'b1;
      pwm_out <= (cnt < duty);
    end
  end

endmodule
