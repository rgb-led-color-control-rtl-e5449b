// tb_mypwm: checks the PWM generator at its full 65535-clock period.
// For several duty values it measures, over a whole period, the number of
// high clocks (must equal the duty, or 65535 for 0xFFFF) and the distance
// between rising edges (must equal the 65535-clock period).
module tb_mypwm;
  logic        clk = 1'b0;
  logic        resetn;
  logic [15:0] duty;
  logic        pwm_out;
  int checks = 0, failures = 0;
  localparam int PERIOD = 65535;

  mypwm dut (.clk, .resetn, .duty, .pwm_out);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int duties[] = '{0, 1, 4096, 16384, 36864, 65534, 65535, 12345};
    int high, t_rise0, t_rise1, t;
    logic prev;
    resetn = 1'b0; duty = '0;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (pwm_out !== 1'b0) begin failures++; $display("output high in reset"); end
    resetn = 1'b1;
    foreach (duties[k]) begin
      duty = 16'(duties[k]);
      repeat (PERIOD) @(posedge clk);        // settle one full period
      high = 0; t_rise0 = -1; t_rise1 = -1; prev = pwm_out;
      for (t = 0; t < 2 * PERIOD + 4; t++) begin
        @(posedge clk); #1;
        if (t < PERIOD && pwm_out) high++;
        if (pwm_out && !prev) begin
          if (t_rise0 < 0) t_rise0 = t;
          else if (t_rise1 < 0) t_rise1 = t;
        end
        prev = pwm_out;
      end
      checks++;
      if (high != duties[k]) begin
        failures++;
        $display("duty %0d: %0d high clocks per period", duties[k], high);
      end
      if (duties[k] > 0 && duties[k] < PERIOD) begin
        checks++;
        if (t_rise1 - t_rise0 != PERIOD) begin
          failures++;
          $display("duty %0d: rising edges %0d apart", duties[k], t_rise1 - t_rise0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
