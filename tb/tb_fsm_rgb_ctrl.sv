// tb_fsm_rgb_ctrl: checks the colour-latch controller.
// After reset the machine must be in S1 (select 00, en_x) and then step
// S1 -> S2 -> S3 -> S1 one state per clock, with select 00/01/11 and exactly
// the matching enable; each enable must recur every 3 clocks. A reset in the
// middle of the cycle must bring it back to S1.
module tb_fsm_rgb_ctrl;
  import rgb_pkg::*;
  logic       clk = 1'b0;
  logic       resetn;
  logic [1:0] mux_sel;
  logic       en_x, en_y, en_t;
  rgb_state_e state;
  int checks = 0, failures = 0;
  int phase;
  int last_en_x, n_cycles;

  fsm_rgb_ctrl dut (.clk, .resetn, .mux_sel, .en_x, .en_y, .en_t, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_phase(input int p);
    logic [1:0] s_exp;
    logic [2:0] en_exp;
    s_exp  = (p == 0) ? 2'b00 : (p == 1) ? 2'b01 : 2'b11;
    en_exp = 3'b001 << p;          // {en_t, en_y, en_x}
    checks++;
    if (mux_sel !== s_exp || {en_t, en_y, en_x} !== en_exp) begin
      failures++;
      $display("%0t phase %0d: sel=%b en_t/y/x=%b%b%b", $time, p, mux_sel, en_t, en_y, en_x);
    end
  endtask

  initial begin
    resetn = 1'b0;
    repeat (3) @(posedge clk);
    #1 expect_phase(0);            // held in S1 during reset
    resetn = 1'b1;
    phase = 0; last_en_x = -1; n_cycles = 0;
    for (int n = 0; n < 300; n++) begin
      #1 expect_phase(phase);
      if (en_x) begin
        if (last_en_x >= 0) begin
          checks++;
          if (n - last_en_x != 3) begin
            failures++;
            $display("en_x period %0d, expected 3", n - last_en_x);
          end
        end
        last_en_x = n;
      end
      @(posedge clk);
      phase = (phase + 1) % 3;
      if (n == 151) begin          // reset in the middle of a cycle
        #1 resetn = 1'b0;
        @(posedge clk);
        #1 resetn = 1'b1;
        #1 expect_phase(0);
        @(posedge clk);
        phase = 1;
        last_en_x = -1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
