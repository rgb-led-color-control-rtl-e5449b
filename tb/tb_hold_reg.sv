// tb_hold_reg: self-checking test of the enabled holding register.
// Drives random enables and data, with resets in between, and compares q
// every cycle with a reference value kept by the testbench.
module tb_hold_reg;
  logic        clk = 1'b0;
  logic        resetn, en;
  logic [15:0] d, q, ref_q;
  int checks = 0, failures = 0;

  hold_reg #(.WIDTH(16)) dut (.clk, .resetn, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    resetn = 1'b0; en = 1'b1; d = 16'hABCD; ref_q = '0;
    @(posedge clk); #1;
    checks++; if (q !== 16'h0) begin failures++; $display("reset value %h", q); end
    resetn = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      en     = ($urandom_range(0, 2) == 0);
      d      = 16'($urandom);
      resetn = ($urandom_range(0, 99) != 0);
      @(posedge clk);
      if (!resetn)  ref_q = '0;
      else if (en)  ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        if (failures < 10) $display("cycle %0d: q=%h expected %h", n, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
