// tb_mux4: random test of the 16-bit 4-to-1 word multiplexer.
module tb_mux4;
  logic [1:0]  sel;
  logic [15:0] d [4];
  logic [15:0] y;
  int checks = 0, failures = 0;

  mux4 #(.WIDTH(16)) dut (.sel, .d0(d[0]), .d1(d[1]), .d2(d[2]), .d3(d[3]), .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      foreach (d[k]) d[k] = 16'($urandom);
      sel = 2'(n % 4);
      #1;
      checks++;
      if (y !== d[n % 4]) begin
        failures++;
        $display("sel=%0d y=%h expected %h", sel, y, d[n % 4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
