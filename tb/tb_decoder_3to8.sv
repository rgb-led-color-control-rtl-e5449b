// tb_decoder_3to8: exhaustive test of the 3-to-8 decoder with enable.
module tb_decoder_3to8;
  logic [2:0] i;
  logic       en;
  logic [7:0] y;
  int checks = 0, failures = 0;

  decoder_3to8 dut (.i, .en, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int k = 0; k < 8; k++) begin
        i = 3'(k); en = 1'(e);
        #1;
        checks++;
        if (y !== (e ? 8'(1 << k) : 8'h00)) begin
          failures++;
          $display("i=%0d en=%0d y=%b", k, e, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
