// tb_map_to_max: checks the sensor-to-duty mapping of both channel variants
// (baseline 0 for X/Y, baseline 150 for temperature) on boundary words
// (0, +-1, +-1023, +-1024, 32767, -32768, 149, 150, 151) and random words,
// for all eight switch settings. The reference is computed with integer
// arithmetic: off for switch 000, otherwise max(floor, min(|w - b| * 64, 65535)).
module tb_map_to_max;
  logic [15:0] data;
  logic [2:0]  sw;
  logic [15:0] duty0, duty150;
  int checks = 0, failures = 0;

  map_to_max #(.BASELINE(0))   dut0   (.data, .sw, .duty(duty0));
  map_to_max #(.BASELINE(150)) dut150 (.data, .sw, .duty(duty150));

  function automatic int ref_duty(input int word, input int base, input int s);
    int m, fl;
    if (s == 0) return 0;
    m = word - base;
    if (m < 0) m = -m;
    m = m * 64;
    if (m > 65535) m = 65535;
    fl = (s >= 4) ? 36864 : (s >= 2) ? 16384 : 4096;
    return (m > fl) ? m : fl;
  endfunction

  task automatic check_word(input int word);
    for (int s = 0; s < 8; s++) begin
      data = 16'(word); sw = 3'(s);
      #1;
      checks += 2;
      if (int'(duty0) != ref_duty(word, 0, s)) begin
        failures++;
        $display("b=0 w=%0d sw=%0d duty=%h exp=%h", word, s, duty0, ref_duty(word, 0, s));
      end
      if (int'(duty150) != ref_duty(word, 150, s)) begin
        failures++;
        $display("b=150 w=%0d sw=%0d duty=%h exp=%h", word, s, duty150, ref_duty(word, 150, s));
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int words[] = '{0, 1, -1, 63, -63, 64, 100, -100, 576, 1023, -1023, 1024, -1024,
                    32767, -32768, 149, 150, 151, 214, 300, -300, 1174, 1173};
    foreach (words[k]) check_word(words[k]);
    for (int n = 0; n < 500; n++) check_word($signed(16'($urandom)));
    for (int n = 0; n < 500; n++) check_word($urandom_range(0, 2400) - 1200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
