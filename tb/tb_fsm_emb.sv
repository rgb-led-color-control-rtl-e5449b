// tb_fsm_emb: checks the register-address sequencer against a simple model
// of the SPI engine (busy for a random number of clocks, done one clock
// before busy falls, as the real engine does). The first transaction must be
// the write of 0x02 to POWER_CTL (0x2D); then reads of 0x0E..0x15 in order,
// repeating, with e_i pulsed once per read, on the done clock, carrying the
// index of the address just read.
module tb_fsm_emb;
  logic       clk = 1'b0;
  logic       resetn, done, busy, start, rw, e_i;
  logic [7:0] addr, wdata;
  logic [2:0] idx;
  int checks = 0, failures = 0;
  int n_txn = 0, n_store = 0;
  logic [7:0] cur_addr;
  int remaining;

  fsm_emb dut (.clk, .resetn, .done, .busy, .start, .rw, .addr, .wdata, .e_i, .idx);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // engine model and checks, evaluated on each rising edge
  always @(posedge clk) begin
    if (!resetn) begin
      busy <= 1'b0; done <= 1'b0; remaining = 0;
    end else begin
      if (e_i) begin
        checks++;
        if (!done || idx !== 3'(cur_addr - 8'h0E)) begin
          failures++;
          $display("store idx %0d for address %h (done=%b)", idx, cur_addr, done);
        end
        n_store++;
      end
      if (start) begin
        checks++;
        if (busy) begin failures++; $display("start while busy"); end
        if (n_txn == 0) begin
          if (!(rw && addr == 8'h2D && wdata == 8'h02)) begin
            failures++; $display("first transaction rw=%b addr=%h data=%h", rw, addr, wdata);
          end
        end else begin
          if (rw || addr != 8'h0E + 8'((n_txn - 1) % 8)) begin
            failures++; $display("txn %0d rw=%b addr=%h", n_txn, rw, addr);
          end
        end
        cur_addr = addr;
        n_txn++;
        busy <= 1'b1;
        remaining = $urandom_range(3, 12);
      end else if (busy) begin
        remaining--;
        done <= (remaining == 1);
        if (remaining == 0) busy <= 1'b0;
      end else begin
        done <= 1'b0;
      end
    end
  end

  initial begin
    resetn = 1'b0;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (e_i) begin failures++; $display("store during reset"); end
    resetn = 1'b1;
    wait (n_txn == 1 + 8 * 5);
    repeat (40) @(posedge clk);
    checks++;
    if (n_store < 8 * 5 - 1) begin failures++; $display("only %0d stores", n_store); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
