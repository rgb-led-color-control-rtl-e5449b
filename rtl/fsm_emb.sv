// fsm_emb: register-address sequencer for the ADXL362 interface.
//
// After reset it issues one SPI write of 0x02 to POWER_CTL (0x2D), which
// puts the ADXL362 in measurement mode. It then reads the eight data
// registers XDATA_L (0x0E) to TEMP_H (0x15) one byte at a time, in address
// order, and starts again at XDATA_L for ever. When a read finishes it
// raises e_i for that clock with the byte index idx (0..7 = X_L, X_H, Y_L,
// Y_H, Z_L, Z_H, T_L, T_H), which drives the decoder that stores the byte in
// its register. The design description says only that this block controls
// the order of the register addresses; the power-up write, the address order
// and the handshake with the SPI engine are this implementation's choices.
//
// Ports: clk, resetn (sync, active low); to the SPI engine start, rw,
// addr[7:0], wdata[7:0] and from it done; to the decoder e_i and idx[2:0].
// Timing: start is a one-clock pulse; the next transaction starts one clock
// after the engine reports it is no longer busy.
module fsm_emb
  import rgb_pkg::*;
(
  input  logic       clk,
  input  logic       resetn,
  input  logic       done,
  input  logic       busy,
  output logic       start,
  output logic       rw,
  output logic [7:0] addr,
  output logic [7:0] wdata,
  output logic       e_i,
  output logic [2:0] idx
);

  typedef enum logic [2:0] {
    EMB_INIT_START, EMB_INIT_WAIT, EMB_RD_START, EMB_RD_WAIT, EMB_RD_GAP
  } emb_state_e;

  emb_state_e state_q, state_d;
  logic [2:0] idx_q, idx_d;

  always_comb begin
    state_d = state_q;
    idx_d   = idx_q;
    start   = 1'b0;
    rw      = 1'b0;
    addr    = ADXL_REG_XDATA_L + 8'(idx_q);
    wdata   = 8'h00;
    e_i     = 1'b0;
    unique case (state_q)
      EMB_INIT_START: begin
        start   = 1'b1;
        rw      = 1'b1;
        addr    = ADXL_REG_POWER_CTL;
        wdata   = ADXL_POWER_MEASURE;
        state_d = EMB_INIT_WAIT;
      end
      EMB_INIT_WAIT: if (!busy) state_d = EMB_RD_START;
      EMB_RD_START: begin
        start   = 1'b1;
        state_d = EMB_RD_WAIT;
      end
      EMB_RD_WAIT: if (done) begin
        e_i     = 1'b1;
        idx_d   = idx_q + 1'b1;
        state_d = EMB_RD_GAP;
      end
      EMB_RD_GAP: if (!busy) state_d = EMB_RD_START;
      default: state_d = EMB_INIT_START;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!resetn) begin
      state_q <= EMB_INIT_START;
      idx_q   <= '0;
    end else begin
      state_q <= state_d;
      idx_q   <= idx_d;
    end
  end

  assign idx = idx_q;

endmodule
