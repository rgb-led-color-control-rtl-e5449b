// fsm_rgb_ctrl: colour-latch controller.
//
// A three-state Moore machine that walks S1 -> S2 -> S3 -> S1, one state per
// clock. Each state selects one word of the accelerometer interface's
// multiplexer and enables the matching holding register:
//   S1: mux_sel = 00 (X),           en_x = 1
//   S2: mux_sel = 01 (Y),           en_y = 1
//   S3: mux_sel = 11 (temperature), en_t = 1
// Word 10 (Z) is never selected. Reset is synchronous and active low and puts
// the machine in S1. The state sequence, select codes and enables follow the
// design description; advancing every clock follows its simulation trace
// (one 10 ns state per clock at 100 MHz). Written in two processes: a
// combinational next-state/output process and a clocked state register.
//
// Ports: clk, resetn, mux_sel[1:0], en_x, en_y, en_t, state (for observation).
module fsm_rgb_ctrl
  import rgb_pkg::*;
(
  input  logic       clk,
  input  logic       resetn,
  output logic [1:0] mux_sel,
  output logic       en_x,
  output logic       en_y,
  output logic       en_t,
  output rgb_state_e state
);

  rgb_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    mux_sel = WORD_X;
    en_x    = 1'b0;
    en_y    = 1'b0;
    en_t    = 1'b0;
    unique case (state_q)
      ST_S1: begin mux_sel = WORD_X; en_x = 1'b1; state_d = ST_S2; end
      ST_S2: begin mux_sel = WORD_Y; en_y = 1'b1; state_d = ST_S3; end
      ST_S3: begin mux_sel = WORD_T; en_t = 1'b1; state_d = ST_S1; end
      default: state_d = ST_S1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!resetn) state_q <= ST_S1;
    else         state_q <= state_d;
  end

  assign state = state_q;

  // Exactly one holding register is enabled in every state.
  a_one_enable: assert property (@(posedge clk) disable iff (!resetn)
                                 $onehot({en_x, en_y, en_t}));

endmodule
