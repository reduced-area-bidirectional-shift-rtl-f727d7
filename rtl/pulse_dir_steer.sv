// pulse_dir_steer: steers the ordered pulses to the right- or left-shift lines.
//
// Input pulse[0] is the first pulse of a clock cycle (the T pulse), pulse[1]
// to pulse[4] follow in that order. AND gates with right and its inverse
// (left) route them:
//   right = 1: CLK_pulse_R<T> = pulse[0], CLK_pulse_R<4> = pulse[1],
//              CLK_pulse_R<3> = pulse[2], CLK_pulse_R<2> = pulse[3],
//              CLK_pulse_R<1> = pulse[4]   (latches updated 4,3,2,1)
//   right = 0: CLK_pulse_L<T> = pulse[0], CLK_pulse_L<i> = pulse[i]
//              (latches updated 1,2,3,4)
// The unselected direction's lines stay low. This wiring follows the
// published delayed pulsed clock generator. Outputs are indexed by latch
// position (bit 0 = T). right must not change while a pulse is high.
`timescale 1ns/1ps
module pulse_dir_steer
  import bsr_pkg::*;
(
  input  logic       right,
  input  pulse_vec_t pulse,        // time-ordered: [0] first ... [4] last
  output pulse_vec_t clk_pulse_r,  // by latch position
  output pulse_vec_t clk_pulse_l
);
  always_comb begin
    clk_pulse_r[P_T] = pulse[P_T] & right;
    clk_pulse_l[P_T] = pulse[P_T] & ~right;
    for (int i = 1; i <= SUB_W; i++) begin
      clk_pulse_r[i] = pulse[N_PULSE - i] & right;
      clk_pulse_l[i] = pulse[i] & ~right;
    end
  end
endmodule
