// chain_pulse_gen: bidirectional delayed pulsed clock generator built from a
// chain of five clock-pulse circuits.
//
// Behavioural model: it is made of delay-based pulse circuits, which have no
// synthesizable equivalent; the direction steering inside is synthesizable.
//
// Each clock-pulse circuit turns the clock edge into one short pulse and
// passes a delayed clock on to the next circuit, so the five circuits give
// five pulses one after another: CLK_pulse<T>, <1>, <2>, <3>, <4>. With
// U = UNIT and the clock rising at time 0, pulse k (T = 0) is high during
// [2kU, (2k+1)U), so consecutive pulses are separated by a gap of U. The
// pulses then go through pulse_dir_steer, which sends them to the right- or
// left-shift lines. This is the generator the published design starts from
// before replacing four of the circuits by a 2:4 decoder (dec_pulse_gen);
// the pulse widths and spacing are this design's choice. All pulses end
// 9U after the edge, so the clock period must exceed 10U; right may change
// from then until the next rising edge.
`timescale 1ns/1ps
module chain_pulse_gen
  import bsr_pkg::*;
#(
  parameter real UNIT = 0.2  // pulse width and gap, ns
) (
  input  logic       clk,
  input  logic       right,
  output pulse_vec_t clk_pulse_r,
  output pulse_vec_t clk_pulse_l
);
  pulse_vec_t pulse;  // time-ordered

  for (genvar k = 0; k < N_PULSE; k++) begin : g_circuit
    clock_pulse_circuit #(.OFFSET(2.0 * UNIT * k), .WIDTH(UNIT)) u_cpc (
      .clk_in(clk), .pulse_out(pulse[k])
    );
  end

  pulse_dir_steer u_steer (
    .right      (right),
    .pulse      (pulse),
    .clk_pulse_r(clk_pulse_r),
    .clk_pulse_l(clk_pulse_l)
  );
endmodule
