// dec_pulse_gen: bidirectional pulsed clock generator with a 2:4 decoder.
//
// Behavioural model: it contains delay elements (the delay box and the
// pulsed clock generators), which have no synthesizable equivalent. The
// decoder and the direction steering inside it are synthesizable modules.
//
// Instead of one clock-pulse circuit per latch pulse, two pulse sources
// feed a 2:4 decoder whose four one-hot outputs give the four data-latch
// pulses, shared by every sub register; one more pulse circuit gives the
// temporary-latch pulse and another the decoder enable. With U = UNIT and
// the clock rising at time 0:
//   pulse<T> : pulse circuit on CLK                      high [0,  U)
//   enable   : pulse circuit on CLK                      high [2U, 6U)
//   X1       : pulsed clock generator 1 on CLK           high [3U, 5U)
//   X0       : pulsed clock generator 2 on CLK through
//              the delay box (2U)                        high [4U, 7U)
// While enabled, {X1,X0} runs through the Gray sequence 00, 10, 11, 01, so
// the decoder outputs Y0, Y2, Y3, Y1 in turn, each for one unit:
//   pulse<1> = Y0 [2U,3U), pulse<2> = Y2 [3U,4U), pulse<3> = Y3 [4U,5U),
//   pulse<4> = Y1 [5U,6U)
// Gray order means one decoder input changes at a time, so consecutive
// pulses hand over without a glitch on a third line. The five ordered pulses
// then go through pulse_dir_steer.
//
// The published design gives the blocks (delay, two pulsed clock generators,
// 2:4 decoder shared by all sub registers) and shows all pulses following
// the rising clock edge; the timing above, the Gray sequence and the
// separate T-pulse and enable circuits are this design's choices. Clock
// requirement: period above 7*UNIT. direction (right) may change only after
// the last pulse, 6*UNIT after the rising edge, and before the next edge.
`timescale 1ns/1ps
module dec_pulse_gen
  import bsr_pkg::*;
#(
  parameter real UNIT = 0.2  // delay unit, ns
) (
  input  logic       clk,
  input  logic       right,
  output pulse_vec_t clk_pulse_r,
  output pulse_vec_t clk_pulse_l
);
  logic       clk_d;    // delay box output
  logic       en, x0, x1;
  logic       pulse_t;
  logic [3:0] y;
  pulse_vec_t pulse;    // time-ordered

  initial clk_d = 1'b0;

  // Delay box.
  always @(clk) clk_d <= #(2.0 * UNIT) clk;

  clock_pulse_circuit #(.OFFSET(0.0), .WIDTH(UNIT)) u_pulse_t (
    .clk_in(clk), .pulse_out(pulse_t)
  );

  clock_pulse_circuit #(.OFFSET(2.0 * UNIT), .WIDTH(4.0 * UNIT)) u_enable (
    .clk_in(clk), .pulse_out(en)
  );

  // Pulsed clock generator 1.
  clock_pulse_circuit #(.OFFSET(3.0 * UNIT), .WIDTH(2.0 * UNIT)) u_pgen1 (
    .clk_in(clk), .pulse_out(x1)
  );

  // Pulsed clock generator 2, fed through the delay box.
  clock_pulse_circuit #(.OFFSET(2.0 * UNIT), .WIDTH(3.0 * UNIT)) u_pgen2 (
    .clk_in(clk_d), .pulse_out(x0)
  );

  decoder_2to4 u_dec (.en(en), .x({x1, x0}), .y(y));

  assign pulse = {y[1], y[3], y[2], y[0], pulse_t};

  pulse_dir_steer u_steer (
    .right      (right),
    .pulse      (pulse),
    .clk_pulse_r(clk_pulse_r),
    .clk_pulse_l(clk_pulse_l)
  );
endmodule
