// sub_bsr4: 4-bit sub bidirectional shift register.
//
// Five BD-PLs: four data latches Q<1>..Q<4> and one temporary latch T. The
// data latch at position i is clocked by clk_pulse_r[i] / clk_pulse_l[i]; the
// temporary latch by the T pulses (index 0). Neighbour wiring:
//   Q<1>: left = t_left (temporary latch of the previous sub register),
//         right = Q<2>
//   Q<4>: left = Q<3>, right = T
//   T   : left = Q<4>, right = t_right_in (first data latch of the next sub
//         register, or the serial input for the last sub register)
//
// Right shift: the T pulse copies Q<4> into T, then pulses 4,3,2,1 move every
// bit one place right, Q<1> taking the previous sub register's T. Because T
// already holds the old Q<4>, the next sub register can load it at its last
// pulse without racing against the overwrite of Q<4>. Left shift: the T pulse
// copies the next sub register's first bit into T, then pulses 1,2,3,4 move
// every bit one place left, Q<4> taking T. Structure and pulse order follow
// the published design.
//
// Lint tools report a combinational loop here: each latch reads its right
// neighbour and its right neighbour reads it back. The loop is broken in
// operation because the pulses are non-overlapping, so two neighbouring
// latches are never transparent at the same time; it is a property of the
// bidirectional latch chain, not an error.
`timescale 1ns/1ps
module sub_bsr4
  import bsr_pkg::*;
(
  input  logic       rst,
  input  pulse_vec_t clk_pulse_r,  // [0]=T, [1..4]=latch positions
  input  pulse_vec_t clk_pulse_l,
  input  logic       t_left,       // T latch of the sub register on the left
  input  logic       t_right_in,   // data the T latch takes when left-shifting
  output logic [SUB_W-1:0] q,      // q[0]=Q<1> ... q[3]=Q<4>
  output logic       t             // this sub register's temporary latch
);
  logic [SUB_W+1:0] chain;  // chain[0]=t_left, chain[1..4]=Q, chain[5]=T

  assign chain[0] = t_left;
  assign q = chain[SUB_W:1];
  assign t = chain[SUB_W+1];

  for (genvar i = 1; i <= SUB_W; i++) begin : g_q
    bd_pl u_q (
      .rst        (rst),
      .clk_pulse_r(clk_pulse_r[i]),
      .clk_pulse_l(clk_pulse_l[i]),
      .dl         (chain[i-1]),
      .dr         (chain[i+1]),
      .q          (chain[i])
    );
  end

  bd_pl u_t (
    .rst        (rst),
    .clk_pulse_r(clk_pulse_r[P_T]),
    .clk_pulse_l(clk_pulse_l[P_T]),
    .dl         (chain[SUB_W]),
    .dr         (t_right_in),
    .q          (chain[SUB_W+1])
  );
endmodule
