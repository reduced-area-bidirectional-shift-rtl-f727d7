// bd_pl: bidirectional pulsed latch (BD-PL).
//
// A level-sensitive latch with two data inputs and two pulsed enables. While
// clk_pulse_r is high the latch is transparent to dl, the data of its left
// neighbour (used for right-shifting); while clk_pulse_l is high it is
// transparent to dr, the data of its right neighbour (left-shifting). With
// both pulses low it holds. The two pulses are never high together in a
// correctly clocked register; should they be, clk_pulse_r wins.
//
// The behaviour follows the published BD-PL; the complementary data rails
// (Qb, DL_b, DR_b) of the transistor-level cell are left out, as a digital
// model needs only the true rail. The asynchronous clear rst is this design's
// addition so that a simulation or a chip starts from a known state.
//
// In a chain of these latches wired both ways (sub_bsr4), lint tools report a
// combinational loop through q; see sub_bsr4 for why it is harmless.
`timescale 1ns/1ps
module bd_pl (
  input  logic rst,          // asynchronous clear, active high
  input  logic clk_pulse_r,  // pulse: store left-neighbour data
  input  logic clk_pulse_l,  // pulse: store right-neighbour data
  input  logic dl,           // data from the left neighbour
  input  logic dr,           // data from the right neighbour
  output logic q
);
  always_latch begin
    if (rst)              q <= 1'b0;
    else if (clk_pulse_r) q <= dl;
    else if (clk_pulse_l) q <= dr;
  end
endmodule
