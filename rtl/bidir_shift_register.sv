// bidir_shift_register: area-reduced bidirectional shift register built from
// bidirectional pulsed latches.
//
// A pulsed clock generator turns each rising clock edge into five ordered
// pulses and steers them by direction. By default (DECODER_GEN = 1) it is the
// generator with a 2:4 decoder (dec_pulse_gen), the published design's
// reduced-area choice; DECODER_GEN = 0 selects the chain of five clock-pulse
// circuits (chain_pulse_gen) it is compared with. The
// the latch array (bd_latch_array) of N_SUB 4-bit sub registers shifts one
// place per clock cycle. right = 1 shifts towards Q<N> (q[N-1]) with sr_in
// entering at Q<1> (q[0]); right = 0 shifts towards Q<1> with sr_in entering
// at Q<N>. Default: 256 bits (64 sub registers), as in the published design.
//
// Timing: sr_in is captured by the temporary latch during the first pulse,
// within UNIT after the rising clock edge (so it must be stable just before
// the edge and for UNIT after it). The data latches settle by 6*UNIT after
// the edge (9*UNIT with DECODER_GEN = 0); q is then stable until the next
// rising edge, which is when a flip-flop clocked by the same clock should
// sample it. right and sr_in may change from that point until the next
// rising edge. The clock period must exceed 10*UNIT. rst clears all latches
// asynchronously.
`timescale 1ns/1ps
module bidir_shift_register
  import bsr_pkg::*;
#(
  parameter int unsigned N_SUB = 64,
  parameter real         UNIT  = 0.2,
  parameter bit          DECODER_GEN = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic right,
  input  logic sr_in,
  output logic [N_SUB*SUB_W-1:0] q
);
  pulse_vec_t clk_pulse_r, clk_pulse_l;
  logic [N_SUB:0] t;

  if (DECODER_GEN) begin : g_dec_gen
    dec_pulse_gen #(.UNIT(UNIT)) u_gen (
      .clk        (clk),
      .right      (right),
      .clk_pulse_r(clk_pulse_r),
      .clk_pulse_l(clk_pulse_l)
    );
  end else begin : g_chain_gen
    chain_pulse_gen #(.UNIT(UNIT)) u_gen (
      .clk        (clk),
      .right      (right),
      .clk_pulse_r(clk_pulse_r),
      .clk_pulse_l(clk_pulse_l)
    );
  end

  bd_latch_array #(.N_SUB(N_SUB)) u_array (
    .rst        (rst),
    .clk_pulse_r(clk_pulse_r),
    .clk_pulse_l(clk_pulse_l),
    .sr_in      (sr_in),
    .q          (q),
    .t          (t)
  );
endmodule
