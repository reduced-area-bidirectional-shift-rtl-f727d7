// bsr_dafir_top: the complete design, a 256-bit bidirectional pulsed-latch
// shift register and a distributed-arithmetic FIR filter built on a 16-bit
// instance of the same register.
//
// The two share the clock and reset and are otherwise independent.
//   Shift register: shift one place per clock, right (towards sr_q[255])
//   when right = 1 and left (towards sr_q[0]) when right = 0; sr_in enters
//   at the end the data moves away from. See bidir_shift_register for the
//   timing of sr_in, right and sr_q.
//   FIR filter: 4 taps, 4-bit samples entering bit-serially on x_in, LSB
//   first, one output y per four clocks flagged by y_valid. See da_fir.
// Defaults follow the published design where it gives a value (256 bits,
// 64 sub registers of 4 bits, 4-tap DA filter with a 16-word table); the
// delay unit and the coefficients are this design's own.
`timescale 1ns/1ps
module bsr_dafir_top
  import bsr_pkg::*;
#(
  parameter int unsigned N_SUB  = 64,
  parameter real         UNIT   = 0.2,
  parameter int unsigned COEF_W = 6,
  parameter int unsigned LUT_W  = 8,
  parameter int          COEF [4] = '{5, -3, 11, 7},
  localparam int unsigned ACC_W = LUT_W + SUB_W + 1
) (
  input  logic                     clk,
  input  logic                     rst,
  // bidirectional shift register
  input  logic                     right,
  input  logic                     sr_in,
  output logic [N_SUB*SUB_W-1:0]   sr_q,
  // DA FIR filter
  input  logic                     x_in,
  output logic [1:0]               bit_idx,
  output logic signed [ACC_W-1:0]  y,
  output logic                     y_valid
);
  bidir_shift_register #(.N_SUB(N_SUB), .UNIT(UNIT)) u_bsr (
    .clk  (clk),
    .rst  (rst),
    .right(right),
    .sr_in(sr_in),
    .q    (sr_q)
  );

  da_fir #(.UNIT(UNIT), .COEF_W(COEF_W), .LUT_W(LUT_W), .COEF(COEF)) u_fir (
    .clk    (clk),
    .rst    (rst),
    .x_in   (x_in),
    .bit_idx(bit_idx),
    .y      (y),
    .y_valid(y_valid)
  );
endmodule
