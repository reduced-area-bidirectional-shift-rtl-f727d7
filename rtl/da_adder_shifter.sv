// da_adder_shifter: adder/subtractor, accumulator and 2^-1 feedback of a
// bit-serial distributed-arithmetic filter.
//
// One input word (a LUT output, signed) per clock, least significant input
// bit position first. Each cycle the accumulator takes
//   OUT = B + A   when s = 0
//   OUT = B - A   when s = 1   (the sign-bit position of two's complement)
// where A is the LUT word scaled by 2^(B_BITS-1) and B is the accumulator
// shifted right by one place (the 2^-1 feedback), or zero when first = 1
// starts a new output sample. Scaling A up instead of letting the shifted-out
// bits drop keeps the result exact: after B_BITS steps the accumulator holds
// sum_j s_j * A_j * 2^j, the filter output. The add/subtract convention
// (S = 0: A + B, S = 1: B - A) follows the published adder/shifter unit;
// the exact-width scaling and the first input are this design's choices.
//
// Timing: acc is registered, updated on the rising clock edge. rst clears
// it synchronously.
`timescale 1ns/1ps
module da_adder_shifter #(
  parameter int unsigned LUT_W  = 8,
  parameter int unsigned B_BITS = 4,                   // input sample width
  parameter int unsigned ACC_W  = LUT_W + B_BITS + 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [LUT_W-1:0] lut_in,  // A
  input  logic                    s,       // 1: subtract (sign bit)
  input  logic                    first,   // 1: discard the feedback
  output logic signed [ACC_W-1:0] acc
);
  logic signed [ACC_W-1:0] fb, addend, sum;

  always_comb begin
    if (first) fb = '0;
    else       fb = acc >>> 1;
    addend = {{(ACC_W - LUT_W){lut_in[LUT_W-1]}}, lut_in} <<< (B_BITS - 1);
    sum    = s ? (fb - addend) : (fb + addend);
  end

  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else     acc <= sum;
  end
endmodule
