// da_fir: bit-serial 4-tap FIR filter using distributed arithmetic on top of
// the bidirectional pulsed-latch shift register.
//
// y[n] = h[0]x[n] + h[1]x[n-1] + h[2]x[n-2] + h[3]x[n-3], with 4-bit two's
// complement samples. There are no multipliers: the input bits enter a
// 16-bit bidirectional shift register (four 4-bit sub registers, shifting
// right) one per clock, least significant bit first. The last latch of each
// sub register, Q<4>, Q<8>, Q<12>, Q<16>, holds the same bit position of
// x[n], x[n-1], x[n-2], x[n-3]; these four bits address the DA look-up
// table, and the adder/shifter accumulates the table words, subtracting the
// one for the sign bit. One output per four clocks.
//
// Interface: present bit bit_idx of the current sample on x_in before the
// rising clock edge (bit_idx counts 0,1,2,3 from reset and is the bit the
// filter latches at the next edge). x_in may change from 6*UNIT after an
// edge until the next edge. y_valid is high for one cycle
// after the edge that completes a sample; y then holds y[n] for the sample
// whose bit 3 was latched four edges earlier. Latency: y[n] appears 8 rising
// edges after bit 0 of x[n] is latched. rst is synchronous for the counter
// and accumulator and clears the shift register latches.
//
// The structure (shift register unit, DA-LUT unit, adder/shifter unit, LSB
// taps addressing the LUT, serial input) follows the published filter; the
// 4-bit sample width (one sample per sub register), the bit counter and the
// output timing are this design's choices.
`timescale 1ns/1ps
module da_fir
  import bsr_pkg::*;
#(
  parameter real         UNIT   = 0.2,
  parameter int unsigned COEF_W = 6,
  parameter int unsigned LUT_W  = 8,
  parameter int          COEF [4] = '{5, -3, 11, 7},
  localparam int unsigned ACC_W = LUT_W + SUB_W + 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    x_in,     // serial sample bits, LSB first
  output logic [1:0]              bit_idx,  // bit position latched next
  output logic signed [ACC_W-1:0] y,
  output logic                    y_valid
);
  localparam int unsigned N_TAP = 4;

  logic [N_TAP*SUB_W-1:0] q;
  logic [3:0]             addr;
  logic signed [LUT_W-1:0] lut_word;
  logic [1:0]             rd_idx;   // bit position present at the taps

  bidir_shift_register #(.N_SUB(N_TAP), .UNIT(UNIT)) u_sr (
    .clk  (clk),
    .rst  (rst),
    .right(1'b1),
    .sr_in(x_in),
    .q    (q)
  );

  for (genvar k = 0; k < N_TAP; k++) begin : g_tap
    assign addr[k] = q[k*SUB_W + SUB_W - 1];
  end

  da_lut #(.COEF_W(COEF_W), .LUT_W(LUT_W), .COEF(COEF)) u_lut (
    .addr(addr),
    .data(lut_word)
  );

  // A bit latched at an edge with bit_idx = j reaches Q<4> three cycles
  // later and is read at the fourth edge, when bit_idx is j again.
  assign rd_idx = bit_idx;

  da_adder_shifter #(.LUT_W(LUT_W), .B_BITS(SUB_W), .ACC_W(ACC_W)) u_acc (
    .clk   (clk),
    .rst   (rst),
    .lut_in(lut_word),
    .s     (rd_idx == 2'(SUB_W - 1)),
    .first (rd_idx == 2'd0),
    .acc   (y)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      bit_idx <= '0;
      y_valid <= 1'b0;
    end else begin
      bit_idx <= bit_idx + 2'd1;
      y_valid <= (rd_idx == 2'(SUB_W - 1));
    end
  end
endmodule
