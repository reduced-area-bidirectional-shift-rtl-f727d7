// decoder_2to4: 2-to-4 line decoder with enable.
//
// While en is high exactly one output is high: y[i] for the input value
// x = {x1, x0} = i. While en is low all outputs are low. Purely
// combinational. The function and the names X1, X0, Y0..Y3 and Enable follow
// the published decoder; the standard binary assignment of outputs to input
// codes is assumed.
`timescale 1ns/1ps
module decoder_2to4 (
  input  logic       en,
  input  logic [1:0] x,   // {X1, X0}
  output logic [3:0] y    // y[i] = Yi
);
  always_comb begin
    y = '0;
    if (en) y[x] = 1'b1;
  end
endmodule
