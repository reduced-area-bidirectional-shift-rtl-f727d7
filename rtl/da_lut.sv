// da_lut: distributed-arithmetic look-up table for a 4-tap FIR filter.
//
// A 16-word ROM addressed by one bit of each of the four most recent input
// samples, addr = {b3, b2, b1, b0}, with b0 from x[n] and b3 from x[n-3].
// Word a holds the sum of the coefficients h[k] whose address bit b_k is 1:
// word 0 is 0, word 1 is h[0], word 3 is h[1]+h[0], ..., word 15 is
// h[3]+h[2]+h[1]+h[0]. This is the table of the published DA-LUT unit. The
// ROM contents are computed at elaboration from the COEF parameter, so the
// coefficients can be changed without editing a table. The read is
// combinational.
//
// Coefficient values and widths are not given by the published design:
// signed COEF_W-bit coefficients and signed LUT_W-bit words are this design's
// choice, with COEF_W = LUT_W - 2 so that no sum of four can overflow.
`timescale 1ns/1ps
module da_lut #(
  parameter int unsigned COEF_W = 6,
  parameter int unsigned LUT_W  = 8,
  parameter int          COEF [4] = '{5, -3, 11, 7}  // h[0..3]
) (
  input  logic [3:0]              addr,
  output logic signed [LUT_W-1:0] data
);
  typedef logic signed [LUT_W-1:0] word_t;

  function automatic word_t entry(input int unsigned a);
    int acc = 0;
    for (int k = 0; k < 4; k++)
      if (a[k]) acc += COEF[k];
    return word_t'(acc);
  endfunction

  word_t rom [16];

  for (genvar a = 0; a < 16; a++) begin : g_rom
    assign rom[a] = entry(a);
  end

  assign data = rom[addr];

  initial begin
    for (int k = 0; k < 4; k++)
      assert (COEF[k] >= -(2 ** (COEF_W - 1)) && COEF[k] < 2 ** (COEF_W - 1))
        else $error("da_lut: COEF[%0d] = %0d does not fit in %0d bits", k, COEF[k], COEF_W);
  end
endmodule
