// tb_da_lut: self-checking test of the DA look-up table. Every address is
// compared with the sum of the coefficients selected by its bits, for the
// default coefficients and for a second set given by parameter override.
`timescale 1ns/1ps
module tb_da_lut;
  localparam int C1 [4] = '{5, -3, 11, 7};
  localparam int C2 [4] = '{-32, 31, -1, 17};
  logic [3:0] addr;
  logic signed [7:0] d1, d2;
  int checks = 0, failures = 0;

  da_lut dut1 (.addr(addr), .data(d1));
  da_lut #(.COEF(C2)) dut2 (.addr(addr), .data(d2));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      int e1, e2;
      addr = 4'(a);
      e1 = 0; e2 = 0;
      for (int k = 0; k < 4; k++) if (a[k]) begin e1 += C1[k]; e2 += C2[k]; end
      #1;
      checks += 2;
      if (int'(d1) != e1) begin failures++; $display("FAIL addr=%0d d1=%0d exp %0d", a, d1, e1); end
      if (int'(d2) != e2) begin failures++; $display("FAIL addr=%0d d2=%0d exp %0d", a, d2, e2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
