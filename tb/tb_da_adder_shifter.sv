// tb_da_adder_shifter: self-checking test of the adder/shifter accumulator.
// Feeds groups of four random signed words with first on the first word and
// s on the last, and checks the accumulator after every word against
// sum_{i<=j} s_i*A_i*2^i * 2^(3-j), and after the fourth word against the
// exact weighted sum A0 + 2A1 + 4A2 - 8A3.
`timescale 1ns/1ps
module tb_da_adder_shifter;
  logic clk = 0, rst;
  logic signed [7:0]  a;
  logic s, first;
  logic signed [12:0] acc;
  int checks = 0, failures = 0;

  da_adder_shifter dut (.clk(clk), .rst(rst), .lut_in(a), .s(s), .first(first), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w [4];
    int partial;
    rst = 1; a = 0; s = 0; first = 0;
    @(posedge clk); #1 rst = 0;
    checks++; if (acc !== 0) begin failures++; $display("FAIL reset"); end
    for (int g = 0; g < 200; g++) begin
      partial = 0;
      for (int j = 0; j < 4; j++) begin
        w[j] = (g < 2) ? ((g == 0) ? -128 : 127) : $urandom_range(0, 255) - 128;
        a = 8'(w[j]); first = (j == 0); s = (j == 3);
        @(posedge clk); #1;
        partial += (j == 3 ? -w[j] : w[j]) * (1 << j);
        checks++;
        if (int'(acc) != partial * (1 << (3 - j))) begin
          failures++;
          $display("FAIL g=%0d j=%0d acc=%0d expected %0d", g, j, acc, partial * (1 << (3 - j)));
        end
      end
      checks++;
      if (int'(acc) != w[0] + 2*w[1] + 4*w[2] - 8*w[3]) begin
        failures++; $display("FAIL final g=%0d", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
