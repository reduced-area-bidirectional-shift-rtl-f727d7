// tb_pulse_dir_steer: exhaustive self-checking test of the direction steering.
// For every direction and every pulse pattern, the right-shift lines must
// carry the pulses in reverse latch order (first pulse to T, then latch 4,
// 3, 2, 1) and the left-shift lines in forward order, the other direction's
// lines staying low.
`timescale 1ns/1ps
module tb_pulse_dir_steer;
  import bsr_pkg::*;
  logic       right;
  pulse_vec_t pulse, r, l, expr, expl;
  int checks = 0, failures = 0;

  pulse_dir_steer dut (.right(right), .pulse(pulse), .clk_pulse_r(r), .clk_pulse_l(l));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++)
      for (int p = 0; p < 32; p++) begin
        right = 1'(d); pulse = pulse_vec_t'(p);
        #1;
        expr = '0; expl = '0;
        if (d == 1) begin
          expr[0] = pulse[0];              // R<T> first
          expr[4] = pulse[1];              // then R<4>
          expr[3] = pulse[2];
          expr[2] = pulse[3];
          expr[1] = pulse[4];              // R<1> last
        end else begin
          expl = pulse;                    // L<T>, L<1> ... L<4>
        end
        checks++;
        if (r !== expr || l !== expl) begin
          failures++;
          $display("FAIL right=%0d pulse=%b r=%b(%b) l=%b(%b)", d, pulse, r, expr, l, expl);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
