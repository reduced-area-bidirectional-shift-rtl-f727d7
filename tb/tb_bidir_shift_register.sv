// tb_bidir_shift_register: self-checking test of the complete 256-bit
// bidirectional shift register (default parameters) with its pulsed clock
// generator. One shift per 10 ns clock. sr_in changes 0.3 ns after each
// rising edge, i.e. just after the temporary latch has closed, which also
// checks the short hold time; right changes late in the cycle. After every
// cycle all 256 outputs are compared with a reference shift register.
// Counts right shifts, left shifts and direction changes; each must occur.
// A second instance uses the chain-of-pulse-circuits generator instead of
// the 2:4-decoder one and must behave identically.
`timescale 1ns/1ps
module tb_bidir_shift_register;
  import bsr_pkg::*;
  localparam int N = 64 * SUB_W;
  localparam real PERIOD = 10.0;
  logic clk = 0, rst, right, sr_in;
  logic [N-1:0] q, q_chain, mq;
  int checks = 0, failures = 0;
  int n_right = 0, n_left = 0, n_switch = 0;

  bidir_shift_register dut (.clk(clk), .rst(rst), .right(right), .sr_in(sr_in), .q(q));
  bidir_shift_register #(.DECODER_GEN(1'b0)) dut_chain (
    .clk(clk), .rst(rst), .right(right), .sr_in(sr_in), .q(q_chain));

  always #(PERIOD / 2) clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit prev_dir;
    rst = 1; right = 1; sr_in = 0; mq = '0;
    #(0.75 * PERIOD);
    rst = 0;
    checks++;
    if (q !== mq) begin failures++; $display("FAIL reset"); end
    prev_dir = right;
    for (int c = 0; c < 2000; c++) begin
      bit d, b;
      d = right; b = sr_in;
      @(posedge clk);
      #0.3 sr_in = 1'($urandom);       // hold time of 0.3 ns is enough
      #(0.7 * PERIOD - 0.3);           // outputs settled
      if (d) begin mq = {mq[N-2:0], b}; n_right++; end
      else   begin mq = {b, mq[N-1:1]}; n_left++; end
      if (d != prev_dir) n_switch++;
      prev_dir = d;
      checks++;
      if (q !== mq) begin
        failures++;
        $display("FAIL cycle %0d right=%0d", c, d);
      end
      checks++;
      if (q_chain !== mq) begin
        failures++;
        $display("FAIL chain generator, cycle %0d right=%0d", c, d);
      end
      #(0.05 * PERIOD);
      right = (c < 400) ? 1'b1 : (c < 800) ? 1'b0 : ($urandom_range(0, 9) != 0) ? right : ~right;
    end
    checks++;
    if (n_right == 0 || n_left == 0 || n_switch == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("right shifts=%0d left shifts=%0d direction changes=%0d", n_right, n_left, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
