// tb_chain_pulse_gen: self-checking test of the delayed pulsed clock
// generator (chain of five clock-pulse circuits). Over many clock cycles in
// both directions it checks that
//  - no two of the ten pulse lines are ever high together,
//  - the lines of the unselected direction stay low,
//  - each selected line pulses exactly once per cycle, in the order
//    T,4,3,2,1 (right) or T,1,2,3,4 (left),
//  - the T pulse starts at the rising edge and every pulse has ended by 9*UNIT
//    after it, as the pulse circuits are spaced 2*UNIT apart.
`timescale 1ns/1ps
module tb_chain_pulse_gen;
  import bsr_pkg::*;
  localparam real PERIOD = 10.0;
  localparam real UNIT   = 0.2;
  logic clk = 0, right;
  pulse_vec_t r, l, r_prev, l_prev;
  int order [$];
  realtime t_edge, t_last_fall;
  int checks = 0, failures = 0, n_right = 0, n_left = 0;
  bit dir_this;

  chain_pulse_gen #(.UNIT(UNIT)) dut (.clk(clk), .right(right), .clk_pulse_r(r), .clk_pulse_l(l));

  always #(PERIOD / 2) clk = ~clk;

  task automatic fail(input string what);
    failures++;
    $display("FAIL t=%0t %s", $realtime, what);
  endtask

  // Watch every change of the pulse lines.
  initial begin
    r_prev = '0; l_prev = '0;
    forever begin
      @(r or l);
      checks++;
      if (!$onehot0({r, l})) fail("overlapping pulses");
      for (int i = 0; i < N_PULSE; i++) begin
        if (r[i] && !r_prev[i]) order.push_back(i);
        if (l[i] && !l_prev[i]) order.push_back(i + 10);
        if ((!r[i] && r_prev[i]) || (!l[i] && l_prev[i])) t_last_fall = $realtime;
      end
      if (dir_this && (l != 0)) fail("left line high while shifting right");
      if (!dir_this && (r != 0)) fail("right line high while shifting left");
      r_prev = r; l_prev = l;
    end
  end

  task automatic check_cycle();
    int exp [$];
    if (dir_this) exp = '{0, 4, 3, 2, 1};
    else          exp = '{10, 11, 12, 13, 14};
    checks++;
    if (order != exp) begin
      fail("pulse order");
      foreach (order[i]) $display("  got %0d", order[i]);
    end
    checks++;
    if (t_last_fall - t_edge > 9 * UNIT + 0.01) fail("pulses end too late");
    if (dir_this) n_right++; else n_left++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    right = 1;
    @(posedge clk);
    for (int c = 0; c < 200; c++) begin
      t_edge = $realtime;
      dir_this = right;
      order.delete();
      // the T pulse must start with the edge
      #0.1;
      checks++;
      if (!(dir_this ? r[P_T] : l[P_T])) fail("T pulse not at the clock edge");
      #(0.75 * PERIOD - 0.1);
      check_cycle();
      right = (c < 20) ? 1'b1 : (c < 40) ? 1'b0 : 1'($urandom);
      @(posedge clk);
    end
    checks++;
    if (n_right == 0 || n_left == 0) fail("a direction was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
