// tb_bd_latch_array: self-checking test of the full 256-bit latch datapath
// (default size). The testbench generates the ordered pulses itself and
// compares all 256 data latches with a shift-register reference model after
// every shift, over runs of right shifts, left shifts and random direction
// changes, including the asynchronous clear.
`timescale 1ns/1ps
module tb_bd_latch_array;
  import bsr_pkg::*;
  localparam int N = 64 * SUB_W;
  logic rst, sr_in;
  pulse_vec_t pr, pl;
  logic [N-1:0] q, mq;
  logic [64:0] t;
  int checks = 0, failures = 0;

  bd_latch_array dut (.rst(rst), .clk_pulse_r(pr), .clk_pulse_l(pl), .sr_in(sr_in), .q(q), .t(t));

  task automatic pulse(input bit dir_right, input int idx);
    if (dir_right) pr[idx] = 1'b1; else pl[idx] = 1'b1;
    #1;
    pr = '0; pl = '0;
    #1;
  endtask

  task automatic shift(input bit dir_right);
    pulse(dir_right, 0);
    for (int i = 1; i <= 4; i++) pulse(dir_right, dir_right ? 5 - i : i);
  endtask

  task automatic compare(input string what);
    checks++;
    if (q !== mq) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, mq);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pr = '0; pl = '0; rst = 1; sr_in = 0;
    #1 rst = 0; mq = '0;
    compare("reset");
    for (int i = 0; i < 1500; i++) begin
      bit dir;
      dir = (i < 300) ? 1'b1 : (i < 600) ? 1'b0 : 1'($urandom);
      sr_in = 1'($urandom);
      shift(dir);
      if (dir) mq = {mq[N-2:0], sr_in};
      else     mq = {sr_in, mq[N-1:1]};
      compare(dir ? "right shift" : "left shift");
      if (i == 1000) begin
        rst = 1; #1 rst = 0; mq = '0; #1 compare("clear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
