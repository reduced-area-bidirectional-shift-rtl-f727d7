// tb_sub_bsr4: self-checking test of one 4-bit sub bidirectional shift
// register. The testbench generates the five ordered pulses itself (T, then
// 4,3,2,1 for a right shift or 1,2,3,4 for a left shift, 1 ns wide with 1 ns
// gaps) and compares Q<1..4> and T with a reference model after each shift.
`timescale 1ns/1ps
module tb_sub_bsr4;
  import bsr_pkg::*;
  logic rst, t_left, t_right_in;
  pulse_vec_t pr, pl;
  logic [3:0] q, mq;
  logic t, mt;
  int checks = 0, failures = 0;

  sub_bsr4 dut (.rst(rst), .clk_pulse_r(pr), .clk_pulse_l(pl), .t_left(t_left),
                .t_right_in(t_right_in), .q(q), .t(t));

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

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pr = '0; pl = '0; rst = 1; t_left = 0; t_right_in = 0;
    #1 rst = 0; mq = '0; mt = 0;
    checks++; if (q !== 0 || t !== 0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 500; i++) begin
      bit dir;
      dir = (i < 20) ? 1'b1 : (i < 40) ? 1'b0 : 1'($urandom);
      t_left = 1'($urandom); t_right_in = 1'($urandom);
      shift(dir);
      if (dir) begin mt = mq[3]; mq = {mq[2:0], t_left}; end
      else     begin mt = t_right_in; mq = {t_right_in, mq[3:1]}; end
      checks++;
      if (q !== mq || t !== mt) begin
        failures++;
        $display("FAIL shift %0d dir=%0d q=%b t=%b expected q=%b t=%b", i, dir, q, t, mq, mt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
