// tb_clock_pulse_circuit: self-checking test of the pulse generator model.
// Measures, for two parameter settings, the delay from each rising clock
// edge to the pulse and the pulse width, and checks one pulse per cycle.
`timescale 1ns/1ps
module tb_clock_pulse_circuit;
  logic clk = 0;
  logic p0, p1;
  realtime t_edge, t_rise0, t_rise1;
  int n0 = 0, n1 = 0, cycles = 0;
  int checks = 0, failures = 0;

  clock_pulse_circuit #(.OFFSET(0.0), .WIDTH(0.2)) dut0 (.clk_in(clk), .pulse_out(p0));
  clock_pulse_circuit #(.OFFSET(1.5), .WIDTH(4.5)) dut1 (.clk_in(clk), .pulse_out(p1));

  always #5 clk = ~clk;

  task automatic near(input string what, input realtime got, input realtime exp);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s: %0.3f ns, expected %0.3f ns", what, got, exp);
    end
  endtask

  always @(posedge clk) begin t_edge = $realtime; cycles++; end
  always @(posedge p0) begin t_rise0 = $realtime; n0++; near("offset 0", t_rise0 - t_edge, 0.0); end
  always @(negedge p0) if (n0 > 0) near("width 0", $realtime - t_rise0, 0.2);
  always @(posedge p1) begin t_rise1 = $realtime; n1++; near("offset 1", t_rise1 - t_edge, 1.5); end
  always @(negedge p1) if (n1 > 0) near("width 1", $realtime - t_rise1, 4.5);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1003;
    checks += 2;
    if (n0 != cycles) begin failures++; $display("FAIL pulses0=%0d cycles=%0d", n0, cycles); end
    if (n1 != cycles) begin failures++; $display("FAIL pulses1=%0d cycles=%0d", n1, cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
