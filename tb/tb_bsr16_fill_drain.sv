// tb_bsr16_fill_drain: workload test of a 16-bit bidirectional shift
// register (4 sub registers), with each of the two pulse generators.
// The register is filled with ones by 16 right shifts, so the outputs rise
// one after another in a staircase, then emptied by 16 left shifts feeding
// zeros, then the same with a checkerboard pattern in both directions. After
// every shift all 16 outputs are compared with the expected staircase.
`timescale 1ns/1ps
module tb_bsr16_fill_drain;
  localparam real PERIOD = 10.0;
  localparam int N = 16;
  logic clk = 0, rst, right, sr_in;
  logic [N-1:0] q_dec, q_chain, mq;
  int checks = 0, failures = 0;

  bidir_shift_register #(.N_SUB(4)) dut_dec (
    .clk(clk), .rst(rst), .right(right), .sr_in(sr_in), .q(q_dec));
  bidir_shift_register #(.N_SUB(4), .DECODER_GEN(1'b0)) dut_chain (
    .clk(clk), .rst(rst), .right(right), .sr_in(sr_in), .q(q_chain));

  always #(PERIOD / 2) clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit dir, input bit b);
    right = dir; sr_in = b;
    @(posedge clk);
    #(0.7 * PERIOD);
    if (dir) mq = {mq[N-2:0], b};
    else     mq = {b, mq[N-1:1]};
    checks += 2;
    if (q_dec !== mq)   begin failures++; $display("FAIL decoder generator: q=%b expected %b", q_dec, mq); end
    if (q_chain !== mq) begin failures++; $display("FAIL chain generator: q=%b expected %b", q_chain, mq); end
  endtask

  initial begin
    rst = 1; right = 1; sr_in = 0; mq = '0;
    #(0.75 * PERIOD) rst = 0;
    for (int i = 0; i < N; i++) step(1'b1, 1'b1);        // fill: staircase up
    checks++;
    if (q_dec !== '1) begin failures++; $display("FAIL not full"); end
    for (int i = 0; i < N; i++) step(1'b0, 1'b0);        // drain to the left
    checks++;
    if (q_dec !== '0) begin failures++; $display("FAIL not empty"); end
    for (int i = 0; i < N; i++) step(1'b1, 1'(i));       // checkerboard in
    for (int i = 0; i < N; i++) step(1'b0, 1'(i + 1));   // and back
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
