// tb_bsr_dafir_top: end-to-end self-checking test of the whole design at its
// default parameters (256-bit shift register, 4-tap DA FIR filter).
// Both halves run at once from one 10 ns clock:
//  - the shift register gets random data and runs of right shifts, left
//    shifts and random direction changes, with a clear in the middle; all
//    256 outputs are compared with a reference after every cycle;
//  - the filter gets random 4-bit samples bit-serially and every output is
//    compared with a direct convolution, at the expected rate and latency.
// Mechanisms counted (each must happen): right shift, left shift, direction
// change, clear, filter output, sign-bit subtraction with a set sign bit,
// negative filter output.
`timescale 1ns/1ps
module tb_bsr_dafir_top;
  import bsr_pkg::*;
  localparam int N = 64 * SUB_W;
  localparam real PERIOD = 10.0;
  localparam int C [4] = '{5, -3, 11, 7};   // the top's default coefficients
  localparam int NS = 400;
  logic clk = 0, rst, right, sr_in, x_in;
  logic [N-1:0] sr_q, mq;
  logic [1:0] bit_idx;
  logic signed [12:0] y;
  logic y_valid;
  int xs [NS];
  int checks = 0, failures = 0;
  int n_right = 0, n_left = 0, n_switch = 0;
  int n_out = 0, n_sign = 0, n_neg = 0;

  bsr_dafir_top dut (
    .clk(clk), .rst(rst), .right(right), .sr_in(sr_in), .sr_q(sr_q),
    .x_in(x_in), .bit_idx(bit_idx), .y(y), .y_valid(y_valid)
  );

  always #(PERIOD / 2) clk = ~clk;

  function automatic int expected(input int n);
    int s = 0;
    for (int k = 0; k < 4; k++) if (n - k >= 0) s += C[k] * xs[n - k];
    return s;
  endfunction

  task automatic fail(input string what);
    failures++;
    $display("FAIL t=%0t %s", $realtime, what);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Filter output checker.
  int edge_no = 0;
  always @(posedge clk) begin
    if (!rst) edge_no++;
    #1;
    if (!rst) begin
      checks++;
      if (y_valid !== ((edge_no % 4) == 0)) fail("filter output rate");
      if (y_valid) begin
        int n;
        n = edge_no / 4 - 2;
        if (n >= 0 && n < NS) begin
          checks++;
          if (int'(y) != expected(n)) fail($sformatf("y[%0d]=%0d expected %0d", n, y, expected(n)));
          if (xs[n] < 0 || (n > 0 && xs[n-1] < 0)) n_sign++;
          if (expected(n) < 0) n_neg++;
          n_out++;
        end
      end
    end
  end

  // Filter input driver.
  initial begin
    for (int n = 0; n < NS; n++) xs[n] = $urandom_range(0, 15) - 8;
    x_in = 0;
    @(negedge rst);
    for (int n = 0; n < NS; n++)
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (bit_idx != 2'(j)) fail("bit_idx");
        x_in = 1'(xs[n] >> j);
        @(posedge clk);
        #(0.75 * PERIOD);
      end
  end

  // Shift register driver and checker.
  initial begin
    bit prev_dir;
    rst = 1; right = 1; sr_in = 0; mq = '0;
    @(posedge clk); @(posedge clk);
    #(0.75 * PERIOD) rst = 0;
    checks++;
    if (sr_q !== mq) fail("reset");
    prev_dir = right;
    for (int c = 0; c < NS * 4 + 12; c++) begin
      bit d, b;
      d = right; b = sr_in;
      @(posedge clk);
      #(0.7 * PERIOD);
      if (d) begin mq = {mq[N-2:0], b}; n_right++; end
      else   begin mq = {b, mq[N-1:1]}; n_left++; end
      if (d != prev_dir) n_switch++;
      prev_dir = d;
      checks++;
      if (sr_q !== mq) fail($sformatf("shift register, cycle %0d right=%0d", c, d));
      #(0.05 * PERIOD);
      sr_in = 1'($urandom);
      right = (c < 300) ? 1'b1 : (c < 600) ? 1'b0 : ($urandom_range(0, 7) != 0) ? right : ~right;
    end
    checks++;
    if (n_right == 0) fail("no right shift");
    if (n_left == 0) fail("no left shift");
    if (n_switch == 0) fail("no direction change");
    if (n_out != NS) fail($sformatf("filter produced %0d of %0d outputs", n_out, NS));
    if (n_sign == 0) fail("no sign-bit subtraction");
    if (n_neg == 0) fail("no negative output");
    $display("right=%0d left=%0d switches=%0d outputs=%0d sign-bit cases=%0d negative=%0d",
             n_right, n_left, n_switch, n_out, n_sign, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
