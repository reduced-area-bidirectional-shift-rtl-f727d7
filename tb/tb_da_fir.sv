// tb_da_fir: self-checking test of the bit-serial DA FIR filter.
// Streams random 4-bit two's complement samples (plus the extreme values
// -8 and 7) LSB first, one bit per 10 ns clock, and compares every output
// with a direct convolution y[n] = sum_k h[k] x[n-k] computed here.
// Also checks the output rate (one per four clocks) and the latency (y[n]
// appears 8 rising edges after bit 0 of x[n] is latched). Runs with the
// default coefficients and with a second set of extreme coefficients.
`timescale 1ns/1ps
module tb_da_fir;
  localparam real PERIOD = 10.0;
  localparam int C1 [4] = '{5, -3, 11, 7};
  localparam int C2 [4] = '{-32, 31, -32, 31};
  localparam int NS = 300;
  logic clk = 0, rst, x_in;
  logic [1:0] bit_idx1, bit_idx2;
  logic signed [12:0] y1, y2;
  logic v1, v2;
  int xs [NS];
  int checks = 0, failures = 0, n_neg = 0;

  da_fir dut1 (.clk(clk), .rst(rst), .x_in(x_in), .bit_idx(bit_idx1), .y(y1), .y_valid(v1));
  da_fir #(.COEF(C2)) dut2 (.clk(clk), .rst(rst), .x_in(x_in), .bit_idx(bit_idx2), .y(y2), .y_valid(v2));

  always #(PERIOD / 2) clk = ~clk;

  function automatic int expected(input int c [4], input int n);
    int s = 0;
    for (int k = 0; k < 4; k++) if (n - k >= 0) s += c[k] * xs[n - k];
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker: sample n's result is flagged at the edge 8 after its bit 0.
  int edge_no = 0;
  int n_out = 0;
  always @(posedge clk) begin
    if (!rst) edge_no++;
    #1;
    if (!rst) begin
      checks++;
      if (v1 !== ((edge_no % 4) == 0)) begin failures++; $display("FAIL rate at edge %0d", edge_no); end
      if (v1) begin
        int n;
        n = edge_no / 4 - 2;   // the sample whose bit 0 was latched 8 edges before
        if (n >= 0 && n < NS) begin
          checks += 2;
          if (int'(y1) != expected(C1, n)) begin
            failures++; $display("FAIL y1[%0d]=%0d expected %0d", n, y1, expected(C1, n));
          end
          if (int'(y2) != expected(C2, n)) begin
            failures++; $display("FAIL y2[%0d]=%0d expected %0d", n, y2, expected(C2, n));
          end
          if (expected(C1, n) < 0) n_neg++;
          n_out++;
        end
      end
    end
  end

  initial begin
    for (int n = 0; n < NS; n++)
      xs[n] = (n == 3) ? -8 : (n == 4) ? 7 : (n < 3) ? 0 : $urandom_range(0, 15) - 8;
    rst = 1; x_in = 0;
    @(posedge clk); @(posedge clk);
    #(0.75 * PERIOD) rst = 0;
    for (int n = 0; n < NS; n++)
      for (int j = 0; j < 4; j++) begin
        // bit_idx tells which bit the filter latches next
        checks++;
        if (bit_idx1 != 2'(j)) begin failures++; $display("FAIL bit_idx"); end
        x_in = 1'(xs[n] >> j);
        @(posedge clk);
        #(0.75 * PERIOD);
      end
    repeat (12) @(posedge clk);
    checks++;
    if (n_out != NS || n_neg == 0) begin
      failures++; $display("FAIL outputs=%0d negative=%0d", n_out, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
