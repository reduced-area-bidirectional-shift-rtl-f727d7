// tb_decoder_2to4: exhaustive self-checking test of the 2:4 decoder.
`timescale 1ns/1ps
module tb_decoder_2to4;
  logic       en;
  logic [1:0] x;
  logic [3:0] y, expy;
  int checks = 0, failures = 0;

  decoder_2to4 dut (.en(en), .x(x), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 4; v++) begin
        en = 1'(e); x = 2'(v);
        #1;
        expy = e ? (4'b0001 << v) : 4'b0000;
        checks++;
        if (y !== expy) begin
          failures++;
          $display("FAIL en=%0d x=%0d y=%b expected %b", e, v, y, expy);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
