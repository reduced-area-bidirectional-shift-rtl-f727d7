// tb_bd_pl: self-checking test of the bidirectional pulsed latch.
// Drives random data on both inputs and random pulses on either enable, and
// checks transparency to dl under clk_pulse_r, to dr under clk_pulse_l,
// holding with no pulse, and the asynchronous clear.
`timescale 1ns/1ps
module tb_bd_pl;
  logic rst, pr, pl, dl, dr, q;
  logic expq;
  int checks = 0, failures = 0;

  bd_pl dut (.rst(rst), .clk_pulse_r(pr), .clk_pulse_l(pl), .dl(dl), .dr(dr), .q(q));

  task automatic check(input string what);
    checks++;
    if (q !== expq) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, expq);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pr = 0; pl = 0; dl = 1; dr = 1;
    #1 expq = 0; check("reset");
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      int kind;
      dl = 1'($urandom); dr = 1'($urandom);
      kind = $urandom_range(0, 3);
      #1;
      case (kind)
        0: begin pr = 1; #1 expq = dl; check("transparent to dl");
                 dl = ~dl; #1 expq = dl; check("follows dl while open");
                 pr = 0; #1; dl = ~dl; dr = ~dr; #1 check("holds after R pulse"); end
        1: begin pl = 1; #1 expq = dr; check("transparent to dr");
                 dr = ~dr; #1 expq = dr; check("follows dr while open");
                 pl = 0; #1; dl = ~dl; dr = ~dr; #1 check("holds after L pulse"); end
        2: begin #1 check("holds with no pulse"); end
        default: begin
                 rst = 1; #1 expq = 0; check("clear");
                 rst = 0; #1 check("stays clear"); end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
