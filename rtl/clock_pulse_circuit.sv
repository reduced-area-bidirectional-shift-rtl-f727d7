// clock_pulse_circuit: behavioural model of a pulsed clock generator.
//
// Behavioural model, not synthesizable: a real pulse generator is a delay
// cell, an inverter and an AND gate whose pulse width is set by the cell
// delay, and no synthesizable RTL describes that. This model reproduces its
// function: OFFSET after each rising edge of clk_in, pulse_out goes high for
// WIDTH. Delays are transport delays (every edge is scheduled), so pulses
// are kept even when OFFSET + WIDTH exceeds half the clock period.
// Requirements: WIDTH > 0 and OFFSET + WIDTH below the clock period.
// Times are in ns.
`timescale 1ns/1ps
module clock_pulse_circuit #(
  parameter real OFFSET = 0.0,  // rising clock edge to pulse start, ns
  parameter real WIDTH  = 0.2   // pulse width, ns
) (
  input  logic clk_in,
  output logic pulse_out
);
  initial pulse_out = 1'b0;

  always @(posedge clk_in) begin
    pulse_out <= #(OFFSET) 1'b1;
    pulse_out <= #(OFFSET + WIDTH) 1'b0;
  end
endmodule
