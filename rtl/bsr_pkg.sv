// bsr_pkg: constants and types shared by the bidirectional pulsed-latch
// shift register and the distributed-arithmetic FIR filter built on it.
//
// A shift step is carried out by five ordered, non-overlapping latch pulses
// per clock cycle: the "T" pulse that loads the temporary latches, then the
// pulses for latch positions 1..4 of every 4-bit sub register. A pulse
// vector is indexed by latch position: bit 0 is the T pulse, bits 1..4 are
// positions 1..4. The 4-bit sub-register width and the five-pulse scheme
// follow the published design; the vector layout is this design's own.
`timescale 1ns/1ps
package bsr_pkg;
  // Data latches per sub register.
  localparam int unsigned SUB_W = 4;
  // Pulse lines per direction: T plus one per data latch position.
  localparam int unsigned N_PULSE = SUB_W + 1;
  // Index of the temporary-latch pulse in a pulse vector.
  localparam int unsigned P_T = 0;

  typedef logic [N_PULSE-1:0] pulse_vec_t;
endpackage
