// bd_latch_array: the latch datapath of the bidirectional shift register.
//
// N_SUB 4-bit sub registers (sub_bsr4) in series plus one extra temporary
// BD-PL, T<0>, in front of the first. All sub registers share the same ten
// pulse lines (five per direction), so the pulse generator does not grow with
// the register length. With the default N_SUB = 64 this is the 256-bit
// register of the published design: 256 data latches Q<1>..Q<256> and 65
// temporary latches T<0>..T<64>.
//
// Right shift (clk_pulse_r used): every Q<i> takes Q<i-1>, Q<1> takes
// sr_in (through T<0>). Left shift (clk_pulse_l used): every Q<i> takes
// Q<i+1>, Q<N> takes sr_in (through T<N_SUB>). One shift per clock cycle;
// sr_in is captured while the T pulse is high, at the start of the cycle.
// The same sr_in feeds both ends, as in the published figure.
//
// T<0> only matters when right-shifting; its right-hand input is tied to Q<1>
// so that it simply follows the register when left-shifting (this design's
// choice; the published figure does not show that connection clearly).
//
// Lint tools report a combinational loop here: each latch reads its right
// neighbour and its right neighbour reads it back. The loop is broken in
// operation because the pulses are non-overlapping, so two neighbouring
// latches are never transparent at the same time; it is a property of the
// bidirectional latch chain, not an error.
`timescale 1ns/1ps
module bd_latch_array
  import bsr_pkg::*;
#(
  parameter int unsigned N_SUB = 64
) (
  input  logic       rst,
  input  pulse_vec_t clk_pulse_r,
  input  pulse_vec_t clk_pulse_l,
  input  logic       sr_in,
  output logic [N_SUB*SUB_W-1:0] q,   // q[0]=Q<1> ... q[N-1]=Q<N>
  output logic [N_SUB:0]         t    // t[k]=T<k>
);
  bd_pl u_t0 (
    .rst        (rst),
    .clk_pulse_r(clk_pulse_r[P_T]),
    .clk_pulse_l(clk_pulse_l[P_T]),
    .dl         (sr_in),
    .dr         (q[0]),
    .q          (t[0])
  );

  for (genvar k = 0; k < N_SUB; k++) begin : g_sub
    logic t_right_in;
    if (k == N_SUB - 1) begin : g_last
      assign t_right_in = sr_in;
    end else begin : g_mid
      assign t_right_in = q[(k+1)*SUB_W];
    end

    sub_bsr4 u_sub (
      .rst        (rst),
      .clk_pulse_r(clk_pulse_r),
      .clk_pulse_l(clk_pulse_l),
      .t_left     (t[k]),
      .t_right_in (t_right_in),
      .q          (q[k*SUB_W +: SUB_W]),
      .t          (t[k+1])
    );
  end
endmodule
