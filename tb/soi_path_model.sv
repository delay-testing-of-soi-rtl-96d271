// soi_path_model -- behavioural timing model of one PD-SOI logic path.
//
// Not synthesizable: a testbench stand-in for the circuit under test. It
// models a non-inverting path (an even number of inverting stages) whose delay
// depends on its switching history, the "pulse stretching" of partially
// depleted SOI:
//   * after the input has rested at one level for at least PRECOND, the path
//     is preconditioned; its first edge away from that level is fast;
//   * if the input returns to the preconditioned level within PULSE_MAX, the
//     return edge sees the weak devices and takes the worst-case delay;
//   * every other edge takes the fast delay (switching steady state is not
//     modelled separately).
// Rising output edges use the low-to-high delays, falling ones the
// high-to-low delays. The defaults are the worst/fast critical-path delays of
// the c432 benchmark in 0.18 um PD-SOI (1522/1404 ps rising, 1243/1148 ps
// falling); PRECOND and PULSE_MAX are scaled-down stand-ins for "hundreds of
// clock cycles" and "one clock period".
// Interface: a is the path input, y the path output; pure transport delay.
module soi_path_model #(
  parameter realtime T_RISE_FAST  = 1.404ns,
  parameter realtime T_RISE_WORST = 1.522ns,
  parameter realtime T_FALL_FAST  = 1.148ns,
  parameter realtime T_FALL_WORST = 1.243ns,
  parameter realtime PRECOND      = 300ns,
  parameter realtime PULSE_MAX    = 20ns
) (
  input  logic a,
  output logic y
);
  timeunit 1ns; timeprecision 1ps;

  realtime t_last;        // time of the last input edge
  logic    lvl_before;    // level the input held before that edge
  bit      precond;       // that level had been held for at least PRECOND
  int      worst_edges;   // number of stretched (worst-case) edges produced

  initial begin
    y = a;
    t_last = 0;
    lvl_before = a;
    precond = 1'b0;
    worst_edges = 0;
  end

  always @(a) begin : on_edge
    automatic realtime now = $realtime;
    automatic realtime d;
    automatic logic    v = a;
    automatic bit      slow;
    slow = precond && (v == lvl_before) && ((now - t_last) <= PULSE_MAX);
    if (v) d = slow ? T_RISE_WORST : T_RISE_FAST;
    else   d = slow ? T_FALL_WORST : T_FALL_FAST;
    if (slow) worst_edges++;
    precond    = (now - t_last) >= PRECOND;
    lvl_before = ~v;
    t_last     = now;
    fork
      #(d) y = v;
    join_none
  end
endmodule
