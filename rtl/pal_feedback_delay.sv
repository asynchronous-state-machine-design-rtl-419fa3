// Behavioural model (not synthesizable): the propagation delay of the PAL
// outputs, which is the only state storage of the asynchronous Digilock.
//
// Each of the W outputs follows its input after T_PD_PS[i] picoseconds. The
// delay is inertial: a change on d[i] that reverts before the delay has passed
// never reaches q[i]. That is how a gate output treats a pulse shorter than its
// delay. A per-bit delay lets the state variables of one transition switch in
// any order. This is what decides how a race between them ends. With equal
// delays every bit that must change does so at the same instant. That is the
// view of a zero-skew logic simulation.
//
// The original design asks only for a PAL delay of a few nanoseconds. The
// 5 ns default, the inertial behaviour and the separate delay per output are
// this model's own choices. q starts at 0 at time zero.
//
// Ports: d (PAL logic output), q (the same signal as it reaches the pins and
// the feedback path). Parameters: W (width), T_PD_PS (per-bit delay in ps).
module pal_feedback_delay #(
  parameter int unsigned W = 5,
  parameter int unsigned T_PD_PS [W] = '{default: 5000}
) (
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [W-1:0] q_r = '0;
  assign q = q_r;

  for (genvar i = 0; i < W; i++) begin : g_bit
    always begin
      wait (d[i] !== q_r[i]);
      fork
        #(T_PD_PS[i]);
        @(d[i]);
      join_any
      disable fork;
      // Update only if the input held its new value for the whole delay.
      if (d[i] !== q_r[i]) q_r[i] = d[i];
    end
  end

endmodule
