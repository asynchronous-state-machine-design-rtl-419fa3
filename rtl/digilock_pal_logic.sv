// Combinational logic of the asynchronous Digilock, as held in one PAL.
//
// The lock opens after the sequence B0, B1, B1, B0 (each a press followed by a
// release, only one button down at a time). Any other press sends it to ERR,
// which it leaves for INIT once both buttons are up. ULK holds until RESET.
//
// There is no clock and no flip-flop. This block computes the next state from
// the present state and the buttons. The four next-state outputs are fed back
// as the present state, and the PAL's propagation delay on that path is the
// only storage (see pal_feedback_delay and the top, digilock_async). The
// machine is stable when next_sreg equals sreg.
//
// The equations and the state codes (digilock_pkg) are those of the original
// design: the two-level sum of products its logic fitter produced. sreg[3] is
// built in inverted form, as a sum for its complement, as the fitter chose.
// RESET is part of the logic: it forces every next-state bit to 0 (INIT).
// The six unused codes go to ERR (1000) under every input, 00 included. The
// original flow table sends them to INIT under 00, but the fitted equations,
// which this block follows, give ERR. From ERR, 00 leads to INIT, so the
// machine ends up in the same place.
//
// Ports: sreg (present state, the fed-back outputs), b0/b1 (push buttons,
// active high), reset (active high), next_sreg (next state), unlock (1 in ULK
// only; a Moore output decoded from the present state).
// Timing: purely combinational; no clock.
module digilock_pal_logic
  import digilock_pkg::*;
(
  input  logic [STATE_W-1:0] sreg,
  input  logic               b0,
  input  logic               b1,
  input  logic               reset,
  output logic [STATE_W-1:0] next_sreg,
  output logic               unlock
);
  timeunit 1ps;
  timeprecision 1ps;

  logic s3, s2, s1, s0;
  logic sreg3_n;  // complement of next sreg[3]

  assign {s3, s2, s1, s0} = sreg;

  always_comb begin
    unlock = s3 & s2 & ~s1 & ~s0;

    next_sreg[0] = (~s3 & ~s2 & ~s1 &  b0 & ~b1 & ~reset)   // INIT, B0 pressed
                 | (~s3 &  s2 &  s1 & ~b0 &  b1 & ~reset)   // B1R1 -> B1P2
                 | (~s3 &  s0 & ~b0 & ~b1 & ~reset);        // hold the released states

    next_sreg[1] = (~s3 & ~s2 &  s0 & ~b0 & ~b1 & ~reset)   // B0P1 -> B0R1
                 | (~s3 &  s1 & ~b0 &  b1 & ~reset)         // B1 held
                 | (~s3 &  s1 & ~s0 & ~b0 & ~reset);

    next_sreg[2] = (~s3 &  s1 & ~s0 & ~b0 & ~b1 & ~reset)   // B1P1 -> B1R1
                 | ( s3 &  s2 & ~s1 & ~s0 & ~reset)         // ULK holds
                 | (~s3 &  s2 & ~s1 & ~b1 & ~reset)
                 | (~s3 &  s2 &  s1 & ~b0 & ~reset);

    sreg3_n      = (~s2 & ~s1 & ~s0 & ~b0 & ~b1)            // INIT or ERR with no button
                 | (~s3 &  s0 & ~b0 & ~b1)
                 | (~s3 & ~s1 &  b0 & ~b1)
                 | (~s3 &  s1 & ~b0)
                 | reset;
    next_sreg[3] = ~sreg3_n;
  end

endmodule
