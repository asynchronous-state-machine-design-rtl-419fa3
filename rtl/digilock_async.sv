// Asynchronous Digilock: a push-button combination lock with no clock.
//
// The bolt opens (unlock = 1) after the buttons are worked in the order
// B0, B1, B1, B0, each pressed and released with only one button down at a
// time. Any wrong press leads to ERR. The machine leaves ERR for INIT once
// both buttons are up. Once open it stays open until reset.
//
// Structure: the PAL logic (digilock_pal_logic) computes the next state and
// the unlock output from the buttons and the present state. Its outputs pass
// through the PAL's propagation delay (pal_feedback_delay). The delayed state
// outputs are fed back as the present state. There are no flip-flops or
// latches: the delay of that loop holds the state, and the loop stops
// changing once the next state equals the present state.
//
// Operating rule (fundamental mode): change only one input at a time, and
// only once the machine is stable. That is a few propagation delays after
// the last change. reset is level sensitive and forces INIT while high.
//
// Ports: b0, b1 (push buttons, 1 = pressed), reset (1 = force INIT),
// unlock (1 = bolt open), sreg (the four state variables on the PAL pins,
// brought out for observation; the lock's own interface is only
// b0/b1/reset/unlock).
// Parameters: T_PD_PS, the delay of each PAL output in picoseconds:
// entries 0..3 for sreg[0..3] and entry 4 for unlock. The equal default
// delays are this design's choice; unequal ones model output skew and show
// how the races in the state assignment resolve.
module digilock_async
  import digilock_pkg::*;
#(
  parameter int unsigned T_PD_PS [STATE_W+1] = '{default: 5000}
) (
  input  logic               b0,
  input  logic               b1,
  input  logic               reset,
  output logic               unlock,
  output logic [STATE_W-1:0] sreg
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [STATE_W-1:0] next_sreg;
  logic               unlock_next;

  digilock_pal_logic u_logic (
    .sreg      (sreg),
    .b0        (b0),
    .b1        (b1),
    .reset     (reset),
    .next_sreg (next_sreg),
    .unlock    (unlock_next)
  );

  pal_feedback_delay #(
    .W       (STATE_W + 1),
    .T_PD_PS (T_PD_PS)
  ) u_delay (
    .d ({unlock_next, next_sreg}),
    .q ({unlock, sreg})
  );

  // The six unused codes must never be stable: the logic always moves them on.
  always_comb begin
    if (next_sreg == sreg)
      assert (is_assigned(sreg))
        else $error("unused state %b is stable", sreg);
  end

endmodule
