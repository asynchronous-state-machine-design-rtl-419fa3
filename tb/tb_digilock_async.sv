// End-to-end testbench for digilock_async at its default parameters.
//
// Works the buttons as a user would, one input change at a time, and waits
// for the machine to settle before the next change (fundamental mode; the
// driver task checks this rule before every change). After each change it
// checks the settled state, the unlock output and the timing:
//   - a state change completes one PAL delay (5 ns) after the input change,
//     because with equal delays all state bits that must switch do so
//     together and the flow table leads straight to a stable state;
//   - unlock follows the state by one more PAL delay.
// Scenarios: reset; the opening sequence B0,B1,B1,B0; ULK holding under every
// button combination; reset from ULK; a wrong press from each of the eight
// states of the sequence, with recovery through ERR to INIT once both buttons
// are up. It counts each mechanism (reset, unlock, ULK hold, ERR entry, ERR
// exit, multi-bit state change) and fails one that never happened.
module tb_digilock_async;
  import digilock_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam longint T_PD   = 5000;    // default PAL delay of the DUT
  localparam longint SETTLE = 40_000;   // wait after each input change

  logic               b0, b1, reset, unlock;
  logic [STATE_W-1:0] sreg;
  int checks = 0, failures = 0;
  int n_reset = 0, n_unlock = 0, n_hold = 0, n_err_in = 0, n_err_out = 0, n_multi = 0;

  digilock_async dut (.b0(b0), .b1(b1), .reset(reset), .unlock(unlock), .sreg(sreg));

  // Time of the last change of sreg and of unlock.
  longint t_sreg = 0, t_unlock = 0;
  initial forever begin @(sreg);   t_sreg   = $time; end
  initial forever begin @(unlock); t_unlock = $time; end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: sreg=%b unlock=%b", what, $time, sreg, unlock);
    end
  endtask

  // Apply one input change and check where the machine settles.
  task automatic step(logic nb0, logic nb1, logic nreset, logic [3:0] want, string what);
    logic [3:0] s_prev;
    logic       unlock_before;
    longint     t0;
    s_prev        = sreg;
    unlock_before = unlock;
    // Fundamental mode: one input at a time, machine stable before it.
    check(((nb0 != b0) + (nb1 != b1) + (nreset != reset)) == 1, {what, ": one input change"});
    check($time - t_sreg >= SETTLE / 2, {what, ": stable before change"});
    t0 = $time;
    {b0, b1, reset} = {nb0, nb1, nreset};
    #SETTLE;
    check(sreg == want, $sformatf("%s: state %b want %b", what, sreg, want));
    check(unlock == (want == ULK), {what, ": unlock"});
    if (want != s_prev) begin
      check(t_sreg - t0 == T_PD, $sformatf("%s: state settled after %0d ps", what, t_sreg - t0));
      if ($countones(want ^ s_prev) > 1) n_multi++;
      if (want == ERR)  n_err_in++;
      if (s_prev == ERR && want == INIT) n_err_out++;
      if (want == ULK)  n_unlock++;
    end else if (s_prev == ULK) begin
      n_hold++;
    end
    if ((want == ULK) != unlock_before)
      check(t_unlock - t0 == 2 * T_PD, $sformatf("%s: unlock changed after %0d ps", what, t_unlock - t0));
  endtask

  task automatic do_reset();
    step(b0, b1, 1'b1, INIT, "reset on");
    step(b0, b1, 1'b0, INIT, "reset off");
    n_reset++;
  endtask

  // The opening sequence: button pressed at each step and the state reached.
  // Steps 0..7 alternate press and release: B0, -, B1, -, B1, -, B0, -.
  localparam logic [1:0] SEQ_IN [8] = '{2'b10, 2'b00, 2'b01, 2'b00, 2'b01, 2'b00, 2'b10, 2'b00};
  localparam state_e SEQ_ST [8] = '{B0P1, B0R1, B1P1, B1R1, B1P2, B1R2, B0P2, ULK};

  task automatic walk(int unsigned n);
    for (int unsigned k = 0; k < n; k++)
      step(SEQ_IN[k][1], SEQ_IN[k][0], 1'b0, SEQ_ST[k], $sformatf("sequence step %0d", k));
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b0 = 1'b0; b1 = 1'b0; reset = 1'b0;
    #SETTLE;
    do_reset();

    // Open the lock.
    walk(8);
    check(unlock == 1'b1, "unlocked after B0,B1,B1,B0");

    // ULK holds whatever the buttons do.
    step(1'b1, 1'b0, 1'b0, ULK, "ULK press B0");
    step(1'b1, 1'b1, 1'b0, ULK, "ULK press both");
    step(1'b0, 1'b1, 1'b0, ULK, "ULK release B0");
    step(1'b0, 1'b0, 1'b0, ULK, "ULK release B1");
    do_reset();
    check(unlock == 1'b0, "locked after reset");

    // A wrong press from each state of the sequence.
    for (int unsigned k = 0; k < 8; k++) begin
      walk(k);
      if (k % 2 == 0) begin
        // Both buttons up: the wrong button alone.
        logic [1:0] wrong;
        wrong = ~SEQ_IN[k];
        step(wrong[1], wrong[0], 1'b0, ERR, $sformatf("wrong press after %0d steps", k));
        step(1'b0, 1'b0, 1'b0, INIT, "release to INIT");
      end else begin
        // One button down: the other one as well.
        step(1'b1, 1'b1, 1'b0, ERR, $sformatf("both pressed after %0d steps", k));
        step(SEQ_IN[k-1][1], SEQ_IN[k-1][0], 1'b0, ERR, "release one, ERR holds");
        step(1'b0, 1'b0, 1'b0, INIT, "release both to INIT");
      end
    end

    // A whole correct entry again after the errors, then reset.
    walk(8);
    do_reset();

    $display("mechanisms: reset=%0d unlock=%0d ulk_hold=%0d err_entry=%0d err_exit=%0d multi_bit=%0d",
             n_reset, n_unlock, n_hold, n_err_in, n_err_out, n_multi);
    check(n_reset > 0,   "reset happened");
    check(n_unlock > 0,  "unlock happened");
    check(n_hold > 0,    "ULK hold happened");
    check(n_err_in > 0,  "ERR entry happened");
    check(n_err_out > 0, "ERR exit happened");
    check(n_multi > 0,   "multi-bit state change happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
