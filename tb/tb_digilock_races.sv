// Race testbench for digilock_async: four copies of the lock with skewed
// output delays receive the same button sequence.
//
// With skewed delays, the state bits of a multi-bit transition switch one
// after another. The machine passes through intermediate codes, and where
// it settles depends on the order. Expected outcomes were worked out by hand
// from the flow table, following each order of switching:
//   - B0P1 (0001) with both buttons pressed must reach ERR (1000). With
//     sreg[3] fastest it passes through the unused code 1001. With sreg[0]
//     fastest it passes through INIT (0000). Both lead on to ERR.
//   - B1R2 (0101) with B1 pressed must also reach ERR. That is a race of
//     three bits. If sreg[0] falls first, the code 0100 (B0P2) follows.
//     Under B1 alone B0P2 also leads to ERR (1000), but from there sreg[3]
//     rising before sreg[2] falls gives 1100 (ULK), which is stable. So
//     with delays sreg[0] < sreg[3] < sreg[2] a wrong press opens the lock.
//     That is a critical race of this state assignment. The copy with
//     sreg[2] < sreg[3] ends in ERR as intended.
// Delays (ps), order sreg[0], sreg[1], sreg[2], sreg[3], unlock:
//   a: 5000 5000 5000 2000 5000    (sreg[3] fastest)
//   b: 2000 5000 5000 5000 5000    (sreg[0] fastest)
//   c: 1000 5000 5000 3000 5000    (sreg[0] < sreg[3] < sreg[2])
//   d: 1000 5000 3000 5000 5000    (sreg[0] < sreg[2] < sreg[3])
module tb_digilock_races;
  import digilock_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N = 4;
  localparam int unsigned T_A [5] = '{5000, 5000, 5000, 2000, 5000};
  localparam int unsigned T_B [5] = '{2000, 5000, 5000, 5000, 5000};
  localparam int unsigned T_C [5] = '{1000, 5000, 5000, 3000, 5000};
  localparam int unsigned T_D [5] = '{1000, 5000, 3000, 5000, 5000};

  logic b0, b1, reset;
  logic [N-1:0] unlock;
  logic [STATE_W-1:0] sreg [N];
  int checks = 0, failures = 0;

  digilock_async #(.T_PD_PS(T_A)) dut_a (.b0, .b1, .reset, .unlock(unlock[0]), .sreg(sreg[0]));
  digilock_async #(.T_PD_PS(T_B)) dut_b (.b0, .b1, .reset, .unlock(unlock[1]), .sreg(sreg[1]));
  digilock_async #(.T_PD_PS(T_C)) dut_c (.b0, .b1, .reset, .unlock(unlock[2]), .sreg(sreg[2]));
  digilock_async #(.T_PD_PS(T_D)) dut_d (.b0, .b1, .reset, .unlock(unlock[3]), .sreg(sreg[3]));

  // Codes each copy passed through since the last clear_visits().
  logic [15:0] visited [N];
  for (genvar i = 0; i < N; i++) begin : g_watch
    initial forever begin
      @(sreg[i]);
      visited[i][sreg[i]] = 1'b1;
    end
  end

  task automatic clear_visits();
    for (int i = 0; i < N; i++) visited[i] = '0;
  endtask

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic apply(logic nb0, logic nb1, logic nreset);
    {b0, b1, reset} = {nb0, nb1, nreset};
    #50_000;
  endtask

  task automatic expect_all(logic [3:0] want, string what);
    for (int i = 0; i < N; i++)
      check(sreg[i] == want, $sformatf("%s: copy %0d state %b want %b", what, i, sreg[i], want));
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_via_unused = 0, n_via_init = 0, n_wrong_open = 0, n_err = 0;

  initial begin
    {b0, b1, reset} = 3'b000;
    clear_visits();
    #10_000;
    apply(0, 0, 1);
    apply(0, 0, 0);
    expect_all(INIT, "after reset");

    // Race 1: B0P1 with both buttons pressed.
    apply(1, 0, 0);
    expect_all(B0P1, "B0 pressed");
    clear_visits();
    apply(1, 1, 0);
    expect_all(ERR, "B0P1 + B1");
    check(visited[0][4'b1001], "copy a passes through unused 1001");
    check(visited[1][4'b0000], "copy b passes through INIT");
    check(!visited[0][4'b0000] && !visited[1][4'b1001], "each copy takes one path only");
    if (visited[0][4'b1001]) n_via_unused++;
    if (visited[1][4'b0000]) n_via_init++;
    apply(0, 1, 0);
    expect_all(ERR, "release B0");
    apply(0, 0, 0);
    expect_all(INIT, "release B1");

    // Walk to B1R2: B0, B1, B1 (press and release each).
    apply(1, 0, 0); apply(0, 0, 0);
    apply(0, 1, 0); apply(0, 0, 0);
    apply(0, 1, 0); apply(0, 0, 0);
    expect_all(B1R2, "three digits entered");

    // Race 2: B1R2 with the wrong button (B1).
    clear_visits();
    apply(0, 1, 0);
    check(sreg[0] == ERR,  $sformatf("copy a ends in ERR (%b)", sreg[0]));
    check(sreg[1] == ERR,  $sformatf("copy b ends in ERR (%b)", sreg[1]));
    check(sreg[2] == ULK && unlock[2], $sformatf("copy c opens through the critical race (%b)", sreg[2]));
    check(sreg[3] == ERR,  $sformatf("copy d ends in ERR (%b)", sreg[3]));
    check(visited[0][4'b1101], "copy a passes through unused 1101");
    check(visited[2][4'b0100], "copy c passes through B0P2");
    check(unlock[0] == 1'b0 && unlock[1] == 1'b0 && unlock[3] == 1'b0, "other copies stay locked");
    if (sreg[2] == ULK) n_wrong_open++;
    for (int i = 0; i < N; i++) if (sreg[i] == ERR) n_err++;

    apply(0, 0, 1);
    apply(0, 0, 0);
    expect_all(INIT, "reset after race 2");

    $display("races: via_unused=%0d via_init=%0d wrong_open=%0d err=%0d",
             n_via_unused, n_via_init, n_wrong_open, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
