// Self-checking testbench for pal_feedback_delay.
//
// Three outputs with delays of 1, 2 and 3 ns. It checks that:
//   - each output follows its own input after exactly its own delay
//     (sampled 10 ps before and 10 ps after the expected edge);
//   - a pulse shorter than the delay never reaches the output (inertial);
//   - a pulse longer than the delay is passed on whole, delayed;
//   - a change that is undone and redone restarts the delay.
module tb_pal_feedback_delay;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 3;
  localparam int unsigned T_PD_PS [W] = '{1000, 2000, 3000};

  logic [W-1:0] d, q;
  int checks = 0, failures = 0;

  pal_feedback_delay #(.W(W), .T_PD_PS(T_PD_PS)) dut (.d(d), .q(q));

  task automatic expect_q(int unsigned bit_i, logic v, string what);
    checks++;
    if (q[bit_i] !== v) begin
      failures++;
      $display("FAIL %s: q[%0d]=%b want %b at %0t", what, bit_i, q[bit_i], v, $time);
    end
  endtask

  task automatic check_all(logic [W-1:0] v, string what);
    for (int i = 0; i < W; i++) expect_q(i, v[i], what);
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    #10_000;
    for (int i = 0; i < W; i++) expect_q(i, 1'b0, "initial");

    // Rising edges, one delay per bit: bit i changes i+1 ns after d.
    d = '1;
    #990  check_all(3'b000, "rise");
    #20   check_all(3'b001, "rise");
    #980  check_all(3'b001, "rise");
    #20   check_all(3'b011, "rise");
    #980  check_all(3'b011, "rise");
    #20   check_all(3'b111, "rise");
    #10_000;
    // Falling edges.
    d = '0;
    #990  check_all(3'b111, "fall");
    #20   check_all(3'b110, "fall");
    #980  check_all(3'b110, "fall");
    #20   check_all(3'b100, "fall");
    #980  check_all(3'b100, "fall");
    #20   check_all(3'b000, "fall");
    #10_000;

    // Short pulse on bit 2 (1.5 ns < 3 ns): swallowed.
    d[2] = 1'b1;
    #1500 d[2] = 1'b0;
    #1    expect_q(2, 1'b0, "short pulse, mid");
    #5000 expect_q(2, 1'b0, "short pulse, after");

    // Same pulse on bit 0 (1.5 ns > 1 ns): passed, delayed by 1 ns.
    #10_000;
    d[0] = 1'b1;
    #990  expect_q(0, 1'b0, "long pulse, before");
    #20   expect_q(0, 1'b1, "long pulse, high");
    #490  d[0] = 1'b0;      // 1.5 ns after the rise
    #990  expect_q(0, 1'b1, "long pulse, still high");
    #20   expect_q(0, 1'b0, "long pulse, low");

    // Restart: bit 1 changes, reverts after 1 ns, changes again.
    #10_000;
    d[1] = 1'b1;
    #1000 d[1] = 1'b0;
    #500  d[1] = 1'b1;
    #1990 expect_q(1, 1'b0, "restart, before");
    #20   expect_q(1, 1'b1, "restart, after");

    #10_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
